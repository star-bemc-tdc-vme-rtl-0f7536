// vme_a16_slave: VME A16 D16/D8(EO) slave front end of a TDC card.
//
// Each TDC card owns a 256-byte window of A16 space whose base (A15..A8) is
// set by the 8-position DIP switch S2 (a closed switch reads 0, so the switch
// pattern equals the address bits). The card answers D16 word cycles and
// single-byte D8 cycles on the even byte (DS1* only, D15..D8) or the odd
// byte (DS0* only, D7..D0). A cycle with LWORD* low (D32) is never answered.
// These rules follow the card documentation; the rest is this design's choice:
// address modifiers 0x29 and 0x2D are accepted, IACK cycles are ignored.
//
// How it works: AS* and both DS* are synchronised to clk by two flip-flops.
// When a data strobe falls while AS* is low the address, modifier and width
// are checked; a matching cycle becomes one local-bus request (lb_req) that
// is held until the addressed register block acks it. Read data is then
// latched, vme_d_oe is raised and DTACK* driven low. DTACK* and the data
// drivers are released once both DS* are high again, and the slave returns
// to idle when AS* is also high or a new strobe begins.
//
// Timing: request issued 3 clk after DS* falls; DTACK* 1 clk after the ack.
module vme_a16_slave
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  sw_base,      // DIP switch S2, A15..A8 of the window
  input  logic [15:1] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,     // [1] = DS1* (even byte), [0] = DS0* (odd byte)
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output lbus_req_t   lb_req,
  input  lbus_rsp_t   lb_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_DTACK, S_END} state_e;
  state_e state;

  logic [1:0] as_sync;
  logic [1:0] ds0_sync, ds1_sync;
  logic       as_low, ds0_low, ds1_low, any_ds, both_ds_high;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= 2'b11;
      ds0_sync <= 2'b11;
      ds1_sync <= 2'b11;
    end else begin
      as_sync  <= {as_sync[0],  vme_as_n};
      ds0_sync <= {ds0_sync[0], vme_ds_n[0]};
      ds1_sync <= {ds1_sync[0], vme_ds_n[1]};
    end
  end

  assign as_low       = !as_sync[1];
  assign ds0_low      = !ds0_sync[1];
  assign ds1_low      = !ds1_sync[1];
  assign any_ds       = ds0_low || ds1_low;
  assign both_ds_high = !ds0_low && !ds1_low;

  logic hit;
  always_comb begin
    hit = as_low && any_ds
       && vme_iack_n
       && vme_lword_n                                   // D32 is never answered
       && (vme_am == AM_A16_USER || vme_am == AM_A16_SUPV)
       && (vme_addr[15:8] == sw_base);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lb_req      <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (any_ds) begin
            if (hit) begin
              lb_req.valid <= 1'b1;
              lb_req.we    <= !vme_write_n;
              lb_req.addr  <= vme_addr[7:1];
              lb_req.be    <= {ds1_low, ds0_low};
              lb_req.wdata <= vme_d_in;
              state        <= S_WAIT_ACK;
            end else begin
              state        <= S_END;     // not for this card: wait for the strobes to go away
            end
          end
        end
        S_WAIT_ACK: begin
          if (lb_rsp.ack) begin
            lb_req.valid <= 1'b0;
            vme_d_out    <= lb_rsp.rdata;
            vme_d_oe     <= !lb_req.we;
            vme_dtack_n  <= 1'b0;
            state        <= S_DTACK;
          end
        end
        S_DTACK: begin
          if (both_ds_high) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= S_END;
          end
        end
        S_END: begin
          if (both_ds_high) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request is held stable until acknowledged.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    lb_req.valid && !lb_rsp.ack |=> lb_req.valid && $stable(lb_req));
  // DTACK* is only driven while a data strobe is (or was just) active.
  a_no_dtack_idle: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IDLE |-> vme_dtack_n);

endmodule

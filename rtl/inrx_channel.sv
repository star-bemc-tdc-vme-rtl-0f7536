// inrx_channel: register set and RAM sequencer of one Input Card channel.
//
// Register map (word index inside the channel's 0x20-byte window), as the
// card documentation gives it:
//   0..3  TEST / DAQ / L2 / RXWRITE token number: read/write; a write also
//         clears the matching word address counter.
//   4     write: RAM @ {TEST token, TEST counter} -> TEST buffer, counter+1.
//         read:  TEST word address counter.
//   5     write: RAM @ DAQ -> HOLD buffer, DAQ counter+1.   read: DAQ counter.
//   6     write: RAM @ L2  -> HOLD buffer, L2 counter+1.    read: L2 counter.
//   7     write: TEST buffer -> RAM @ TEST, TEST counter+1. read: RXWRITE counter.
//   8     TEST buffer, read/write, no effect on the RAM.
// Data is 12 bits wide; bits 15..12 are ignored on write and read as 0.
// Writes that trigger a RAM cycle repeat it for every write, byte writes too.
//
// Words from the fiber receiver (rx_valid/rx_data) are written at
// {RXWRITE token, RXWRITE counter} and that counter increments. This
// design's choices: the receiver always has the RAM port when it has a word;
// a host RAM cycle waits for a free cycle and the host request is only
// acknowledged when the cycle has finished (read data captured). Counters
// wrap at 2**WORD_BITS. Unused register indices read 0. The HOLD buffer is
// presented on hold_data, with a one-cycle hold_valid strobe and hold_src
// (0 = DAQ, 1 = L2) when it has been loaded.
//
// Timing: register accesses ack 1 clk after the request. A RAM cycle is
// issued in the first clock without a fiber word (at the earliest 2 clk
// after the request), the read data are captured one clock later and the
// ack follows with them: 3 clk when no fiber word intervenes.
module inrx_channel
  import tdc_pkg::*;
#(
  parameter int unsigned TOKEN_BITS = 12,
  parameter int unsigned WORD_BITS  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,          // request addressed to this channel
  input  lbus_req_t   lb_req,
  output lbus_rsp_t   lb_rsp,
  input  logic        rx_valid,
  input  logic [11:0] rx_data,
  output logic        hold_valid,
  output logic        hold_src,
  output logic [11:0] hold_data
);

  localparam int unsigned AW = TOKEN_BITS + WORD_BITS;

  typedef enum logic [1:0] {P_IDLE, P_WAIT_RAM, P_CAPTURE} phase_e;
  typedef enum logic [1:0] {OP_TEST_RD, OP_DAQ_RD, OP_L2_RD, OP_TEST_WR} op_e;

  logic [TOKEN_BITS-1:0] tok_test, tok_daq, tok_l2, tok_rxw;
  logic [WORD_BITS-1:0]  cnt_test, cnt_daq, cnt_l2, cnt_rxw;
  logic [11:0]           test_buf;

  phase_e phase;
  op_e    op;

  logic          ram_en, ram_we;
  logic [AW-1:0] ram_addr;
  logic [11:0]   ram_wdata, ram_rdata;

  channel_ram #(.ADDR_BITS(AW), .DATA_BITS(12)) u_ram (
    .clk  (clk),
    .en   (ram_en),
    .we   (ram_we),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  // ---------------------------------------------------------------- RAM port
  logic host_issue;
  assign host_issue = (phase == P_WAIT_RAM) && !rx_valid;

  always_comb begin
    ram_en    = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = '0;
    ram_wdata = rx_data;
    if (rx_valid) begin
      ram_en   = 1'b1;
      ram_we   = 1'b1;
      ram_addr = {tok_rxw, cnt_rxw};
    end else if (host_issue) begin
      ram_en = 1'b1;
      unique case (op)
        OP_TEST_RD: ram_addr = {tok_test, cnt_test};
        OP_DAQ_RD:  ram_addr = {tok_daq,  cnt_daq};
        OP_L2_RD:   ram_addr = {tok_l2,   cnt_l2};
        OP_TEST_WR: begin
          ram_addr  = {tok_test, cnt_test};
          ram_we    = 1'b1;
          ram_wdata = test_buf;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ read mux
  logic [11:0] rd_word;
  always_comb begin
    rd_word = '0;
    unique case (lb_req.addr[4:1])
      CH_TEST_TOKEN: rd_word = 12'(tok_test);
      CH_DAQ_TOKEN:  rd_word = 12'(tok_daq);
      CH_L2_TOKEN:   rd_word = 12'(tok_l2);
      CH_RXW_TOKEN:  rd_word = 12'(tok_rxw);
      CH_TEST_COUNT: rd_word = 12'(cnt_test);
      CH_DAQ_COUNT:  rd_word = 12'(cnt_daq);
      CH_L2_COUNT:   rd_word = 12'(cnt_l2);
      CH_RXW_COUNT:  rd_word = 12'(cnt_rxw);
      CH_TEST_BUF:   rd_word = test_buf;
      default:       rd_word = '0;
    endcase
  end

  // byte-merged 12-bit write value for the addressed register
  function automatic logic [11:0] wr12(input logic [11:0] old_v);
    logic [15:0] m;
    m = merge_bytes({4'h0, old_v}, lb_req.wdata, lb_req.be);
    return m[11:0];
  endfunction

  logic new_req;
  assign new_req = sel && lb_req.valid && !lb_rsp.ack && (phase == P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_test <= '0; tok_daq <= '0; tok_l2 <= '0; tok_rxw <= '0;
      cnt_test <= '0; cnt_daq <= '0; cnt_l2 <= '0; cnt_rxw <= '0;
      test_buf   <= '0;
      hold_data  <= '0;
      hold_valid <= 1'b0;
      hold_src   <= 1'b0;
      phase      <= P_IDLE;
      op         <= OP_TEST_RD;
      lb_rsp     <= LBUS_RSP_IDLE;
    end else begin
      lb_rsp.ack <= 1'b0;
      hold_valid <= 1'b0;

      if (rx_valid) cnt_rxw <= cnt_rxw + 1'b1;

      unique case (phase)
        P_IDLE: begin
          if (new_req) begin
            if (lb_req.we) begin
              unique case (lb_req.addr[4:1])
                CH_TEST_TOKEN: begin tok_test <= TOKEN_BITS'(wr12(12'(tok_test))); cnt_test <= '0; end
                CH_DAQ_TOKEN:  begin tok_daq  <= TOKEN_BITS'(wr12(12'(tok_daq)));  cnt_daq  <= '0; end
                CH_L2_TOKEN:   begin tok_l2   <= TOKEN_BITS'(wr12(12'(tok_l2)));   cnt_l2   <= '0; end
                CH_RXW_TOKEN:  begin
                  tok_rxw <= TOKEN_BITS'(wr12(12'(tok_rxw)));
                  cnt_rxw <= '0;                     // the host wins over a receiver increment
                end
                CH_TEST_BUF:   test_buf <= wr12(test_buf);
                default: ;
              endcase
              unique case (lb_req.addr[4:1])
                CH_TEST_COUNT: begin op <= OP_TEST_RD; phase <= P_WAIT_RAM; end
                CH_DAQ_COUNT:  begin op <= OP_DAQ_RD;  phase <= P_WAIT_RAM; end
                CH_L2_COUNT:   begin op <= OP_L2_RD;   phase <= P_WAIT_RAM; end
                CH_RXW_COUNT:  begin op <= OP_TEST_WR; phase <= P_WAIT_RAM; end
                default: begin
                  lb_rsp.ack   <= 1'b1;
                  lb_rsp.rdata <= '0;
                end
              endcase
            end else begin
              lb_rsp.ack   <= 1'b1;
              lb_rsp.rdata <= {4'h0, rd_word};
            end
          end
        end
        P_WAIT_RAM: begin
          if (host_issue) begin
            unique case (op)
              OP_TEST_RD, OP_TEST_WR: cnt_test <= cnt_test + 1'b1;
              OP_DAQ_RD:              cnt_daq  <= cnt_daq  + 1'b1;
              OP_L2_RD:               cnt_l2   <= cnt_l2   + 1'b1;
              default: ;
            endcase
            phase <= P_CAPTURE;
          end
        end
        P_CAPTURE: begin
          unique case (op)
            OP_TEST_RD: test_buf <= ram_rdata;
            OP_DAQ_RD, OP_L2_RD: begin
              hold_data  <= ram_rdata;
              hold_src   <= (op == OP_L2_RD);
              hold_valid <= 1'b1;
            end
            default: ;
          endcase
          lb_rsp.ack   <= 1'b1;
          lb_rsp.rdata <= '0;
          phase        <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    lb_rsp.ack |=> !lb_rsp.ack);

endmodule

// fpga_prog_port: FPGA configuration registers of a TDC card.
//
// The VME host configures the card's Xilinx FPGAs in slave-serial mode
// through two write and two read registers, as the card documentation
// describes:
//   word 0 write (B+1C/B+FC): odd byte = MASK, one bit per FPGA, 0 selects
//                             it; even byte bit 2 (word bit 10) = Enable PGM.
//   word 1 write (B+1E/B+FE): odd byte = DATA; every write drives DIN[i] =
//                             bit i and one CCLK pulse on each selected FPGA.
//   word 0 read: DONE pins, word 1 read: INIT pins (low byte, rest 0).
// PROGRAM*[i] is low while Enable PGM is set and FPGA i is selected.
//
// Timing (this design's choice; the data sheet figures are not restated):
// DIN is set at the write, CCLK rises SETUP_CYCLES clk later and stays high
// for HIGH_CYCLES clk; the write is acknowledged when CCLK has fallen again,
// so back-to-back host writes can never shorten a pulse. Other writes and
// all reads are acknowledged in the next cycle. Reset deselects all FPGAs.
// DONE and INIT are synchronised by two flip-flops.
module fpga_prog_port
  import tdc_pkg::*;
#(
  parameter int unsigned N_FPGA       = 8,
  parameter int unsigned SETUP_CYCLES = 2,
  parameter int unsigned HIGH_CYCLES  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,        // request addressed to this block
  input  logic              reg_sel,    // 0 = MASK/DONE word, 1 = DATA/INIT word
  input  lbus_req_t         lb_req,
  output lbus_rsp_t         lb_rsp,
  output logic [N_FPGA-1:0] cclk,
  output logic [N_FPGA-1:0] din,
  output logic [N_FPGA-1:0] program_n,
  input  logic [N_FPGA-1:0] done,
  input  logic [N_FPGA-1:0] init
);

  localparam int unsigned CW = $clog2(SETUP_CYCLES + HIGH_CYCLES + 2);

  logic [N_FPGA-1:0] mask;
  logic              pgm_en;
  logic [N_FPGA-1:0] done_s1, done_s2, init_s1, init_s2;
  logic [CW-1:0]     pcnt;
  logic              busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_s1 <= '0; done_s2 <= '0;
      init_s1 <= '0; init_s2 <= '0;
    end else begin
      done_s1 <= done; done_s2 <= done_s1;
      init_s1 <= init; init_s2 <= init_s1;
    end
  end

  logic [15:0] rd_word;
  always_comb begin
    rd_word = '0;
    rd_word[N_FPGA-1:0] = reg_sel ? init_s2 : done_s2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask   <= '1;
      pgm_en <= 1'b0;
      din    <= '0;
      cclk   <= '0;
      pcnt   <= '0;
      busy   <= 1'b0;
      lb_rsp <= LBUS_RSP_IDLE;
    end else begin
      lb_rsp.ack <= 1'b0;
      if (busy) begin
        // CCLK pulse in progress
        pcnt <= pcnt + 1'b1;
        if (pcnt == CW'(SETUP_CYCLES - 1))
          cclk <= ~mask;
        if (pcnt == CW'(SETUP_CYCLES + HIGH_CYCLES - 1)) begin
          cclk       <= '0;
          busy       <= 1'b0;
          lb_rsp.ack <= 1'b1;
          lb_rsp.rdata <= '0;
        end
      end else if (sel && lb_req.valid && !lb_rsp.ack) begin
        if (lb_req.we && reg_sel && lb_req.be[0]) begin
          din  <= lb_req.wdata[N_FPGA-1:0];
          pcnt <= '0;
          busy <= 1'b1;
        end else begin
          if (lb_req.we && !reg_sel) begin
            if (lb_req.be[0]) mask   <= lb_req.wdata[N_FPGA-1:0];
            if (lb_req.be[1]) pgm_en <= lb_req.wdata[10];
          end
          lb_rsp.ack   <= 1'b1;
          lb_rsp.rdata <= rd_word;
        end
      end
    end
  end

  assign program_n = ~({N_FPGA{pgm_en}} & ~mask);

  // CCLK only ever reaches selected FPGAs
  a_cclk_masked: assert property (@(posedge clk) disable iff (!rst_n)
    (cclk & mask) == '0 || $changed(mask));

endmodule

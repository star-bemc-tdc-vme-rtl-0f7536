// tdc_input_card: one TDC Input Card (six fiber channels).
//
// The card answers a 256-byte VME A16 window set by its DIP switch S2. The
// window holds six copies of the channel register set (inrx_channel), one
// every 0x20 bytes from B+00; B+C0..B+FF hold no channel. The FPGA
// programming registers (fpga_prog_port, eight FPGAs: INRX0..5, IMUX and
// alternate IMUX) sit at offsets 0x1C/0x1E of every one of the eight 0x20
// windows, so the host may reach them through any channel. The card's
// internal bus is 12 bits: bits 15..12 are ignored on write and read as 0.
// Locations that hold nothing read 0 and ignore writes (this design's
// choice). The map itself follows the card documentation.
//
// Each channel has its own 1 Meg x 12 event memory written by its fiber
// receiver (rx_valid/rx_data, one 12-bit word per clk) and its HOLD buffer
// output. Timing of a VME cycle: see vme_a16_slave and inrx_channel.
module tdc_input_card
  import tdc_pkg::*;
#(
  parameter int unsigned N_CHANNELS = 6,
  parameter int unsigned TOKEN_BITS = 12,
  parameter int unsigned WORD_BITS  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 sw_base,
  // VME
  input  logic [15:1]                vme_addr,
  input  logic [5:0]                 vme_am,
  input  logic                       vme_as_n,
  input  logic [1:0]                 vme_ds_n,
  input  logic                       vme_write_n,
  input  logic                       vme_lword_n,
  input  logic                       vme_iack_n,
  input  logic [15:0]                vme_d_in,
  output logic [15:0]                vme_d_out,
  output logic                       vme_d_oe,
  output logic                       vme_dtack_n,
  // fiber receivers
  input  logic [N_CHANNELS-1:0]      rx_valid,
  input  logic [N_CHANNELS-1:0][11:0] rx_data,
  // HOLD buffers
  output logic [N_CHANNELS-1:0]      hold_valid,
  output logic [N_CHANNELS-1:0]      hold_src,
  output logic [N_CHANNELS-1:0][11:0] hold_data,
  // FPGA configuration pins: [5:0] INRX, [6] IMUX, [7] alternate IMUX
  output logic [7:0]                 fpga_cclk,
  output logic [7:0]                 fpga_din,
  output logic [7:0]                 fpga_program_n,
  input  logic [7:0]                 fpga_done,
  input  logic [7:0]                 fpga_init
);

  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  lbus_rsp_t ch_rsp [N_CHANNELS];
  lbus_rsp_t prog_rsp;
  lbus_rsp_t none_rsp;

  vme_a16_slave u_vme (
    .clk, .rst_n, .sw_base,
    .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
    .vme_iack_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .lb_req, .lb_rsp
  );

  // -------------------------------------------------------------- decode
  logic [2:0] win;        // 0x20-byte window number
  logic [3:0] reg_idx;
  logic       prog_sel, none_sel;
  logic [N_CHANNELS-1:0] ch_sel;

  assign win     = lb_req.addr[7:5];
  assign reg_idx = lb_req.addr[4:1];

  always_comb begin
    prog_sel = (reg_idx == CH_FPGA_MASK) || (reg_idx == CH_FPGA_DATA);
    ch_sel   = '0;
    for (int unsigned c = 0; c < N_CHANNELS; c++)
      ch_sel[c] = !prog_sel && (win == 3'(c));
    none_sel = !prog_sel && (ch_sel == '0);
  end

  // only the 12-bit internal data bus reaches the card's registers
  lbus_req_t lb_req12;
  always_comb begin
    lb_req12 = lb_req;
    lb_req12.wdata[15:12] = 4'h0;
  end

  for (genvar c = 0; c < N_CHANNELS; c++) begin : g_ch
    inrx_channel #(.TOKEN_BITS(TOKEN_BITS), .WORD_BITS(WORD_BITS)) u_ch (
      .clk, .rst_n,
      .sel       (ch_sel[c]),
      .lb_req    (lb_req12),
      .lb_rsp    (ch_rsp[c]),
      .rx_valid  (rx_valid[c]),
      .rx_data   (rx_data[c]),
      .hold_valid(hold_valid[c]),
      .hold_src  (hold_src[c]),
      .hold_data (hold_data[c])
    );
  end

  fpga_prog_port #(.N_FPGA(8)) u_prog (
    .clk, .rst_n,
    .sel      (prog_sel),
    .reg_sel  (reg_idx[0]),
    .lb_req   (lb_req12),
    .lb_rsp   (prog_rsp),
    .cclk     (fpga_cclk),
    .din      (fpga_din),
    .program_n(fpga_program_n),
    .done     (fpga_done),
    .init     (fpga_init)
  );

  // locations without a register: ack, read 0
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_rsp <= LBUS_RSP_IDLE;
    else begin
      none_rsp.ack   <= none_sel && lb_req.valid && !none_rsp.ack;
      none_rsp.rdata <= '0;
    end
  end

  always_comb begin
    lb_rsp = none_rsp;
    if (prog_rsp.ack) lb_rsp = prog_rsp;
    for (int unsigned c = 0; c < N_CHANNELS; c++)
      if (ch_rsp[c].ack) lb_rsp = ch_rsp[c];
    lb_rsp.rdata[15:12] = 4'h0;
  end

endmodule

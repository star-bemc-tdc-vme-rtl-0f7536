// tdc_crate: the BEMC Tower Data Collector crate.
//
// One Output Card and N_INPUT_CARDS Input Cards (six fiber channels each,
// 30 channels in all) sit on one VME bus. Each card answers its own
// 256-byte A16 window chosen by its DIP switch S2; the intended layout puts
// the Output Card at the crate base and Input Card N at base + 0x100*(N+1),
// but the switches are ports, so any layout can be set. The VME data bus is
// split into a master-to-card input and a card-to-master output: the cards'
// outputs are OR-ed under their output enables and DTACK* is the wired AND
// of the cards' DTACK*, as on the backplane. All cards run on clk.
//
// Brought out as ports: each channel's fiber receiver word and HOLD buffer,
// the TCD trigger cable and DAQ busy of the Output Card, and the
// configuration pins of every card's FPGAs (INRX0..5, IMUX, alternate IMUX
// per Input Card; SCORE, GLMUX on the Output Card). The TDC bus between the
// cards on P2 and the Glink outputs are not part of this model.
module tdc_crate
  import tdc_pkg::*;
#(
  parameter int unsigned N_INPUT_CARDS = 5,
  parameter int unsigned N_CHANNELS    = 6,
  parameter int unsigned TOKEN_BITS    = 12,
  parameter int unsigned WORD_BITS     = 8,
  parameter int unsigned FIFO_DEPTH    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus
  input  logic [15:1] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // DIP switches S2
  input  logic [7:0]                         out_sw_base,
  input  logic [N_INPUT_CARDS-1:0][7:0]      in_sw_base,
  // Input Card channels
  input  logic [N_INPUT_CARDS-1:0][N_CHANNELS-1:0]       rx_valid,
  input  logic [N_INPUT_CARDS-1:0][N_CHANNELS-1:0][11:0] rx_data,
  output logic [N_INPUT_CARDS-1:0][N_CHANNELS-1:0]       hold_valid,
  output logic [N_INPUT_CARDS-1:0][N_CHANNELS-1:0]       hold_src,
  output logic [N_INPUT_CARDS-1:0][N_CHANNELS-1:0][11:0] hold_data,
  // Input Card FPGA configuration pins
  output logic [N_INPUT_CARDS-1:0][7:0] in_fpga_cclk,
  output logic [N_INPUT_CARDS-1:0][7:0] in_fpga_din,
  output logic [N_INPUT_CARDS-1:0][7:0] in_fpga_program_n,
  input  logic [N_INPUT_CARDS-1:0][7:0] in_fpga_done,
  input  logic [N_INPUT_CARDS-1:0][7:0] in_fpga_init,
  // Output Card
  input  logic        tcd_strobe,
  input  logic [19:0] tcd_data,
  input  logic        daq_busy,
  output logic [1:0]  out_fpga_cclk,
  output logic [1:0]  out_fpga_din,
  output logic [1:0]  out_fpga_program_n,
  input  logic [1:0]  out_fpga_done,
  input  logic [1:0]  out_fpga_init
);

  logic [N_INPUT_CARDS:0][15:0] d_out;
  logic [N_INPUT_CARDS:0]       d_oe;
  logic [N_INPUT_CARDS:0]       dtack_n;

  tdc_output_card #(.FIFO_DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .sw_base(out_sw_base),
    .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
    .vme_iack_n, .vme_d_in,
    .vme_d_out  (d_out[N_INPUT_CARDS]),
    .vme_d_oe   (d_oe[N_INPUT_CARDS]),
    .vme_dtack_n(dtack_n[N_INPUT_CARDS]),
    .tcd_strobe, .tcd_data, .daq_busy,
    .fpga_cclk     (out_fpga_cclk),
    .fpga_din      (out_fpga_din),
    .fpga_program_n(out_fpga_program_n),
    .fpga_done     (out_fpga_done),
    .fpga_init     (out_fpga_init)
  );

  for (genvar n = 0; n < N_INPUT_CARDS; n++) begin : g_in
    tdc_input_card #(
      .N_CHANNELS(N_CHANNELS), .TOKEN_BITS(TOKEN_BITS), .WORD_BITS(WORD_BITS)
    ) u_in (
      .clk, .rst_n, .sw_base(in_sw_base[n]),
      .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
      .vme_iack_n, .vme_d_in,
      .vme_d_out  (d_out[n]),
      .vme_d_oe   (d_oe[n]),
      .vme_dtack_n(dtack_n[n]),
      .rx_valid   (rx_valid[n]),
      .rx_data    (rx_data[n]),
      .hold_valid (hold_valid[n]),
      .hold_src   (hold_src[n]),
      .hold_data  (hold_data[n]),
      .fpga_cclk     (in_fpga_cclk[n]),
      .fpga_din      (in_fpga_din[n]),
      .fpga_program_n(in_fpga_program_n[n]),
      .fpga_done     (in_fpga_done[n]),
      .fpga_init     (in_fpga_init[n])
    );
  end

  always_comb begin
    vme_d_out = '0;
    for (int unsigned n = 0; n <= N_INPUT_CARDS; n++)
      if (d_oe[n]) vme_d_out |= d_out[n];
  end
  assign vme_d_oe    = |d_oe;
  assign vme_dtack_n = &dtack_n;

  // at most one card drives the data bus
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(d_oe));

endmodule

// tdc_output_card: the TDC Output Card (production register set).
//
// The card answers a 256-byte VME A16 window set by its DIP switch S2:
//   B+00..1E  read: card ID "VMEIDIUCFTDC10" (card_id_rom)
//   B+40      read: trigger word of the last TCD word seen
//             = {status[15:8], trigger command[7:4], DAQ command[3:0]}
//   B+42      read: token number of the last TCD word seen
//   B+44      write: FIFO L2 next    read: token of the entry last written
//   B+46      write: FIFO DAQ next   read: trigger word of the entry last written
//   B+48/4A   read: token at the L2 / DAQ FIFO head
//   B+4C/4E   read: trigger word at the L2 / DAQ FIFO head
//   B+FC/FE   FPGA programming (fpga_prog_port, two FPGAs: SCORE, GLMUX)
// All other locations read 0 and ignore writes. The map follows the card
// documentation; the status bits are this design's choice:
//   [8] DAQ side empty, [9] L2 side empty, [10] full, [11] overflow,
//   [12] DAQ busy input, [15:13] 0. FIFO trigger words carry status 0.
// Triggers come from the TCD cable (tcd_receiver) into trigger_fifo.
// daq_busy is synchronised by two flip-flops.
module tdc_output_card
  import tdc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  sw_base,
  // VME
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
  // trigger and DAQ
  input  logic        tcd_strobe,
  input  logic [19:0] tcd_data,
  input  logic        daq_busy,
  // FPGA configuration pins: [0] SCORE, [1] GLMUX
  output logic [1:0]  fpga_cclk,
  output logic [1:0]  fpga_din,
  output logic [1:0]  fpga_program_n,
  input  logic [1:0]  fpga_done,
  input  logic [1:0]  fpga_init
);

  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp, prog_rsp, reg_rsp;

  vme_a16_slave u_vme (
    .clk, .rst_n, .sw_base,
    .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
    .vme_iack_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .lb_req, .lb_rsp
  );

  // ------------------------------------------------------------ trigger path
  logic [3:0]  tcd_trg, tcd_daq;
  logic [11:0] tcd_token;
  logic        tcd_push;
  trig_entry_t l2_head, daq_head, last_wr;
  logic        l2_empty, daq_empty, fifo_full, fifo_ovf;
  logic        l2_next, daq_next;
  logic [1:0]  busy_sync;

  tcd_receiver u_tcd (
    .clk, .rst_n, .tcd_strobe, .tcd_data,
    .trg_cmd(tcd_trg), .daq_cmd(tcd_daq), .token(tcd_token), .push(tcd_push)
  );

  trigger_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push        (tcd_push),
    .push_entry  ('{trg_cmd: tcd_trg, daq_cmd: tcd_daq, token: tcd_token}),
    .l2_next, .daq_next,
    .l2_head, .daq_head,
    .last_written(last_wr),
    .l2_empty, .daq_empty,
    .full        (fifo_full),
    .overflow    (fifo_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], daq_busy};
  end

  logic [7:0] status;
  assign status = {3'b000, busy_sync[1], fifo_ovf, fifo_full, l2_empty, daq_empty};

  function automatic logic [15:0] trig_word(input logic [3:0] trg, input logic [3:0] daq);
    return {8'h00, trg, daq};
  endfunction

  // ------------------------------------------------------------ registers
  logic        prog_sel;
  logic [15:0] id_word, rd_word;

  assign prog_sel = (lb_req.addr == OC_FPGA_MASK) || (lb_req.addr == OC_FPGA_DATA);

  card_id_rom u_id (.word_addr(lb_req.addr[4:1]), .data(id_word));

  always_comb begin
    rd_word = '0;
    if (lb_req.addr[7:5] == 3'b000) rd_word = id_word;
    else begin
      unique case (lb_req.addr)
        OC_TRIG_WORD: rd_word = {status, tcd_trg, tcd_daq};
        OC_TOKEN:     rd_word = {4'h0, tcd_token};
        OC_L2_NEXT:   rd_word = {4'h0, last_wr.token};
        OC_DAQ_NEXT:  rd_word = trig_word(last_wr.trg_cmd, last_wr.daq_cmd);
        OC_L2_TOKEN:  rd_word = {4'h0, l2_head.token};
        OC_DAQ_TOKEN: rd_word = {4'h0, daq_head.token};
        OC_L2_TRIG:   rd_word = trig_word(l2_head.trg_cmd, l2_head.daq_cmd);
        OC_DAQ_TRIG:  rd_word = trig_word(daq_head.trg_cmd, daq_head.daq_cmd);
        default:      rd_word = '0;
      endcase
    end
  end

  logic reg_go;
  assign reg_go = !prog_sel && lb_req.valid && !reg_rsp.ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rsp  <= LBUS_RSP_IDLE;
      l2_next  <= 1'b0;
      daq_next <= 1'b0;
    end else begin
      reg_rsp.ack <= reg_go;
      reg_rsp.rdata <= rd_word;
      // every write of B+44 / B+46 (either byte) advances its side once
      l2_next  <= reg_go && lb_req.we && (lb_req.addr == OC_L2_NEXT);
      daq_next <= reg_go && lb_req.we && (lb_req.addr == OC_DAQ_NEXT);
    end
  end

  fpga_prog_port #(.N_FPGA(2)) u_prog (
    .clk, .rst_n,
    .sel      (prog_sel),
    .reg_sel  (lb_req.addr[1]),
    .lb_req,
    .lb_rsp   (prog_rsp),
    .cclk     (fpga_cclk),
    .din      (fpga_din),
    .program_n(fpga_program_n),
    .done     (fpga_done),
    .init     (fpga_init)
  );

  assign lb_rsp = prog_rsp.ack ? prog_rsp : reg_rsp;

endmodule

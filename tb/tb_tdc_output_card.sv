// tb_tdc_output_card: the Output Card at base 0x1000 driven over VME.
// Reads the card ID string; sends TCD words and checks the live trigger
// word and token, the FIFO entries on the L2 and DAQ sides as they are
// advanced independently by "FIFO L2 next" / "FIFO DAQ next" writes, the
// status bits (empty, full, overflow, DAQ busy); runs the Output Card FPGA
// programming algorithm against two XC4000 configuration models.
module tb_tdc_output_card;
  import tdc_pkg::*;
  localparam logic [15:0] B = 16'h1000;
  localparam int unsigned DEPTH = 16, BITS = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tcd_strobe = 1'b0, daq_busy = 1'b0;
  logic [19:0] tcd_data = '0;
  logic [1:0] fpga_cclk, fpga_din, fpga_program_n, fpga_done, fpga_init;
  int unsigned checks = 0, failures = 0;
  trig_entry_t q_l2 [$], q_daq [$];

  vme_master_if vme (clk);

  tdc_output_card dut (
    .clk, .rst_n, .sw_base(8'h10),
    .vme_addr(vme.addr), .vme_am(vme.am), .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n),
    .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n), .vme_iack_n(vme.iack_n),
    .vme_d_in(vme.d_in), .vme_d_out(vme.d_out), .vme_d_oe(vme.d_oe), .vme_dtack_n(vme.dtack_n),
    .tcd_strobe, .tcd_data, .daq_busy,
    .fpga_cclk, .fpga_din, .fpga_program_n, .fpga_done, .fpga_init);

  for (genvar i = 0; i < 2; i++) begin : g_fpga
    xc4000_config_model #(.CONFIG_BITS(BITS)) u_fpga (
      .clk, .program_n(fpga_program_n[i]), .cclk(fpga_cclk[i]), .din(fpga_din[i]),
      .done(fpga_done[i]), .init(fpga_init[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERROR %s at %0t", what, $time); end
  endtask
  task automatic wb(input logic [15:0] a, input logic [7:0] d);
    bit ok; vme.write8(a, d, ok); check(ok, "byte write acknowledged");
  endtask
  task automatic ww(input logic [15:0] a, input logic [15:0] d);
    bit ok; vme.write16(a, d, ok); check(ok, "word write acknowledged");
  endtask
  task automatic rw(input logic [15:0] a, output logic [15:0] d);
    bit ok; vme.read16(a, d, ok); check(ok, "word read acknowledged");
  endtask
  task automatic rb(input logic [15:0] a, output logic [7:0] d);
    bit ok; vme.read8(a, d, ok); check(ok, "byte read acknowledged");
  endtask

  task automatic tcd_send(input logic [3:0] trg, input logic [3:0] daq, input logic [11:0] tok);
    tcd_data = {trg, daq, tok};
    tcd_strobe = 1'b1;
    repeat (5) @(posedge clk);
    tcd_strobe = 1'b0;
    repeat (5) @(posedge clk);
    if (trg != 0 && q_l2.size() < DEPTH && q_daq.size() < DEPTH) begin
      q_l2.push_back('{trg, daq, tok});
      q_daq.push_back('{trg, daq, tok});
    end
  endtask

  task automatic check_heads();
    logic [15:0] rd;
    rw(B + 16'h40, rd);
    check(rd[9] == (q_l2.size() == 0) && rd[8] == (q_daq.size() == 0), "empty status bits");
    if (q_l2.size() > 0) begin
      rw(B + 16'h48, rd); check(rd == {4'h0, q_l2[0].token}, "L2 head token");
      rw(B + 16'h4C, rd); check(rd == {8'h00, q_l2[0].trg_cmd, q_l2[0].daq_cmd}, "L2 head trigger word");
    end
    if (q_daq.size() > 0) begin
      rw(B + 16'h4A, rd); check(rd == {4'h0, q_daq[0].token}, "DAQ head token");
      rw(B + 16'h4E, rd); check(rd == {8'h00, q_daq[0].trg_cmd, q_daq[0].daq_cmd}, "DAQ head trigger word");
    end
  endtask

  initial begin
    logic [15:0] rd;
    logic [7:0]  b;
    string id;
    vme.idle();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // card ID
    id = "";
    for (int i = 0; i < 14; i++) begin
      rb(B + 16'(2 * i + 1), b);
      id = {id, string'(b)};
    end
    check(id == "VMEIDIUCFTDC10", "card ID string");
    rw(B + 16'h1E, rd); check(rd == 16'h0000, "ID padding");
    // TCD words: a non-trigger and triggers
    tcd_send(4'h0, 4'h3, 12'h123);
    rw(B + 16'h40, rd); check(rd[7:0] == 8'h03, "live trigger word without trigger");
    rw(B + 16'h42, rd); check(rd == 16'h0123, "live token");
    check_heads();
    for (int i = 0; i < 6; i++) tcd_send(4'(4 + i), 4'(i), 12'(16'h400 + i * 7));
    rw(B + 16'h44, rd); check(rd == 16'h0400 + 5 * 7, "last written token");
    rw(B + 16'h46, rd); check(rd == 16'h0095, "last written trigger word");
    check_heads();
    // advance the sides independently
    for (int i = 0; i < 4; i++) begin
      ww(B + 16'h44, 16'h0000); void'(q_l2.pop_front());
      check_heads();
    end
    wb(B + 16'h47, 8'h00); void'(q_daq.pop_front());      // byte write advances too
    check_heads();
    // fill up: DAQ side holds 5, fill until full, then one more overflows
    while (q_daq.size() < DEPTH) tcd_send(4'h9, 4'h1, 12'($urandom));
    rw(B + 16'h40, rd); check(rd[10] == 1'b1 && rd[11] == 1'b0, "full, no overflow yet");
    tcd_send(4'h9, 4'h2, 12'hFFF);
    rw(B + 16'h40, rd); check(rd[11] == 1'b1, "overflow flag");
    check_heads();
    // drain DAQ side
    while (q_daq.size() > 0) begin ww(B + 16'h46, 16'h0); void'(q_daq.pop_front()); check_heads(); end
    ww(B + 16'h46, 16'h0);                                 // next on empty: nothing
    check_heads();
    // DAQ busy in status
    daq_busy = 1'b1; repeat (4) @(posedge clk);
    rw(B + 16'h40, rd); check(rd[12] == 1'b1, "DAQ busy status");
    daq_busy = 1'b0; repeat (4) @(posedge clk);
    rw(B + 16'h40, rd); check(rd[12] == 1'b0, "DAQ busy released");
    // FPGA programming algorithm
    wb(B + 16'hFD, 8'h00);
    wb(B + 16'hFC, 8'h04);
    repeat (3) @(posedge clk);
    check(fpga_program_n == 2'b00, "PROGRAM* low on both");
    wb(B + 16'hFC, 8'h00);
    repeat (30) @(posedge clk);
    rb(B + 16'hFD, b); check((b & 8'h03) == 8'h00, "DONE low after PROGRAM");
    rb(B + 16'hFF, b); check((b & 8'h03) == 8'h03, "INIT high after PROGRAM");
    wb(B + 16'hFD, 8'hFE);
    for (int k = 0; k < BITS / 8; k++)
      for (int i = 0; i < 8; i++) wb(B + 16'hFF, ((8'h5A + k) >> i) & 1 ? 8'hFF : 8'h00);
    rb(B + 16'hFD, b); check((b & 8'h03) == 8'h01, "SCORE done, GLMUX not yet");
    wb(B + 16'hFD, 8'hFD);
    for (int k = 0; k < BITS / 8; k++)
      for (int i = 0; i < 8; i++) wb(B + 16'hFF, ((8'hC3 ^ k) >> i) & 1 ? 8'hFF : 8'h00);
    repeat (4) @(posedge clk);
    rb(B + 16'hFD, b); check((b & 8'h03) == 8'h03, "both DONE");
    rb(B + 16'hFF, b); check((b & 8'h03) == 8'h03, "both INIT high");
    rw(B + 16'h80, rd); check(rd == 0, "unused location reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

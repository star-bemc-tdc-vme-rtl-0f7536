// tb_tdc_input_card: one Input Card at base 0x1100 driven over VME.
// Runs the card's FPGA programming algorithm (byte writes to MASK / PGMB /
// DATA, DONE and INIT checks) against eight XC4000 configuration models,
// partly through the mirror of the programming registers in window 7.
// Then runs the TEST write and read algorithms for 164 words on every
// channel while channel 2 receives fiber words, reads the received words
// back, loads HOLD buffers by DAQ reads, and checks the unused windows and
// the 12-bit data bus.
module tb_tdc_input_card;
  import tdc_pkg::*;
  localparam logic [15:0] B = 16'h1100;
  localparam int unsigned NCH = 6, BITS = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCH-1:0] rx_valid = '0;
  logic [NCH-1:0][11:0] rx_data = '0;
  logic [NCH-1:0] hold_valid, hold_src;
  logic [NCH-1:0][11:0] hold_data;
  logic [7:0] fpga_cclk, fpga_din, fpga_program_n, fpga_done, fpga_init;
  int unsigned checks = 0, failures = 0, rx_words = 0;
  bit rx_on = 0;
  logic [7:0]  rx_cnt = 0;
  logic [11:0] rx_ref [256];

  vme_master_if vme (clk);

  tdc_input_card dut (
    .clk, .rst_n, .sw_base(8'h11),
    .vme_addr(vme.addr), .vme_am(vme.am), .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n),
    .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n), .vme_iack_n(vme.iack_n),
    .vme_d_in(vme.d_in), .vme_d_out(vme.d_out), .vme_d_oe(vme.d_oe), .vme_dtack_n(vme.dtack_n),
    .rx_valid, .rx_data, .hold_valid, .hold_src, .hold_data,
    .fpga_cclk, .fpga_din, .fpga_program_n, .fpga_done, .fpga_init);

  for (genvar i = 0; i < 8; i++) begin : g_fpga
    xc4000_config_model #(.CONFIG_BITS(BITS)) u_fpga (
      .clk, .program_n(fpga_program_n[i]), .cclk(fpga_cclk[i]), .din(fpga_din[i]),
      .done(fpga_done[i]), .init(fpga_init[i]));
  end

  always #5 clk = ~clk;

  // fiber words change after each clock edge; the reference records the
  // word the card sees at that edge
  always @(posedge clk) begin
    if (rx_valid[2]) begin
      rx_ref[rx_cnt] <= rx_data[2];
      rx_cnt   <= rx_cnt + 1'b1;
      rx_words <= rx_words + 1;
    end
    rx_valid[2] <= rx_on && ($urandom % 100) < 20;
    rx_data[2]  <= 12'($urandom);
  end

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic send_byte(input logic [15:0] data_reg, input logic [7:0] v);
    for (int i = 0; i < 8; i++) wb(data_reg, v[i] ? 8'hFF : 8'h00);
  endtask

  function automatic logic [15:0] bc(input int unsigned ch, input int unsigned off);
    return B + 16'(ch * 32 + off);
  endfunction

  initial begin
    logic [15:0] rd;
    logic [7:0]  b;
    logic [11:0] data [NCH][164];
    vme.idle();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // ---- FPGA programming algorithm (channel 0 window, then mirror in window 7)
    wb(B + 16'h1D, 8'h00);            // MASK all active
    wb(B + 16'h1C, 8'h04);            // PROGRAM pins on
    repeat (5) @(posedge clk);
    check(fpga_program_n == 8'h00, "all PROGRAM* low");
    wb(B + 16'h1C, 8'h00);            // PROGRAM pins off
    repeat (30) @(posedge clk);
    rb(B + 16'h1D, b); check((b & 8'h7F) == 8'h00, "DONE low after PROGRAM");
    rb(B + 16'h1F, b); check((b & 8'h7F) == 8'h7F, "INIT high after PROGRAM");
    wb(B + 16'h1D, 8'hC0);            // all INRX active
    for (int k = 0; k < BITS / 8; k++) send_byte(B + 16'h1F, 8'hA0 + 8'(k));
    wb(B + 16'hFD, 8'h3F);            // IMUX active, through window 7
    for (int k = 0; k < BITS / 8; k++) send_byte(B + 16'hFF, 8'h50 + 8'(k));
    repeat (4) @(posedge clk);
    rb(B + 16'hFD, b); check((b & 8'h7F) == 8'h7F, "DONE high after programming");
    rb(B + 16'h7F, b); check((b & 8'h7F) == 8'h7F, "INIT high after programming (window 3)");
    check(g_fpga[0].u_fpga.checksum == g_fpga[5].u_fpga.checksum, "all INRX got the same stream");
    check(g_fpga[0].u_fpga.checksum != g_fpga[6].u_fpga.checksum, "IMUX got its own stream");
    // ---- memory algorithms on every channel; channel 2 receives at token 0x07E
    ww(bc(2, 6), 16'h007E);
    rx_on = 1;
    for (int ch = 0; ch < NCH; ch++) begin
      logic [11:0] tok;
      tok = 12'(16'h300 + ch * 16'h111);
      ww(bc(ch, 0), {4'h0, tok});
      for (int i = 0; i < 164; i++) begin
        data[ch][i] = 12'($urandom);
        ww(bc(ch, 16'h10), {4'hF, data[ch][i]});    // upper 4 bits are ignored
        wb(bc(ch, 16'h0E), 8'h00);                  // write TEST buffer into RAM
      end
      rw(bc(ch, 8), rd); check(rd == 16'd164, "TEST word counter after writes");
    end
    for (int ch = 0; ch < NCH; ch++) begin
      ww(bc(ch, 0), 16'(16'h300 + ch * 16'h111));
      for (int i = 0; i < 164; i++) begin
        wb(bc(ch, 8), 8'h00);                       // read RAM into TEST buffer
        rw(bc(ch, 16'h10), rd);
        check(rd == {4'h0, data[ch][i]}, "TEST read-back, upper bits 0");
      end
    end
    rx_on = 0;
    repeat (2) @(posedge clk);
    rw(bc(2, 16'h0E), rd); check(rd == {4'h0, rx_cnt}, "RXWRITE word counter");
    ww(bc(2, 0), 16'h007E);
    for (int i = 0; i < int'(rx_cnt); i++) begin
      wb(bc(2, 8), 8'h00);
      rw(bc(2, 16'h10), rd);
      check(rd[11:0] == rx_ref[i], "received word read back");
    end
    // DAQ reads into HOLD on channel 4
    ww(bc(4, 2), 16'(16'h300 + 4 * 16'h111));
    for (int i = 0; i < 4; i++) begin
      fork
        wb(bc(4, 16'h0A), 8'h00);
        begin
          @(posedge hold_valid[4]); #1;
          check(hold_data[4] == data[4][i] && !hold_src[4], "DAQ word in HOLD buffer");
        end
      join
    end
    // unused windows and registers read 0
    rw(B + 16'hC0, rd); check(rd == 0, "window 6 reads 0");
    rw(B + 16'hE2, rd); check(rd == 0, "window 7 reads 0");
    rw(bc(1, 16'h12), rd); check(rd == 0, "unused channel register reads 0");
    check(rx_words > 100, "fiber words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

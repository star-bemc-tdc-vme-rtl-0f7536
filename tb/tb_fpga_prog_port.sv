// tb_fpga_prog_port: drives the local bus of an 8-FPGA programming port
// connected to eight XC4000 configuration models. Checks the active-low
// MASK and the Enable-PGM bit on PROGRAM*, that each DATA write gives
// exactly one CCLK pulse to the selected FPGAs only with DIN = data bit i
// at the rising edge, the ack latency of a DATA write, and the DONE / INIT
// read-back after a complete configuration (the card's programming
// algorithm: pulse PROGRAM*, load INRX bit stream, load IMUX bit stream).
module tb_fpga_prog_port;
  import tdc_pkg::*;
  localparam int unsigned N = 8, SETUP = 2, HIGH = 4, BITS = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel, reg_sel;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  logic [N-1:0] cclk, din, program_n, done, init;
  int unsigned checks = 0, failures = 0;
  int unsigned cclk_count [N];
  logic [N-1:0] cclk_q;
  logic [31:0]  shift [N];

  fpga_prog_port #(.N_FPGA(N), .SETUP_CYCLES(SETUP), .HIGH_CYCLES(HIGH)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_fpga
    xc4000_config_model #(.CONFIG_BITS(BITS), .CLEAR_CYCLES(6)) u_fpga (
      .clk, .program_n(program_n[i]), .cclk(cclk[i]), .din(din[i]), .done(done[i]), .init(init[i]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cclk_q <= cclk;
    for (int i = 0; i < N; i++)
      if (cclk[i] && !cclk_q[i]) begin
        cclk_count[i]++;
        shift[i] <= {shift[i][30:0], din[i]};
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERROR %s at %0t", what, $time); end
  endtask

  task automatic access(input logic rs, input logic we, input logic [1:0] be,
                        input logic [15:0] wd, output logic [15:0] rd, output int unsigned lat);
    @(negedge clk);
    sel = 1'b1; reg_sel = rs;
    lb_req = '{valid: 1'b1, we: we, addr: {6'h0F, rs}, be: be, wdata: wd};
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!lb_rsp.ack && lat < 100);
    rd = lb_rsp.rdata;
    @(negedge clk);
    lb_req.valid = 1'b0; sel = 1'b0;
  endtask

  task automatic wr_byte_mask(input logic [7:0] m);
    logic [15:0] rd; int unsigned lat;
    access(1'b0, 1'b1, 2'b01, {8'h00, m}, rd, lat);
  endtask
  task automatic wr_pgmb(input logic [7:0] v);
    logic [15:0] rd; int unsigned lat;
    access(1'b0, 1'b1, 2'b10, {v, 8'h00}, rd, lat);
  endtask
  task automatic send_byte(input logic [7:0] b);
    logic [15:0] rd; int unsigned lat;
    for (int i = 0; i < 8; i++) begin
      access(1'b1, 1'b1, 2'b01, b[i] ? 16'h00FF : 16'h0000, rd, lat);
      check(lat == SETUP + HIGH + 1, "DATA write ack latency");
    end
  endtask

  initial begin
    logic [15:0] rd;
    int unsigned lat, c0 [N];
    sel = 0; reg_sel = 0; lb_req = '0;
    foreach (cclk_count[i]) begin cclk_count[i] = 0; shift[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(program_n == '1, "reset: PROGRAM* high");
    // MASK = all active, PGMB on -> all PROGRAM* low
    wr_byte_mask(8'h00);
    check(program_n == '1, "MASK alone leaves PROGRAM* high");
    wr_pgmb(8'h04);
    check(program_n == '0, "PGMB on drives all PROGRAM* low");
    wr_byte_mask(8'hF0);
    check(program_n == 8'hF0, "PROGRAM* follows the active-low mask");
    wr_byte_mask(8'h00);
    repeat (4) @(posedge clk);
    wr_pgmb(8'h00);
    check(program_n == '1, "PGMB off releases PROGRAM*");
    repeat (20) @(posedge clk);
    access(1'b0, 1'b0, 2'b11, 16'h0, rd, lat);
    check(rd[7:0] == 8'h00, "DONE all low after PROGRAM");
    access(1'b1, 1'b0, 2'b11, 16'h0, rd, lat);
    check(rd[7:0] == 8'hFF, "INIT all high after PROGRAM");
    check(rd[15:8] == 8'h00, "INIT upper byte zero");
    // single CCLK with a pattern: select FPGAs 0,2 only
    foreach (c0[i]) c0[i] = cclk_count[i];
    wr_byte_mask(8'hFA);
    access(1'b1, 1'b1, 2'b01, 16'h00A5, rd, lat);
    for (int i = 0; i < N; i++)
      check(cclk_count[i] - c0[i] == ((i == 0 || i == 2) ? 1 : 0), "CCLK only on selected");
    check(shift[0][0] == 1'b1 && shift[2][0] == 1'b1, "DIN = data bit at CCLK");
    // even-byte write to DATA gives no CCLK
    foreach (c0[i]) c0[i] = cclk_count[i];
    access(1'b1, 1'b1, 2'b10, 16'hFF00, rd, lat);
    check(cclk_count[0] == c0[0], "even-byte DATA write gives no CCLK");
    // full algorithm: PROGRAM pulse, then INRX stream (BITS/8 bytes), IMUX stream
    wr_byte_mask(8'h00); wr_pgmb(8'h04); repeat (3) @(posedge clk); wr_pgmb(8'h00);
    repeat (20) @(posedge clk);
    foreach (c0[i]) c0[i] = cclk_count[i];
    wr_byte_mask(8'hC0);
    for (int k = 0; k < BITS / 8; k++) send_byte(8'h3C + 8'(k));
    access(1'b0, 1'b0, 2'b11, 16'h0, rd, lat);
    check(rd[7:0] == 8'h3F, "DONE of the INRX FPGAs only after INRX stream");
    wr_byte_mask(8'h3F);
    for (int k = 0; k < BITS / 8; k++) send_byte(8'h81 ^ 8'(k));
    repeat (4) @(posedge clk);
    access(1'b0, 1'b0, 2'b11, 16'h0, rd, lat);
    check(rd[7:0] == 8'hFF, "all DONE after both streams");
    access(1'b1, 1'b0, 2'b11, 16'h0, rd, lat);
    check(rd[7:0] == 8'hFF, "all INIT high after both streams");
    for (int i = 0; i < N; i++) check(cclk_count[i] - c0[i] == BITS, "CCLK count per FPGA");
    // the last byte sent to INRX0 was 0x3C+4 = 0x40, LSB first
    check(shift[0][7:0] == {<<{8'h40}}, "INRX bit order LSB first");
    check(shift[6][7:0] == {<<{8'h85}}, "IMUX bit order LSB first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

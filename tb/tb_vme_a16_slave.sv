// tb_vme_a16_slave: a VME master drives the slave; behind it a 128-word
// register model answers local-bus requests after a random delay. Checks
// D16 and D8 even/odd writes and reads (byte lanes), the request fields,
// that D32 cycles, other base addresses, other address modifiers and IACK
// cycles get no DTACK*, and the DTACK* latency with an immediate ack.
module tb_vme_a16_slave;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sw_base = 8'h11;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  logic [15:0] regs [128];
  int unsigned checks = 0, failures = 0, n_req = 0, delay_max = 0;
  lbus_req_t last_req;

  vme_master_if vme (clk);

  vme_a16_slave dut (
    .clk, .rst_n, .sw_base,
    .vme_addr(vme.addr), .vme_am(vme.am), .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n),
    .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n), .vme_iack_n(vme.iack_n),
    .vme_d_in(vme.d_in), .vme_d_out(vme.d_out), .vme_d_oe(vme.d_oe), .vme_dtack_n(vme.dtack_n),
    .lb_req, .lb_rsp);

  always #5 clk = ~clk;

  // register model behind the slave
  initial begin
    lb_rsp = '0;
    foreach (regs[i]) regs[i] = 16'(i * 3);
    forever begin
      @(posedge clk);
      lb_rsp.ack <= 1'b0;
      if (lb_req.valid && !lb_rsp.ack) begin
        int unsigned d;
        d = delay_max == 0 ? 0 : $urandom % (delay_max + 1);
        last_req = lb_req;
        n_req++;
        repeat (d) @(posedge clk);
        if (lb_req.we) regs[lb_req.addr] <= merge_bytes(regs[lb_req.addr], lb_req.wdata, lb_req.be);
        lb_rsp.rdata <= regs[lb_req.addr];
        lb_rsp.ack   <= 1'b1;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERROR %s at %0t", what, $time); end
  endtask

  initial begin
    bit ok;
    logic [15:0] rd;
    logic [7:0]  b;
    int unsigned n0;
    vme.idle();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // D16 write / read with an immediate ack
    vme.write16(16'h1120, 16'hBEEF, ok);
    check(ok, "D16 write acknowledged");
    check(last_req.we && last_req.addr == 7'h10 && last_req.be == 2'b11 && last_req.wdata == 16'hBEEF, "D16 write request");
    check(vme.last_latency <= 6, "DTACK* latency with immediate ack");
    vme.read16(16'h1120, rd, ok);
    check(ok && rd == 16'hBEEF, "D16 read");
    check(!last_req.we, "read request");
    // D8 even byte (most significant) and odd byte
    vme.write8(16'h1120, 8'h12, ok);
    check(ok && last_req.be == 2'b10, "D8 even byte strobe");
    vme.write8(16'h1121, 8'h34, ok);
    check(ok && last_req.be == 2'b01, "D8 odd byte strobe");
    vme.read16(16'h1120, rd, ok);
    check(rd == 16'h1234, "bytes landed in the right lanes");
    vme.read8(16'h1120, b, ok); check(ok && b == 8'h12, "D8 even read");
    vme.read8(16'h1121, b, ok); check(ok && b == 8'h34, "D8 odd read");
    // cycles that must not be answered
    n0 = n_req;
    vme.read32(16'h1120, rd, ok);  check(!ok, "D32 not answered");
    vme.read16(16'h1220, rd, ok);  check(!ok, "other base not answered");
    vme.cycle(16'h1120, 2'b00, 1'b0, 1'b1, 6'h39, 16'h0, rd, ok); check(!ok, "A24 modifier not answered");
    vme.iack_n = 1'b0;
    vme.read16(16'h1120, rd, ok);  check(!ok, "IACK cycle not answered");
    vme.iack_n = 1'b1;
    check(n_req == n0, "no local request for rejected cycles");
    vme.cycle(16'h1122, 2'b00, 1'b0, 1'b1, 6'h2D, 16'h0, rd, ok);
    check(ok && rd == 16'h0033, "supervisory A16 answered");
    // random traffic with a slow register model
    delay_max = 7;
    for (int i = 0; i < 200; i++) begin
      logic [6:0] a; logic [15:0] d;
      a = 7'($urandom); d = 16'($urandom);
      case ($urandom % 3)
        0: begin vme.write16({8'h11, a, 1'b0}, d, ok); check(ok, "random D16 write"); end
        1: begin vme.write8({8'h11, a, 1'b0}, d[15:8], ok); check(ok, "random D8E write"); end
        default: begin vme.write8({8'h11, a, 1'b1}, d[7:0], ok); check(ok, "random D8O write"); end
      endcase
      vme.read16({8'h11, a, 1'b0}, rd, ok);
      check(ok && rd == regs[a], "random read back");
    end
    sw_base = 8'h15;
    vme.read16(16'h1502, rd, ok);
    check(ok && rd == regs[1], "new switch setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

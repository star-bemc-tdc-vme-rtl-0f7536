// tb_channel_ram: writes random words at random {token, word} addresses of
// the full 1 Meg x 12 memory, then reads them all back (one-cycle latency)
// and compares with a reference kept in an associative array.
module tb_channel_ram;
  localparam int unsigned AW = 20;
  logic clk = 1'b0;
  logic en, we;
  logic [AW-1:0] addr;
  logic [11:0] wdata, rdata;
  int unsigned checks = 0, failures = 0;
  logic [11:0] ref_mem [logic [AW-1:0]];
  logic [AW-1:0] addrs [$];

  channel_ram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      if (i < 4) a = (i == 0) ? '0 : (i == 1) ? '1 : AW'(i * 256 + 163);
      @(negedge clk);
      en = 1; we = 1; addr = a; wdata = 12'($urandom);
      ref_mem[a] = wdata;
      if (!(addrs.size() > 0 && a inside {addrs})) addrs.push_back(a);
    end
    @(negedge clk); en = 0; we = 0;
    foreach (addrs[i]) begin
      @(negedge clk);
      en = 1; we = 0; addr = addrs[i];
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[addrs[i]]) begin
        failures++;
        $display("ERROR addr %h: got %h expected %h", addrs[i], rdata, ref_mem[addrs[i]]);
      end
    end
    // a read with en low must not change rdata
    begin
      logic [11:0] keep;
      keep = rdata;
      @(negedge clk); en = 0; addr = addrs[0];
      @(negedge clk);
      checks++;
      if (rdata !== keep) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

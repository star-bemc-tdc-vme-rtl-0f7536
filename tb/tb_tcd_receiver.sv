// tb_tcd_receiver: sends TCD words with random commands and tokens on an
// asynchronous strobe and checks the captured fields and that push pulses
// exactly once per word with a non-zero trigger command, within 4 clocks.
module tb_tcd_receiver;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tcd_strobe = 1'b0;
  logic [19:0] tcd_data = '0;
  logic [3:0] trg_cmd, daq_cmd;
  logic [11:0] token;
  logic push;
  int unsigned checks = 0, failures = 0, pushes = 0;

  tcd_receiver dut (.clk, .rst_n, .tcd_strobe, .tcd_data, .trg_cmd, .daq_cmd, .token, .push);

  always #5 clk = ~clk;
  always @(negedge clk) if (push) pushes++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERROR %s", what); end
  endtask

  initial begin
    int unsigned expected_pushes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [19:0] w;
      int unsigned p0, lat;
      w = 20'($urandom);
      if (i % 4 == 0) w[19:16] = 4'h0;          // no trigger on this crossing
      #3;                                      // strobe edge not aligned to clk
      tcd_data = w;
      tcd_strobe = 1'b1;
      p0 = pushes;
      lat = 0;
      while (lat < 6) begin
        @(posedge clk); lat++;
        if (trg_cmd == w[19:16] && daq_cmd == w[15:12] && token == w[11:0] && lat > 1) break;
      end
      @(posedge clk);
      check(trg_cmd == w[19:16] && daq_cmd == w[15:12] && token == w[11:0], "captured fields");
      check(lat <= 4, "capture latency");
      if (w[19:16] != 0) expected_pushes++;
      check(pushes - p0 == ((w[19:16] != 0) ? 1 : 0), "push count for word");
      tcd_strobe = 1'b0;
      repeat (3 + ($urandom % 3)) @(posedge clk);
    end
    check(pushes == expected_pushes, "total pushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

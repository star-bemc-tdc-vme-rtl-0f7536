// tb_trigger_fifo: random pushes and independent L2 / DAQ "next" strobes
// against two reference queues; checks both heads, empty/full flags, the
// last written entry, that a push into a full FIFO is dropped and sets the
// overflow flag.
module tb_trigger_fifo;
  import tdc_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, l2_next, daq_next;
  trig_entry_t push_entry, l2_head, daq_head, last_written;
  logic l2_empty, daq_empty, full, overflow;
  int unsigned checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  trig_entry_t q_l2 [$], q_daq [$], last_ref;
  bit ovf_ref;

  trigger_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

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
    push = 0; l2_next = 0; daq_next = 0; push_entry = '0; ovf_ref = 0; last_ref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int unsigned phase;
      phase = (i / 500) % 3;                     // 0: balanced, 1: fill up, 2: drain
      @(negedge clk);
      // compare state before this cycle's actions
      check(l2_empty == (q_l2.size() == 0), "l2_empty");
      check(daq_empty == (q_daq.size() == 0), "daq_empty");
      check(full == (q_l2.size() == DEPTH || q_daq.size() == DEPTH), "full");
      check(overflow == ovf_ref, "overflow");
      check(last_written == last_ref, "last_written");
      if (q_l2.size() > 0)  check(l2_head == q_l2[0], "l2_head");
      if (q_daq.size() > 0) check(daq_head == q_daq[0], "daq_head");
      if (full) n_full++;
      push       = ($urandom % 100) < (phase == 1 ? 80 : phase == 2 ? 10 : 40);
      push_entry = trig_entry_t'($urandom);
      l2_next    = ($urandom % 100) < (phase == 1 ? 10 : phase == 2 ? 80 : 40);
      daq_next   = ($urandom % 100) < (phase == 1 ? 20 : phase == 2 ? 60 : 40);
      // reference update: "next" acts on the state before this cycle's push
      begin
        int unsigned l2_pre, daq_pre;
        l2_pre = q_l2.size(); daq_pre = q_daq.size();
        if (push) begin
          if (l2_pre == DEPTH || daq_pre == DEPTH) begin ovf_ref = 1; n_ovf++; end
          else begin q_l2.push_back(push_entry); q_daq.push_back(push_entry); last_ref = push_entry; end
        end
        if (l2_next && l2_pre > 0)   void'(q_l2.pop_front());
        if (daq_next && daq_pre > 0) void'(q_daq.pop_front());
      end
    end
    check(n_full > 0, "FIFO reached full");
    check(n_ovf > 0, "overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tdc_crate: end-to-end test of the whole crate at its full size (one
// Output Card at 0x1000, five Input Cards at 0x1100..0x1500, 30 channels of
// 1 Meg x 12 memory), with no parameter changed.
//
// 1. Programs the FPGAs of every card with the host algorithm (PROGRAM
//    pulse, DONE/INIT check, INRX and IMUX / SCORE and GLMUX streams).
// 2. One event: the host points every channel's RXWRITE token at token T;
//    all 30 fiber receivers deliver 164 words (160 ADC values, 4 header
//    words) each. The TCD sends the trigger for T (and a non-trigger word).
// 3. The host reads token T from the DAQ side of the trigger FIFO, sets the
//    DAQ token of every channel to it and reads the 164 words of every
//    channel into the HOLD buffers, which are compared with what was sent.
//    Channel 0 of card 0 is also read back through the TEST path and
//    rewritten through the TEST path, and the L2 side reads that.
// 4. Bus rules: D8 even/odd, D32 rejected, an address no card owns.
// 5. The trigger FIFO is run to full and overflow, and both sides drained.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_tdc_crate;
  import tdc_pkg::*;
  localparam int unsigned NC = 5, NCH = 6, NW = 164, BITS = 32;
  localparam logic [15:0] OB = 16'h1000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0][7:0] in_sw_base;
  logic [NC-1:0][NCH-1:0] rx_valid, hold_valid, hold_src;
  logic [NC-1:0][NCH-1:0][11:0] rx_data, hold_data;
  logic [NC-1:0][7:0] in_fpga_cclk, in_fpga_din, in_fpga_program_n, in_fpga_done, in_fpga_init;
  logic tcd_strobe = 1'b0, daq_busy = 1'b0;
  logic [19:0] tcd_data = '0;
  logic [1:0] out_fpga_cclk, out_fpga_din, out_fpga_program_n, out_fpga_done, out_fpga_init;
  int unsigned checks = 0, failures = 0;

  // mechanism counters
  int unsigned n_d16 = 0, n_d8e = 0, n_d8o = 0, n_d32_rej = 0, n_nocard = 0;
  int unsigned n_prog_pulse = 0, n_cclk = 0, n_rx_words = 0, n_rx_wait = 0;
  int unsigned n_test_wr = 0, n_test_rd = 0, n_hold_daq = 0, n_hold_l2 = 0;
  int unsigned n_trig = 0, n_notrig = 0, n_l2_next = 0, n_daq_next = 0, n_full = 0, n_ovf = 0;

  vme_master_if vme (clk);

  tdc_crate dut (
    .clk, .rst_n,
    .vme_addr(vme.addr), .vme_am(vme.am), .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n),
    .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n), .vme_iack_n(vme.iack_n),
    .vme_d_in(vme.d_in), .vme_d_out(vme.d_out), .vme_d_oe(vme.d_oe), .vme_dtack_n(vme.dtack_n),
    .out_sw_base(8'h10), .in_sw_base,
    .rx_valid, .rx_data, .hold_valid, .hold_src, .hold_data,
    .in_fpga_cclk, .in_fpga_din, .in_fpga_program_n, .in_fpga_done, .in_fpga_init,
    .tcd_strobe, .tcd_data, .daq_busy,
    .out_fpga_cclk, .out_fpga_din, .out_fpga_program_n, .out_fpga_done, .out_fpga_init);

  for (genvar n = 0; n < NC; n++) begin : g_card
    assign in_sw_base[n] = 8'h11 + 8'(n);
    for (genvar i = 0; i < 8; i++) begin : g_fpga
      xc4000_config_model #(.CONFIG_BITS(BITS)) u_fpga (
        .clk, .program_n(in_fpga_program_n[n][i]), .cclk(in_fpga_cclk[n][i]),
        .din(in_fpga_din[n][i]), .done(in_fpga_done[n][i]), .init(in_fpga_init[n][i]));
    end
  end
  for (genvar i = 0; i < 2; i++) begin : g_ofpga
    xc4000_config_model #(.CONFIG_BITS(BITS)) u_fpga (
      .clk, .program_n(out_fpga_program_n[i]), .cclk(out_fpga_cclk[i]), .din(out_fpga_din[i]),
      .done(out_fpga_done[i]), .init(out_fpga_init[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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
    if (a[0]) n_d8o++; else n_d8e++;
  endtask
  task automatic ww(input logic [15:0] a, input logic [15:0] d);
    bit ok; vme.write16(a, d, ok); check(ok, "word write acknowledged"); n_d16++;
  endtask
  task automatic rw(input logic [15:0] a, output logic [15:0] d);
    bit ok; vme.read16(a, d, ok); check(ok, "word read acknowledged"); n_d16++;
  endtask
  task automatic rb(input logic [15:0] a, output logic [7:0] d);
    bit ok; vme.read8(a, d, ok); check(ok, "byte read acknowledged");
    if (a[0]) n_d8o++; else n_d8e++;
  endtask

  function automatic logic [15:0] ib(input int unsigned card);
    return 16'h1100 + 16'(card * 256);
  endfunction
  function automatic logic [15:0] bc(input int unsigned card, input int unsigned ch, input int unsigned off);
    return ib(card) + 16'(ch * 32 + off);
  endfunction

  // count CCLK pulses and PROGRAM pulses on all FPGAs
  logic [NC-1:0][7:0] cclk_q;
  always @(posedge clk) begin
    cclk_q <= in_fpga_cclk;
    for (int n = 0; n < NC; n++)
      for (int i = 0; i < 8; i++)
        if (rst_n && in_fpga_cclk[n][i] && !cclk_q[n][i]) n_cclk++;
  end
  always @(negedge in_fpga_program_n[0][0]) n_prog_pulse++;

  // HOLD buffer monitor: expected words per channel in order
  logic [11:0] exp_q [NC][NCH][$];
  always @(posedge clk) begin
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++)
        if (rst_n && hold_valid[n][c]) begin
          if (hold_src[n][c]) n_hold_l2++; else n_hold_daq++;
          checks++;
          if (exp_q[n][c].size() == 0 || hold_data[n][c] != exp_q[n][c][0]) begin
            failures++;
            $display("ERROR HOLD card %0d ch %0d got %h expected %h left %0d", n, c, hold_data[n][c], exp_q[n][c].size() ? exp_q[n][c][0] : 12'h0, exp_q[n][c].size());
          end
          if (exp_q[n][c].size() > 0) void'(exp_q[n][c].pop_front());
        end
  end

  // fiber event generator: 164 words per channel, gaps at random
  logic [11:0] ev [NC][NCH][NW];
  int unsigned rx_idx [NC][NCH];
  bit rx_on = 0;
  always @(posedge clk) begin
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++) begin
        if (rx_valid[n][c]) n_rx_words++;
        if (rx_on && rx_idx[n][c] < NW && ($urandom % 4) != 0) begin
          rx_valid[n][c] <= 1'b1;
          rx_data[n][c]  <= ev[n][c][rx_idx[n][c]];
          rx_idx[n][c]   <= rx_idx[n][c] + 1;
        end else rx_valid[n][c] <= 1'b0;
      end
  end

  task automatic tcd_send(input logic [3:0] trg, input logic [3:0] daq, input logic [11:0] tok);
    tcd_data = {trg, daq, tok};
    tcd_strobe = 1'b1;
    repeat (5) @(posedge clk);
    tcd_strobe = 1'b0;
    repeat (5) @(posedge clk);
    if (trg != 0) n_trig++; else n_notrig++;
  endtask

  task automatic send_byte(input logic [15:0] data_reg, input logic [7:0] v);
    for (int i = 0; i < 8; i++) wb(data_reg, v[i] ? 8'hFF : 8'h00);
  endtask

  task automatic program_card(input logic [15:0] mreg, input logic [15:0] preg,
                              input logic [15:0] dreg, input logic [7:0] all,
                              input logic [7:0] m1, input logic [7:0] m2);
    logic [7:0] b;
    wb(mreg, 8'h00);
    wb(preg, 8'h04);
    repeat (10) @(posedge clk);
    wb(preg, 8'h00);
    repeat (20) @(posedge clk);
    rb(mreg, b); check((b & all) == 8'h00, "DONE low after PROGRAM");
    rb(dreg, b); check((b & all) == all, "INIT high after PROGRAM");
    wb(mreg, m1);
    for (int k = 0; k < BITS / 8; k++) send_byte(dreg, 8'h11 * 8'(k + 1));
    wb(mreg, m2);
    for (int k = 0; k < BITS / 8; k++) send_byte(dreg, 8'h2D ^ 8'(k));
    repeat (4) @(posedge clk);
    rb(mreg, b); check((b & all) == all, "DONE high after programming");
    rb(dreg, b); check((b & all) == all, "INIT high after programming");
  endtask

  initial begin
    logic [15:0] rd, tok;
    logic [7:0]  b;
    bit ok;
    int unsigned lat;
    logic [11:0] T;
    vme.idle();
    rx_valid = '0; rx_data = '0;
    foreach (rx_idx[n, c]) rx_idx[n][c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // ---- 1. FPGA programming of all six cards
    program_card(OB + 16'hFD, OB + 16'hFC, OB + 16'hFF, 8'h03, 8'hFE, 8'hFD);
    for (int n = 0; n < NC; n++)
      program_card(ib(n) + 16'h1D, ib(n) + 16'h1C, ib(n) + 16'h1F, 8'h7F, 8'hC0, 8'h3F);

    // ---- 2. one event at token T into all 30 channels
    T = 12'hA5B;
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++) begin
        ww(bc(n, c, 6), {4'h0, T});
        for (int w = 0; w < NW; w++) ev[n][c][w] = (w < 4) ? 12'(T + w) : 12'($urandom);
      end
    rx_on = 1;
    tcd_send(4'h0, 4'h2, 12'h001);          // no trigger on this crossing
    tcd_send(4'h4, 4'h2, T);                // the trigger for the event
    // while the fibers deliver, use the TEST path of card 0 channel 0 on token 0x010
    ww(bc(0, 0, 0), 16'h0010);
    for (int w = 0; w < 40; w++) begin
      ww(bc(0, 0, 16'h10), 16'(w * 5));
      vme.write8(bc(0, 0, 16'h0E), 8'h00, ok); check(ok, "TEST write acknowledged");
      n_test_wr++;
      if (vme.last_latency > 7) n_rx_wait++;  // the RAM cycle waited for a fiber word
    end
    wait (rx_idx[NC-1][NCH-1] == NW && rx_idx[0][0] == NW);
    repeat (20) @(posedge clk);
    rx_on = 0;
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++) begin
        rw(bc(n, c, 16'h0E), rd);
        check(rd == NW, "RXWRITE counter = 164 after the event");
      end

    // ---- 3. readout driven by the trigger FIFO
    rw(OB + 16'h40, rd); check(rd[7:0] == 8'h42 && rd[8] == 1'b0, "trigger word, DAQ side not empty");
    rw(OB + 16'h4A, tok); check(tok == {4'h0, T}, "DAQ FIFO token = event token");
    rw(OB + 16'h4E, rd); check(rd == 16'h0042, "DAQ FIFO trigger word");
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++) begin
        ww(bc(n, c, 2), tok);
        for (int w = 0; w < NW; w++) begin
          exp_q[n][c].push_back(ev[n][c][w]);
          wb(bc(n, c, 16'h0A), 8'h00);
        end
        rw(bc(n, c, 16'h0A), rd); check(rd == NW, "DAQ word counter");
      end
    ww(OB + 16'h46, 16'h0); n_daq_next++;
    rw(OB + 16'h40, rd); check(rd[8] == 1'b1 && rd[9] == 1'b0, "DAQ side empty, L2 side not");
    // TEST path read-back of the words written during the event
    ww(bc(0, 0, 0), 16'h0010);
    for (int w = 0; w < 40; w++) begin
      wb(bc(0, 0, 8), 8'h00); n_test_rd++;
      rw(bc(0, 0, 16'h10), rd); check(rd == 16'(w * 5), "TEST read-back");
    end
    // TEST path overwrite of the event's header word 0, then L2 readout
    ww(bc(0, 0, 0), tok);
    ww(bc(0, 0, 16'h10), 16'h0FED);
    wb(bc(0, 0, 16'h0E), 8'h00); n_test_wr++;
    rw(OB + 16'h48, rd); check(rd == tok, "L2 FIFO token");
    ww(bc(0, 0, 4), rd);
    exp_q[0][0].push_back(12'hFED);
    for (int w = 1; w < 4; w++) exp_q[0][0].push_back(ev[0][0][w]);
    for (int w = 0; w < 4; w++) wb(bc(0, 0, 16'h0C), 8'h00);
    ww(OB + 16'h44, 16'h0); n_l2_next++;
    repeat (4) @(posedge clk);
    for (int n = 0; n < NC; n++)
      for (int c = 0; c < NCH; c++) check(exp_q[n][c].size() == 0, "all expected HOLD words seen");

    // ---- 4. bus rules
    vme.read32(bc(1, 0, 0), rd, ok); check(!ok, "D32 not answered"); n_d32_rej++;
    vme.read16(16'h1600, rd, ok);    check(!ok, "no card at 0x1600"); n_nocard++;
    rb(16'h1001, b); check(b == 8'h56, "ID 'V' on the odd byte");
    rb(16'h1000, b); check(b == 8'h00, "ID even byte 0");
    wb(bc(3, 5, 0), 8'h0C); wb(bc(3, 5, 1), 8'h34);
    rw(bc(3, 5, 0), rd); check(rd == 16'h0C34, "D8 even and odd bytes of a token register");

    // ---- 5. trigger FIFO to full and overflow, then drain both sides
    for (int i = 0; i < 17; i++) tcd_send(4'h8, 4'h1, 12'(i));
    rw(OB + 16'h40, rd); check(rd[10] && rd[11], "FIFO full and overflow");
    if (rd[10]) n_full++;
    if (rd[11]) n_ovf++;
    for (int i = 0; i < 16; i++) begin
      rw(OB + 16'h48, rd); check(rd == 16'(i), "L2 side order");
      rw(OB + 16'h4A, rd); check(rd == 16'(i), "DAQ side order");
      ww(OB + 16'h44, 16'h0); n_l2_next++;
      ww(OB + 16'h46, 16'h0); n_daq_next++;
    end
    rw(OB + 16'h40, rd); check(rd[8] && rd[9] && !rd[10], "both sides empty");

    // ---- mechanism coverage
    $display("D16 %0d D8E %0d D8O %0d D32-rejected %0d no-card %0d", n_d16, n_d8e, n_d8o, n_d32_rej, n_nocard);
    $display("PROGRAM pulses %0d CCLK %0d fiber words %0d host-waits-for-fiber %0d", n_prog_pulse, n_cclk, n_rx_words, n_rx_wait);
    $display("TEST writes %0d TEST reads %0d HOLD DAQ %0d HOLD L2 %0d", n_test_wr, n_test_rd, n_hold_daq, n_hold_l2);
    $display("triggers %0d non-triggers %0d L2 next %0d DAQ next %0d full %0d overflow %0d", n_trig, n_notrig, n_l2_next, n_daq_next, n_full, n_ovf);
    check(n_d16 > 0 && n_d8e > 0 && n_d8o > 0, "D16 and D8 even/odd cycles");
    check(n_d32_rej > 0 && n_nocard > 0, "rejected cycles");
    check(n_prog_pulse > 0 && n_cclk > 0, "FPGA programming");
    check(n_rx_words == NC * NCH * NW, "fiber words written");
    check(n_rx_wait > 0, "host RAM cycle waited for the fiber");
    check(n_test_wr > 0 && n_test_rd > 0, "TEST path");
    check(n_hold_daq == NC * NCH * NW && n_hold_l2 == 4, "HOLD loads");
    check(n_trig > 0 && n_notrig > 0 && n_l2_next > 0 && n_daq_next > 0, "trigger FIFO");
    check(n_full > 0 && n_ovf > 0, "FIFO full and overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_inrx_channel: exercises one channel's register set through its local
// bus. Follows the host algorithms of the card: set the TEST token (counter
// cleared), then 164 times "write TEST buffer, write RAM @ TEST" and read
// them back 164 times "read RAM @ TEST, read TEST buffer". Fiber words are
// written at the RXWRITE token while the host works, sometimes in the same
// cycles (the host access must wait). DAQ and L2 reads load the HOLD buffer.
// A reference memory checks all data; counters, 12-bit masking, byte
// writes and register latencies are checked too, and the word counter
// wrapping at 256 inside the last token (0xFFF).
module tb_inrx_channel;
  import tdc_pkg::*;
  localparam int unsigned TB = 12, WB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  logic rx_valid;
  logic [11:0] rx_data;
  logic hold_valid, hold_src;
  logic [11:0] hold_data;
  int unsigned checks = 0, failures = 0, rx_words = 0, rx_conflicts = 0, holds = 0;
  logic [11:0] ref_mem [logic [19:0]];
  logic [11:0] rx_tok_ref;
  logic [7:0]  rx_cnt_ref;
  bit          rx_on;

  inrx_channel #(.TOKEN_BITS(TB), .WORD_BITS(WB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERROR %s at %0t", what, $time); end
  endtask

  // fiber stream generator: random words while rx_on
  always @(negedge clk) begin
    if (rx_on && ($urandom % 100) < 30) begin
      rx_valid = 1'b1;
      rx_data  = 12'($urandom);
      ref_mem[{rx_tok_ref, rx_cnt_ref}] = rx_data;
      rx_cnt_ref++;
      rx_words++;
    end else rx_valid = 1'b0;
  end

  task automatic access(input logic [3:0] r, input logic we, input logic [1:0] be,
                        input logic [15:0] wd, output logic [15:0] rd, output int unsigned lat);
    @(negedge clk);
    sel = 1'b1;
    lb_req = '{valid: 1'b1, we: we, addr: {3'b010, r}, be: be, wdata: wd};
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!lb_rsp.ack && lat < 100);
    check(lb_rsp.ack, "ack seen");
    rd = lb_rsp.rdata;
    if (we && r inside {[4'h4:4'h7]} && lat > 3) rx_conflicts++;   // RAM cycle waited
    @(negedge clk);
    lb_req.valid = 1'b0; sel = 1'b0;
  endtask

  task automatic wr(input logic [3:0] r, input logic [15:0] d);
    logic [15:0] rd; int unsigned lat;
    access(r, 1'b1, 2'b11, d, rd, lat);
  endtask
  task automatic rdw(input logic [3:0] r, output logic [15:0] d);
    int unsigned lat;
    access(r, 1'b0, 2'b11, 16'h0, d, lat);
    check(lat == 1, "register read latency 1");
  endtask

  initial begin
    logic [15:0] rd;
    int unsigned lat;
    logic [11:0] tok, data [164];
    sel = 0; lb_req = '0; rx_on = 0; rx_valid = 0; rx_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // token registers are plain 12-bit read/write registers
    wr(CH_TEST_TOKEN, 16'hF123); rdw(CH_TEST_TOKEN, rd); check(rd == 16'h0123, "TEST token, upper 4 bits dropped");
    wr(CH_DAQ_TOKEN,  16'h0456); rdw(CH_DAQ_TOKEN,  rd); check(rd == 16'h0456, "DAQ token");
    wr(CH_L2_TOKEN,   16'h0789); rdw(CH_L2_TOKEN,   rd); check(rd == 16'h0789, "L2 token");
    // byte writes
    access(CH_L2_TOKEN, 1'b1, 2'b01, 16'h00AB, rd, lat);
    rdw(CH_L2_TOKEN, rd); check(rd == 16'h07AB, "odd byte write");
    access(CH_L2_TOKEN, 1'b1, 2'b10, 16'h0C00, rd, lat);
    rdw(CH_L2_TOKEN, rd); check(rd == 16'h0CAB, "even byte write");
    wr(CH_TEST_BUF, 16'hABCD); rdw(CH_TEST_BUF, rd); check(rd == 16'h0BCD, "TEST buffer");
    // fiber stream at RXWRITE token 0x2A5 while the host runs the algorithms
    rx_tok_ref = 12'h2A5; rx_cnt_ref = 0;
    wr(CH_RXW_TOKEN, 16'h02A5);
    rdw(CH_RXW_COUNT, rd); check(rd == 16'h0000, "RXWRITE counter cleared by token write");
    rx_on = 1;
    // write 164 values at token tok
    tok = 12'h5C3;
    wr(CH_TEST_TOKEN, {4'h0, tok});
    rdw(CH_TEST_COUNT, rd); check(rd == 0, "TEST counter cleared");
    for (int i = 0; i < 164; i++) begin
      data[i] = 12'($urandom);
      wr(CH_TEST_BUF, {4'h0, data[i]});
      access(CH_RXW_COUNT, 1'b1, 2'b01, 16'h0000, rd, lat);   // byte write triggers too
      check(lat >= 3, "RAM cycle: ack 3 clk after request when the RAM is free");
      ref_mem[{tok, 8'(i)}] = data[i];
    end
    rdw(CH_TEST_COUNT, rd); check(rd == 164, "TEST counter after 164 writes");
    // read them back
    wr(CH_TEST_TOKEN, {4'h0, tok});
    for (int i = 0; i < 164; i++) begin
      access(CH_TEST_COUNT, 1'b1, 2'b01, 16'h0000, rd, lat);
      rdw(CH_TEST_BUF, rd);
      check(rd == {4'h0, data[i]}, "TEST read-back");
    end
    rx_on = 0;
    repeat (2) @(posedge clk);
    rdw(CH_RXW_COUNT, rd); check(rd == {4'h0, rx_cnt_ref}, "RXWRITE counter = words received");
    check(rx_words > 20, "fiber words were written");
    // read the received words through the TEST path
    wr(CH_TEST_TOKEN, 16'h02A5);
    for (int i = 0; i < int'(rx_cnt_ref) && i < 64; i++) begin
      access(CH_TEST_COUNT, 1'b1, 2'b11, 16'h0000, rd, lat);
      rdw(CH_TEST_BUF, rd);
      check(rd[11:0] == ref_mem[{12'h2A5, 8'(i)}], "received word in RAM");
    end
    // DAQ and L2 reads into the HOLD buffer
    wr(CH_DAQ_TOKEN, {4'h0, tok});
    wr(CH_L2_TOKEN, 16'h02A5);
    for (int i = 0; i < 10; i++) begin
      fork
        access(CH_DAQ_COUNT, 1'b1, 2'b11, 16'h0, rd, lat);
        begin
          @(posedge hold_valid); #1;
          holds++;
          check(hold_src == 1'b0 && hold_data == data[i], "DAQ read into HOLD");
        end
      join
      fork
        access(CH_L2_COUNT, 1'b1, 2'b11, 16'h0, rd, lat);
        begin
          @(posedge hold_valid); #1;
          holds++;
          check(hold_src == 1'b1 && hold_data == ref_mem[{12'h2A5, 8'(i)}], "L2 read into HOLD");
        end
      join
    end
    rdw(CH_DAQ_COUNT, rd); check(rd == 10, "DAQ counter");
    rdw(CH_L2_COUNT, rd);  check(rd == 10, "L2 counter");
    rdw(CH_TEST_TOKEN, rd); check(rd == 16'h02A5, "TEST token kept");
    rdw(4'h9, rd); check(rd == 0, "unused register reads 0");
    check(rx_conflicts > 0, "a host RAM cycle had to wait for a fiber word");
    // the last token: 300 TEST writes wrap the word counter inside token 0xFFF
    wr(CH_TEST_TOKEN, 16'h0FFF);
    for (int i = 0; i < 300; i++) begin
      wr(CH_TEST_BUF, 16'(i));
      wr(CH_RXW_COUNT, 16'h0);
    end
    rdw(CH_TEST_COUNT, rd); check(rd == 16'(300 - 256), "TEST counter wrapped at 256");
    wr(CH_TEST_TOKEN, 16'h0FFF);
    for (int i = 0; i < 256; i++) begin
      wr(CH_TEST_COUNT, 16'h0);
      rdw(CH_TEST_BUF, rd);
      check(rd == 16'(i < 44 ? i + 256 : i), "token 0xFFF word after wrap");
    end
    wr(CH_TEST_TOKEN, {4'h0, tok});
    wr(CH_TEST_COUNT, 16'h0);
    rdw(CH_TEST_BUF, rd);
    check(rd == {4'h0, data[0]}, "other tokens untouched by the wrap");
    $display("rx words %0d, conflicts %0d, hold loads %0d", rx_words, rx_conflicts, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

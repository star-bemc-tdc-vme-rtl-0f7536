// vme_master_if: VME A16 bus master used by the testbenches.
//
// Carries the slave-side VME signals of a TDC card or crate and provides
// tasks for D16 word, D8 even/odd byte and (rejected) D32 cycles. A cycle
// that sees no DTACK* within TIMEOUT clocks ends as a bus error (ok = 0).
// Counts the clocks from data strobe to DTACK* of the last cycle.
interface vme_master_if (input logic clk);
  logic [15:1] addr;
  logic [5:0]  am;
  logic        as_n;
  logic [1:0]  ds_n;
  logic        write_n;
  logic        lword_n;
  logic        iack_n;
  logic [15:0] d_in;     // master -> card
  logic [15:0] d_out;    // card -> master
  logic        d_oe;
  logic        dtack_n;

  int unsigned last_latency;
  localparam int unsigned TIMEOUT = 200;

  task automatic idle();
    addr = '0; am = 6'h29; as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1;
    lword_n = 1'b1; iack_n = 1'b1; d_in = '0;
  endtask

  // generic cycle: byte address a (bit 0 picks the D8 byte), strobes ds
  task automatic cycle(input logic [15:0] a, input logic [1:0] ds, input logic wr,
                       input logic lw, input logic [5:0] m, input logic [15:0] wd,
                       output logic [15:0] rd, output bit ok);
    int unsigned n;
    @(posedge clk);
    addr = a[15:1]; am = m; lword_n = lw; write_n = !wr; d_in = wr ? wd : 16'h0;
    @(posedge clk);
    as_n = 1'b0;
    @(posedge clk);
    ds_n = ds;
    n = 0; ok = 1'b0; rd = '0;
    while (n < TIMEOUT) begin
      @(posedge clk);
      n++;
      if (!dtack_n) begin ok = 1'b1; break; end
    end
    last_latency = n;
    if (ok && !wr) rd = d_out;
    ds_n = 2'b11;
    n = 0;
    while (!dtack_n && n < TIMEOUT) begin @(posedge clk); n++; end
    as_n = 1'b1; write_n = 1'b1; lword_n = 1'b1;
    @(posedge clk);
  endtask

  task automatic write16(input logic [15:0] a, input logic [15:0] d, output bit ok);
    logic [15:0] rd;
    cycle(a, 2'b00, 1'b1, 1'b1, 6'h29, d, rd, ok);
  endtask

  task automatic read16(input logic [15:0] a, output logic [15:0] d, output bit ok);
    cycle(a, 2'b00, 1'b0, 1'b1, 6'h29, 16'h0, d, ok);
  endtask

  // D8(EO): even byte address = D15..D8 (DS1*), odd = D7..D0 (DS0*)
  task automatic write8(input logic [15:0] a, input logic [7:0] d, output bit ok);
    logic [15:0] rd;
    if (a[0]) cycle(a, 2'b10, 1'b1, 1'b1, 6'h29, {8'h00, d}, rd, ok);
    else      cycle(a, 2'b01, 1'b1, 1'b1, 6'h29, {d, 8'h00}, rd, ok);
  endtask

  task automatic read8(input logic [15:0] a, output logic [7:0] d, output bit ok);
    logic [15:0] rd;
    if (a[0]) begin cycle(a, 2'b10, 1'b0, 1'b1, 6'h29, 16'h0, rd, ok); d = rd[7:0];  end
    else      begin cycle(a, 2'b01, 1'b0, 1'b1, 6'h29, 16'h0, rd, ok); d = rd[15:8]; end
  endtask

  task automatic read32(input logic [15:0] a, output logic [15:0] d, output bit ok);
    cycle(a, 2'b00, 1'b0, 1'b0, 6'h29, 16'h0, d, ok);
  endtask
endinterface

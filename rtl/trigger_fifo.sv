// trigger_fifo: trigger FIFO of the TDC Output Card with L2 and DAQ sides.
//
// Every trigger (trigger command, DAQ command, token number) is written
// once and read by two independent consumers: the L2 side and the DAQ side
// each have their own read pointer, advanced by the host's "FIFO L2 next"
// and "FIFO DAQ next" writes. The head entry of each side, and the entry
// last written, are always visible. One write pointer and two read pointers
// over one store follow the card's register set; the depth, the behaviour
// when full and on an empty "next" are this design's choices: a push while
// either side still holds DEPTH entries is dropped and sets the sticky
// overflow flag (cleared by reset); "next" on an empty side does nothing.
//
// Timing: push, l2_next and daq_next act at the clock edge; heads and flags
// are registered/combinational from the pointers and valid the next cycle.
module trigger_fifo
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  trig_entry_t push_entry,
  input  logic        l2_next,
  input  logic        daq_next,
  output trig_entry_t l2_head,
  output trig_entry_t daq_head,
  output trig_entry_t last_written,
  output logic        l2_empty,
  output logic        daq_empty,
  output logic        full,
  output logic        overflow
);

  localparam int unsigned PW = $clog2(DEPTH);

  trig_entry_t   store [DEPTH];
  logic [PW:0]   wr_ptr, l2_ptr, daq_ptr;
  logic [PW:0]   l2_count, daq_count;

  assign l2_count  = wr_ptr - l2_ptr;
  assign daq_count = wr_ptr - daq_ptr;
  assign l2_empty  = (l2_count  == '0);
  assign daq_empty = (daq_count == '0);
  assign full      = (l2_count == (PW+1)'(DEPTH)) || (daq_count == (PW+1)'(DEPTH));

  assign l2_head   = store[l2_ptr[PW-1:0]];
  assign daq_head  = store[daq_ptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) store[wr_ptr[PW-1:0]] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      l2_ptr       <= '0;
      daq_ptr      <= '0;
      overflow     <= 1'b0;
      last_written <= '0;
    end else begin
      if (push) begin
        if (full) overflow <= 1'b1;
        else begin
          wr_ptr       <= wr_ptr + 1'b1;
          last_written <= push_entry;
        end
      end
      if (l2_next  && !l2_empty)  l2_ptr  <= l2_ptr  + 1'b1;
      if (daq_next && !daq_empty) daq_ptr <= daq_ptr + 1'b1;
    end
  end

  a_l2_bound:  assert property (@(posedge clk) disable iff (!rst_n) l2_count  <= (PW+1)'(DEPTH));
  a_daq_bound: assert property (@(posedge clk) disable iff (!rst_n) daq_count <= (PW+1)'(DEPTH));

endmodule

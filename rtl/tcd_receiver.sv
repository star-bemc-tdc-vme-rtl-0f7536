// tcd_receiver: trigger input of the TDC Output Card.
//
// The Output Card receives the STAR trigger on a 20-pin ribbon cable from a
// TCD. This design reads the 20 data lines as trigger command [19:16],
// DAQ command [15:12] and token number [11:0], valid at the rising edge of
// tcd_strobe; that layout, and treating every word with a non-zero trigger
// command as a trigger, are this design's assumptions.
//
// tcd_strobe is synchronised by two flip-flops; on its synchronised rising
// edge the data lines are captured into trg_cmd/daq_cmd/token (the "last
// word seen" registers) and, for a trigger, push pulses for one clk in the
// same cycle as the new values appear. The data must be stable from the
// strobe edge until it has been sampled (3 clk).
module tcd_receiver
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tcd_strobe,
  input  logic [19:0] tcd_data,
  output logic [3:0]  trg_cmd,
  output logic [3:0]  daq_cmd,
  output logic [11:0] token,
  output logic        push
);

  logic [2:0] strobe_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_sync <= '0;
      trg_cmd     <= '0;
      daq_cmd     <= '0;
      token       <= '0;
      push        <= 1'b0;
    end else begin
      strobe_sync <= {strobe_sync[1:0], tcd_strobe};
      push        <= 1'b0;
      if (strobe_sync[1] && !strobe_sync[2]) begin
        trg_cmd <= tcd_data[19:16];
        daq_cmd <= tcd_data[15:12];
        token   <= tcd_data[11:0];
        push    <= (tcd_data[19:16] != 4'h0);
      end
    end
  end

endmodule

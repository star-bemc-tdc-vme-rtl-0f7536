// xc4000_config_model: behavioural model of the slave-serial configuration
// pins of one Xilinx XC4000XL FPGA, for testbenches only.
//
// PROGRAM* low clears the device: DONE and INIT go low. INIT returns high
// CLEAR_CYCLES clocks after PROGRAM* is released; from then on every rising
// CCLK shifts in one DIN bit. When CONFIG_BITS bits have been received DONE
// goes high. The bit stream is also kept as a checksum (sum of the bits
// weighted by position) so a testbench can see what was loaded.
module xc4000_config_model #(
  parameter int unsigned CONFIG_BITS  = 64,
  parameter int unsigned CLEAR_CYCLES = 8
) (
  input  logic clk,
  input  logic program_n,
  input  logic cclk,
  input  logic din,
  output logic done,
  output logic init
);
  int unsigned nbits, clr;
  logic        cclk_q;
  longint unsigned checksum;

  initial begin
    done = 1'b0; init = 1'b1; nbits = 0; clr = 0; cclk_q = 1'b0; checksum = 0;
  end

  always @(posedge clk) begin
    cclk_q <= cclk;
    if (!program_n) begin
      done <= 1'b0; init <= 1'b0; nbits <= 0; clr <= 0; checksum <= 0;
    end else if (!init) begin
      clr <= clr + 1;
      if (clr + 1 >= CLEAR_CYCLES) init <= 1'b1;
    end else if (!done && cclk && !cclk_q) begin
      checksum <= checksum + (longint'(din) << (nbits % 32));
      nbits    <= nbits + 1;
      if (nbits + 1 >= CONFIG_BITS) done <= 1'b1;
    end
  end
endmodule

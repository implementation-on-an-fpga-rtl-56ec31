// amv: absolute mean value of one EMG segment, AMV = (1/N) * sum |x_i|.
//
// A 17-bit register accumulates the magnitude of every 11-bit sample for
// which count_i is high; start_i (high with the first sample of a segment)
// makes the register load |x_1| instead of adding to the old sum. The sum is
// divided by the constant N. The output multiplexer shows the quotient while
// end_i is high and zero otherwise, so amv_o is valid in the cycle of the
// segment controller's end pulse. N = 50 samples of at most 1024 give at most
// 51200, which the 17-bit accumulator holds.
//
// From the source design: the 11-bit sample input, the 17-bit accumulator,
// quotient and output, the division by 50 and the output multiplexer with
// zero. Taking the magnitude before the adder follows the defining equation;
// using count_i as a clock enable (instead of a clock) and the start_i clear
// are this design's choices.
module amv
  import emg_pkg::*;
#(
  parameter int unsigned N     = SEG_LEN,
  parameter int unsigned ACC_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic             count_i,
  input  logic             end_i,
  input  sample_t          data_signal_i,
  output logic [ACC_W-1:0] amv_o
);

  logic [SAMP_W-1:0] mag;
  logic [ACC_W-1:0]  acc;
  logic [ACC_W-1:0]  quot;

  always_comb begin
    mag  = data_signal_i[SAMP_W-1] ? SAMP_W'(-data_signal_i) : SAMP_W'(data_signal_i);
    quot = acc / ACC_W'(N);
    amv_o = end_i ? quot : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (count_i) acc <= (start_i ? '0 : acc) + ACC_W'(mag);
  end

endmodule

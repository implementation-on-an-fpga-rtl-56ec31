// wl: waveform length of one EMG segment, WL = sum |x_i - x_(i-1)|.
//
// A previous-sample register holds x_(i-1): it loads every sample of the
// stream (sample_valid_i), so the first sample of a segment is compared with
// the sample just before it. For each sample with count_i high the absolute
// difference is added to the W-bit accumulator; start_i (high with the first
// sample) makes it load that difference instead. The sum saturates at
// 2^W - 1 rather than wrapping. The output multiplexer shows the sum while
// end_i is high and zero otherwise.
//
// From the source design: the subtractor fed by the input and by the
// previous-sample register, the accumulator register, the output multiplexer
// with zero, and the 11-bit width of every path. Taking the magnitude of the
// difference follows the defining equation. Saturation (50 differences of up
// to 2047 do not fit 11 bits), the start_i clear and updating the
// previous-sample register on every stream sample are this design's choices.
module wl
  import emg_pkg::*;
#(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_valid_i,
  input  logic         start_i,
  input  logic         count_i,
  input  logic         end_i,
  input  sample_t      data_signal_i,
  output logic [W-1:0] wl_o
);

  sample_t             x_prev;
  logic signed [SAMP_W:0] diff;
  logic [SAMP_W:0]     mag;
  logic [W:0]          sum;
  logic [W-1:0]        acc;
  logic [W-1:0]        base;

  always_comb begin
    diff = (SAMP_W+1)'(data_signal_i) - (SAMP_W+1)'(x_prev);
    mag  = diff[SAMP_W] ? (SAMP_W+1)'(-diff) : (SAMP_W+1)'(diff);
    base = start_i ? '0 : acc;
    if (mag > (SAMP_W+1)'({W{1'b1}}))
      sum = {1'b0, {W{1'b1}}} + {1'b0, base};
    else
      sum = (W+1)'(mag) + {1'b0, base};
    wl_o = end_i ? acc : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= '0;
      acc    <= '0;
    end else begin
      if (sample_valid_i) x_prev <= data_signal_i;
      if (count_i)        acc    <= sum[W] ? {W{1'b1}} : sum[W-1:0];
    end
  end

endmodule

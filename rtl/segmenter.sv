// segmenter: movement detection and segmentation of the filtered EMG stream.
//
// The controller follows the sample capture flow of the source design. While
// idle it compares every new sample x[n] with the previous one x[n-1]: equal
// samples, or a rise of no more than THRESHOLD, keep it waiting. A rise of
// more than THRESHOLD (x[n] - x[n-1] > THRESHOLD) marks the start of a
// movement; that sample is the first of the segment, and SEG_LEN samples in
// all are captured. After the last one the segment is closed and the
// controller waits for the next movement.
//
// Interface, all in the clk domain: valid_i/x_i carry one filtered sample per
// strobe. count_o is high in the same cycle as valid_i for every sample that
// belongs to a segment (it is the accumulate enable of the feature units);
// start_o is high together with count_o for the first sample of a segment;
// end_o is a one-cycle pulse in the cycle after the last counted sample.
// in_seg_o is high while a segment is open. count_o and start_o are Mealy
// outputs, so the feature units see the sample without delay.
//
// From the source design: the two comparisons and the 50-sample segment. The
// threshold value is not given; THRESHOLD is this design's choice, in units
// of the 11-bit sample.
module segmenter
  import emg_pkg::*;
#(
  parameter int unsigned SEG_N     = SEG_LEN,
  parameter int          THRESHOLD = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_i,
  input  sample_t x_i,
  output logic    count_o,
  output logic    start_o,
  output logic    end_o,
  output logic    in_seg_o
);

  localparam int unsigned CNT_W = $clog2(SEG_N + 1);

  typedef enum logic {S_WAIT, S_CAPTURE} state_t;

  state_t                   state;
  sample_t                  x_prev;
  logic [CNT_W-1:0]         n_cap;
  logic signed [SAMP_W:0]   diff;
  logic                     same, rise;

  always_comb begin
    diff = (SAMP_W+1)'(x_i) - (SAMP_W+1)'(x_prev);
    same = (x_i == x_prev);
    rise = !same && (diff > (SAMP_W+1)'(THRESHOLD));
  end

  assign start_o  = valid_i && (state == S_WAIT) && rise;
  assign count_o  = valid_i && ((state == S_CAPTURE) || rise && (state == S_WAIT));
  assign in_seg_o = (state == S_CAPTURE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_WAIT;
      x_prev <= '0;
      n_cap  <= '0;
      end_o  <= 1'b0;
    end else begin
      end_o <= 1'b0;
      if (valid_i) begin
        x_prev <= x_i;
        unique case (state)
          S_WAIT: begin
            if (rise) begin
              if (SEG_N == 1) begin
                end_o <= 1'b1;
              end else begin
                n_cap <= CNT_W'(1);
                state <= S_CAPTURE;
              end
            end
          end
          S_CAPTURE: begin
            if (n_cap == CNT_W'(SEG_N - 1)) begin
              n_cap <= '0;
              end_o <= 1'b1;
              state <= S_WAIT;
            end else begin
              n_cap <= n_cap + 1'b1;
            end
          end
          default: state <= S_WAIT;
        endcase
      end
    end
  end

endmodule

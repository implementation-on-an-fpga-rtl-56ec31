// fir_bandpass: FIR bandpass filter for the EMG samples, 22-bit fixed point.
//
// Each 10-bit ADC code is taken as an unsigned integer and stored in a
// TAPS-deep delay line in Q11.10 (1 sign, 11 integer, 10 fractional bits).
// The filter is a direct-form FIR computed by one multiply-accumulate unit:
// after a sample is accepted, TAPS cycles each add COEF[k] * x[n-k] to a
// full-precision accumulator, then the sum is rounded (half up) back to
// Q11.10, saturated to 22 bits and presented on y_o with a one-cycle
// out_valid_o pulse. Latency from in_valid_i to out_valid_o is TAPS+1 cycles;
// busy_o is high meanwhile and a new sample must not arrive before busy_o
// falls (at 1100 samples/s and any practical clk this holds by a wide margin).
//
// From the source design: a bandpass FIR with a Hamming window, 50-500 Hz
// band at 1100 samples/s, and the Q11.10 word for data and coefficients. This
// design's choices: the order (60), the single shared multiplier, rounding and
// saturation. The default taps are emg_pkg::FIR_COEF.
module fir_bandpass
  import emg_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int          COEF [TAPS] = FIR_COEF,
  parameter int unsigned IN_W = ADC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid_i,
  input  logic [IN_W-1:0] in_code_i,
  output logic            busy_o,
  output logic            out_valid_o,
  output q11_10_t         y_o
);

  localparam int unsigned IDX_W  = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(TAPS + 1);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_OUT} state_t;

  state_t                    state;
  q11_10_t                   xdl [TAPS];
  logic [IDX_W-1:0]          idx;
  logic signed [ACC_W-1:0]   acc;

  q11_10_t                   coef_k;
  logic signed [PROD_W-1:0]  prod;
  logic signed [ACC_W-1:0]   rounded;
  logic signed [ACC_W-1:0]   shifted;

  // Coefficient ROM read and the single multiplier
  always_comb begin
    coef_k = q11_10_t'(COEF[idx]);
    prod   = coef_k * xdl[idx];
  end

  // Round half up from Q.20 to Q.10, then saturate to the 22-bit word
  always_comb begin
    rounded = acc + (ACC_W'(1) <<< (FRAC_W - 1));
    shifted = rounded >>> FRAC_W;
  end

  function automatic q11_10_t sat22(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'({1'b0, {(DATA_W-1){1'b1}}})))
      return {1'b0, {(DATA_W-1){1'b1}}};
    else if (v < -(ACC_W'(1) <<< (DATA_W - 1)))
      return {1'b1, {(DATA_W-1){1'b0}}};
    else
      return v[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      idx         <= '0;
      acc         <= '0;
      out_valid_o <= 1'b0;
      y_o         <= '0;
      for (int k = 0; k < int'(TAPS); k++) xdl[k] <= '0;
    end else begin
      out_valid_o <= 1'b0;
      // A sample arriving while the MAC is running would be lost.
      if (in_valid_i)
        a_no_overrun: assert (state == S_IDLE)
          else $error("fir_bandpass: sample arrived while busy");
      unique case (state)
        S_IDLE: begin
          if (in_valid_i) begin
            xdl[0] <= q11_10_t'({in_code_i, FRAC_W'(0)});
            for (int k = 1; k < int'(TAPS); k++) xdl[k] <= xdl[k-1];
            idx   <= '0;
            acc   <= '0;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          acc <= acc + ACC_W'(prod);
          if (idx == IDX_W'(TAPS - 1)) state <= S_OUT;
          else                         idx   <= idx + 1'b1;
        end
        S_OUT: begin
          y_o         <= sat22(shifted);
          out_valid_o <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

endmodule

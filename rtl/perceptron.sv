// perceptron: simple perceptron that classifies a segment from its two
// features, followed by the step activation and the 1-to-2 label decoder.
//
//   y~ = AMV * w1 + WL * w2 + theta,   y^ = 1 if y~ > 0, else 0
//
// w1, w2 come from a two-word weight ROM and theta from a one-word bias ROM,
// all Q11.10. The 11-bit features are unsigned integers; each product is
// kept at full width (Q.10) and the sum is compared with zero, so nothing is
// lost before the decision. When valid_i is high (the segment controller's
// end pulse, with the features on amv_i and wl_i) the result is registered:
// one cycle later valid_o pulses, y_tilde_o and y_hat_o show the new values
// and label_o takes 01 (arm contraction) for y^ = 1 or 10 (wrist rotation)
// for y^ = 0. label_o holds until the next segment and drives the two LEDs
// (mov1_o = label_o[0], mov2_o = label_o[1]); it is 00 after reset.
//
// From the source design: the model, the step activation, the ROMs for
// weights and bias in 22-bit fixed point, the 11-bit feature inputs and the
// label code. The source labels the product and sum nets 11 bits wide; this
// design keeps them at full width instead. Which class y^ = 1 stands for is
// this design's choice (it makes contraction, the class with the larger WL
// in the source's training plot, the positive one). The default ROM contents
// (emg_pkg::PCP_WEIGHTS/PCP_BIAS, and the same words in the two .hex files)
// are an example model, w1 = 0.0625, w2 = 1.0, theta = -1024; real weights
// come from offline training.
module perceptron
  import emg_pkg::*;
#(
  parameter int unsigned FEAT_W      = SAMP_W,
  parameter string       WEIGHT_FILE = "rtl/perceptron_weights.hex",
  parameter string       BIAS_FILE   = "rtl/perceptron_bias.hex"
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [FEAT_W-1:0]   amv_i,
  input  logic [FEAT_W-1:0]   wl_i,
  output logic                valid_o,
  output logic signed [FEAT_W+DATA_W+1:0] y_tilde_o,
  output logic                y_hat_o,
  output label_t              label_o,
  output logic                mov1_o,
  output logic                mov2_o
);

  localparam int unsigned PROD_W = FEAT_W + 1 + DATA_W;
  localparam int unsigned SUM_W  = PROD_W + 1;

  logic [0:0]        w_addr [2];
  logic [DATA_W-1:0] w_data [2];
  logic [0:0]        b_addr [1];
  logic [DATA_W-1:0] b_data [1];

  assign w_addr[0] = 1'b0;
  assign w_addr[1] = 1'b1;
  assign b_addr[0] = 1'b0;

  param_rom #(.DEPTH(2), .WIDTH(DATA_W), .NPORTS(2), .INIT(PCP_WEIGHTS), .INIT_FILE(WEIGHT_FILE))
    u_weights (.addr_i(w_addr), .data_o(w_data));
  param_rom #(.DEPTH(1), .WIDTH(DATA_W), .NPORTS(1), .INIT(PCP_BIAS), .INIT_FILE(BIAS_FILE))
    u_bias    (.addr_i(b_addr), .data_o(b_data));

  logic signed [PROD_W-1:0] p_amv, p_wl;
  logic signed [SUM_W-1:0]  y_sum;
  logic                     y_pos;

  always_comb begin
    p_amv = $signed({1'b0, amv_i}) * $signed(w_data[0]);
    p_wl  = $signed({1'b0, wl_i})  * $signed(w_data[1]);
    y_sum = SUM_W'(p_amv) + SUM_W'(p_wl) + SUM_W'($signed(b_data[0]));
    y_pos = (y_sum > 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o   <= 1'b0;
      y_tilde_o <= '0;
      y_hat_o   <= 1'b0;
      label_o   <= LABEL_NONE;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        y_tilde_o <= y_sum;
        y_hat_o   <= y_pos;
        label_o   <= y_pos ? LABEL_CONTRACTION : LABEL_ROTATION;
      end
    end
  end

  assign mov1_o = label_o[0];
  assign mov2_o = label_o[1];

endmodule

// emg_classifier_top: FPGA part of an EMG movement classifier.
//
// The microcontroller digitises the conditioned electrode signal at 1100
// samples/s with 10 bits and shifts every sample into the FPGA. Inside, the
// samples pass through this chain, all in the clk domain and driven by
// one-cycle valid strobes:
//
//   serial_rx    serial-to-parallel register, one 10-bit code per frame
//   fir_bandpass 61-tap Hamming-window bandpass, 50-500 Hz, Q11.10 output
//                (integer part saturated to 11 bits for the feature path)
//   segmenter    waits for a rise above THRESHOLD, then opens a 50-sample
//                segment; count/start/end steer the feature units
//   amv, wl      absolute mean value and waveform length of the segment
//   perceptron   y~ = AMV*w1 + WL*w2 + theta, step activation, label
//                01 = arm contraction, 10 = wrist rotation, held on the LEDs
//   serial_tx    sends 24-bit frames back to the microcontroller
//
// Two operating modes, chosen by train_mode_i (synchronised here), follow
// the two stages of use. In classification mode the transmitter sends
// {label, AMV, WL} (2 + 11 + 11 bits, label first) after every classified
// segment. In training mode it sends every segment sample instead, as
// {00, sample, position in segment}, so that a host can collect the
// filtered and segmented signal and train the perceptron offline; the
// LEDs keep showing the classification in both modes. A frame that finds
// the transmitter busy is dropped and flagged on tx_drop_o: at 1100
// samples/s a 24-bit frame needs a serial clock above about 27 kHz.
//
// Timing: a filtered sample appears FIR_TAPS+1 cycles after its code is
// received; the label is updated one cycle after the end of a segment
// (end pulse one cycle after the 50th segment sample), and the result frame
// starts the cycle after that. The chain needs fewer than 70 cycles per
// sample, so any clk above about 100 kHz keeps up with 1100 samples/s.
//
// The chain of stages, the sample rate and word formats, the segment
// length, the two features and the perceptron follow the source design. The
// serial framing, the result frame, THRESHOLD and the default weights are
// this design's choices. AMV (17 bits) is saturated to the 11-bit perceptron
// input; with 11-bit samples it never exceeds 1024, so nothing is lost.
module emg_classifier_top
  import emg_pkg::*;
#(
  parameter int    THRESHOLD      = 16,
  parameter int    TX_HALF_PERIOD = 25,
  parameter string WEIGHT_FILE    = "rtl/perceptron_weights.hex",
  parameter string BIAS_FILE      = "rtl/perceptron_bias.hex"
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    train_mode_i,
  // sample link from the microcontroller ADC
  input  logic    adc_sclk_i,
  input  logic    adc_sdata_i,
  input  logic    adc_cs_n_i,
  output logic    rx_err_o,
  // classification LEDs
  output logic    mov1_o,
  output logic    mov2_o,
  // result link to the microcontroller buffer
  output logic    tx_sclk_o,
  output logic    tx_sdata_o,
  output logic    tx_cs_n_o,
  output logic    tx_drop_o,
  // observation of the filtered and segmented signal
  output logic    filt_valid_o,
  output sample_t filt_sample_o,
  output logic    seg_count_o,
  output logic    seg_open_o,
  output logic    seg_end_o
);

  localparam int unsigned AMV_W = 17;

  // ---- serial-to-parallel register ----
  logic [ADC_W-1:0] code;
  logic             code_valid;

  serial_rx #(.WORD_W(ADC_W)) u_rx (
    .clk, .rst_n,
    .sclk_i(adc_sclk_i), .sdata_i(adc_sdata_i), .cs_n_i(adc_cs_n_i),
    .data_o(code), .valid_o(code_valid), .frame_err_o(rx_err_o)
  );

  // ---- bandpass filter ----
  q11_10_t y_q;
  logic    y_valid;

  fir_bandpass u_fir (
    .clk, .rst_n,
    .in_valid_i(code_valid), .in_code_i(code),
    .busy_o(), .out_valid_o(y_valid), .y_o(y_q)
  );

  sample_t x;
  assign x = q_to_sample(y_q);

  // ---- detection and segmentation ----
  logic seg_count, seg_start, seg_end;

  segmenter #(.SEG_N(SEG_LEN), .THRESHOLD(THRESHOLD)) u_seg (
    .clk, .rst_n,
    .valid_i(y_valid), .x_i(x),
    .count_o(seg_count), .start_o(seg_start), .end_o(seg_end), .in_seg_o(seg_open_o)
  );

  // ---- feature extraction ----
  logic [AMV_W-1:0]  amv_full;
  logic [SAMP_W-1:0] amv_f, wl_f;

  amv #(.N(SEG_LEN), .ACC_W(AMV_W)) u_amv (
    .clk, .rst_n,
    .start_i(seg_start), .count_i(seg_count), .end_i(seg_end),
    .data_signal_i(x), .amv_o(amv_full)
  );

  wl #(.W(SAMP_W)) u_wl (
    .clk, .rst_n,
    .sample_valid_i(y_valid), .start_i(seg_start), .count_i(seg_count), .end_i(seg_end),
    .data_signal_i(x), .wl_o(wl_f)
  );

  assign amv_f = (amv_full > AMV_W'({SAMP_W{1'b1}})) ? {SAMP_W{1'b1}} : amv_full[SAMP_W-1:0];

  // ---- perceptron and label decoder ----
  logic                            cls_valid;
  label_t                          label;

  perceptron #(.FEAT_W(SAMP_W), .WEIGHT_FILE(WEIGHT_FILE), .BIAS_FILE(BIAS_FILE)) u_pcp (
    .clk, .rst_n,
    .valid_i(seg_end), .amv_i(amv_f), .wl_i(wl_f),
    .valid_o(cls_valid), .y_tilde_o(), .y_hat_o(), .label_o(label),
    .mov1_o, .mov2_o
  );

  // features of the last segment, kept for the result frame
  logic [SAMP_W-1:0] amv_q, wl_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amv_q <= '0;
      wl_q  <= '0;
    end else if (seg_end) begin
      amv_q <= amv_f;
      wl_q  <= wl_f;
    end
  end

  // ---- mode select and parallel-to-serial register ----
  logic [1:0] train_s;
  logic [$clog2(SEG_LEN)-1:0] seg_pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      train_s <= '0;
      seg_pos <= '0;
    end else begin
      train_s <= {train_s[0], train_mode_i};
      if (seg_count) seg_pos <= seg_start ? 1 : seg_pos + 1'b1;
    end
  end

  logic      train, tx_load, tx_busy;
  tx_frame_t tx_frame;

  always_comb begin
    train = train_s[1];
    if (train) begin
      tx_load  = seg_count;
      tx_frame = '{tag: LABEL_NONE, a: x, b: SAMP_W'(seg_start ? '0 : seg_pos)};
    end else begin
      tx_load  = cls_valid;
      tx_frame = '{tag: label, a: amv_q, b: wl_q};
    end
  end

  serial_tx #(.WORD_W(FRAME_W), .HALF_PERIOD(TX_HALF_PERIOD)) u_tx (
    .clk, .rst_n,
    .load_i(tx_load), .data_i(tx_frame),
    .busy_o(tx_busy), .tx_sclk_o, .tx_sdata_o, .tx_cs_n_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_drop_o <= 1'b0;
    else        tx_drop_o <= tx_load && tx_busy;
  end

  assign filt_valid_o  = y_valid;
  assign filt_sample_o = x;
  assign seg_count_o   = seg_count;
  assign seg_end_o     = seg_end;

endmodule

// emg_pkg: word formats and constants shared by the EMG classifier.
//
// All arithmetic values travel in one fixed-point format: 22 bits, two's
// complement, with 1 sign bit, 11 integer bits and 10 fractional bits
// (Q11.10). The ADC delivers 10-bit unsigned codes at 1100 samples/s, and the
// feature datapath (segmentation, AMV, WL, perceptron inputs) works on 11-bit
// samples, the integer part of the filter output. A segment is 50 samples.
//
// FIR_COEF holds the bandpass filter taps in Q11.10. They are a 61-tap
// (order 60) window design: h[n] = (lp500[n] - lp50[n]) * hamming[n], where
// lpF[n] = 2F/fs * sinc(2F/fs * (n - 30)), hamming[n] = 0.54 - 0.46*cos(2*pi*n/60),
// fs = 1100 Hz, scaled to unity gain at 275 Hz and rounded to a multiple of
// 2^-10. The 50 Hz and 500 Hz band edges, the Hamming window, the 1100 Hz rate
// and the 10-bit fraction follow the source design; the order of 60 is this
// design's choice. Rounding to 10 fractional bits zeroes the smallest taps,
// which is what degrades the quantized response compared with the ideal one.
package emg_pkg;

  // Q11.10 word format
  localparam int unsigned DATA_W = 22;
  localparam int unsigned FRAC_W = 10;
  typedef logic signed [DATA_W-1:0] q11_10_t;

  // ADC sample and feature-path sample widths
  localparam int unsigned ADC_W  = 10;
  localparam int unsigned SAMP_W = 11;
  typedef logic signed [SAMP_W-1:0] sample_t;

  // Segment length in samples
  localparam int unsigned SEG_LEN = 50;

  // Bandpass FIR taps, Q11.10 integers (value = FIR_COEF[k] / 1024)
  localparam int unsigned FIR_TAPS = 61;
  localparam int FIR_COEF [FIR_TAPS] = '{
       -1,     0,    -2,     0,    -3,     0,    -2,     0,
        0,     0,     5,     0,    13,     0,    20,     0,
       21,     0,    10,     0,   -14,     0,   -52,     0,
      -98,     0,  -142,     0,  -174,     0,   837,     0,
     -174,     0,  -142,     0,   -98,     0,   -52,     0,
      -14,     0,    10,     0,    21,     0,    20,     0,
       13,     0,     5,     0,     0,     0,    -2,     0,
       -3,     0,    -2,     0,    -1
  };

  // Example perceptron model, Q11.10: w1 = 0.0625 (AMV), w2 = 1.0 (WL),
  // theta = -1024.0. The same words are in rtl/perceptron_weights.hex and
  // rtl/perceptron_bias.hex; trained values replace them.
  localparam logic [DATA_W-1:0] PCP_WEIGHTS [2] = '{22'h000040, 22'h000400};
  localparam logic [DATA_W-1:0] PCP_BIAS    [1] = '{22'h300000};

  // Two-bit movement label driven onto the two LEDs
  typedef enum logic [1:0] {
    LABEL_NONE        = 2'b00,
    LABEL_CONTRACTION = 2'b01,
    LABEL_ROTATION    = 2'b10
  } label_t;

  // 24-bit frame sent back to the microcontroller, tag first. In
  // classification mode tag is the label and a/b are AMV/WL of the segment;
  // in training mode tag is LABEL_NONE, a is a segment sample and b its
  // position (0..SEG_LEN-1) in the segment.
  typedef struct packed {
    label_t              tag;
    logic [SAMP_W-1:0]   a;
    logic [SAMP_W-1:0]   b;
  } tx_frame_t;
  localparam int unsigned FRAME_W = $bits(tx_frame_t);

  // Integer part of a Q11.10 value, saturated to the 11-bit sample range.
  function automatic sample_t q_to_sample(input q11_10_t q);
    localparam int IP_W = DATA_W - FRAC_W;
    localparam logic signed [IP_W-1:0] MAX_S = IP_W'(2**(SAMP_W-1) - 1);
    localparam logic signed [IP_W-1:0] MIN_S = -IP_W'(2**(SAMP_W-1));
    logic signed [IP_W-1:0] ip;
    ip = IP_W'(q >>> FRAC_W);
    if (ip > MAX_S)      return sample_t'(MAX_S);
    else if (ip < MIN_S) return sample_t'(MIN_S);
    else                 return ip[SAMP_W-1:0];
  endfunction

endpackage

// tb_fir_bandpass: self-checking test of the bandpass FIR at its default
// 61 taps. A reference model in the testbench keeps its own sample history
// and computes sum(c[k] * x[n-k]) with 64-bit integers, rounds half up from
// 20 to 10 fractional bits and saturates to 22 bits. Every output is compared
// with it and the latency from input strobe to output strobe must be
// TAPS+1 cycles. Stimulus: an impulse (the output must replay the taps), a
// constant (the DC gain is the tap sum), random codes and full-scale steps.
// Then the frequency response is checked against the specification rather
// than against the tap table: sine waves of amplitude 300 codes on the 465
// offset must come out with amplitude 300 +/- 5% at 100, 275 and 450 Hz, and
// at most 3% of it at 20 Hz and 540 Hz (and the offset must be removed).
module tb_fir_bandpass;
  import emg_pkg::*;
  localparam int TAPS = FIR_TAPS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [ADC_W-1:0] code = '0;
  logic busy, out_valid;
  q11_10_t y;
  int checks = 0, failures = 0;
  longint hist [TAPS];
  int cycle = 0;

  fir_bandpass dut (.clk, .rst_n, .in_valid_i(in_valid), .in_code_i(code),
                    .busy_o(busy), .out_valid_o(out_valid), .y_o(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint ref_out();
    longint acc = 0;
    for (int k = 0; k < TAPS; k++) acc += longint'(FIR_COEF[k]) * hist[k];
    acc = (acc + 512) >>> 10;
    if (acc > 2097151)  acc = 2097151;
    if (acc < -2097152) acc = -2097152;
    return acc;
  endfunction

  q11_10_t last_y;
  task automatic push(input int c);
    int t0, lat;
    longint exp_y;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(c) * 1024;
    exp_y = ref_out();
    @(negedge clk);
    code = ADC_W'(c);
    in_valid = 1'b1;
    t0 = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    lat = cycle - (t0 + 1);  // cycles after the edge that accepts the sample
    last_y = y;
    checks++;
    if (longint'(y) != exp_y) begin
      failures++;
      $display("FAIL code %0d: y=%0d expected %0d", c, y, exp_y);
    end
    checks++;
    if (lat != TAPS + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, TAPS + 1);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // impulse of height 1: output k equals tap k (in Q.10 units of 1)
    push(1);
    for (int k = 1; k < TAPS; k++) push(0);
    // constant input
    for (int k = 0; k < TAPS + 5; k++) push(465);
    // random codes
    for (int k = 0; k < 400; k++) push($urandom_range(0, 1023));
    // alternating full-scale steps
    for (int k = 0; k < 200; k++) push((k % 2) ? 1023 : 0);
    // frequency response
    tone(100.0, 0.95, 1.05);
    tone(275.0, 0.95, 1.05);
    tone(450.0, 0.95, 1.05);
    tone(20.0, 0.0, 0.03);
    tone(540.0, 0.0, 0.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Play a sine of 300 codes around 465 at f_hz (fs = 1100 Hz), skip the
  // filter's settling, and compare the output peak with the input amplitude.
  task automatic tone(input real f_hz, input real lo, input real hi);
    real pk, g, mean;
    pk = 0.0; mean = 0.0;
    for (int n = 0; n < 400; n++) begin
      push(int'(465.0 + 300.0 * $sin(2.0 * 3.14159265358979 * f_hz * real'(n) / 1100.0)));
      if (n >= 100) begin
        real v;
        v = real'(last_y) / 1024.0;
        mean += v / 300.0;
        if (v > pk) pk = v;
        if (-v > pk) pk = -v;
      end
    end
    g = pk / 300.0;
    $display("tone %0.0f Hz: gain %0.3f, mean %0.2f", f_hz, g, mean);
    checks++;
    if (g < lo || g > hi) begin
      failures++;
      $display("FAIL gain %0.3f at %0.0f Hz outside %0.2f..%0.2f", g, f_hz, lo, hi);
    end
    checks++;
    if (mean > 2.0 || mean < -2.0) begin
      failures++;
      $display("FAIL offset not removed at %0.0f Hz (mean %0.2f)", f_hz, mean);
    end
  endtask
endmodule

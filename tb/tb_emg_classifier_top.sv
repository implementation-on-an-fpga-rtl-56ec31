// tb_emg_classifier_top: end-to-end test of the EMG classifier at its
// default parameters (61-tap filter, 50-sample segments, threshold 16,
// example perceptron model).
//
// The testbench plays the microcontroller. It synthesises an ADC code stream
// at the 1.5 V offset (code 465) with a little noise, broken by bursts:
// strong fast bursts (large waveform length, expected class 01), weak slow
// bursts (small waveform length, class 10) and bursts too weak to cross the
// threshold. Every code is shifted in over the serial link; one deliberately
// short frame checks that a broken frame is dropped. The stream is played in
// three phases: classification mode; training mode with samples paced so
// that every segment sample leaves as a frame; and training mode at full
// speed, where the transmitter must drop frames and flag them.
//
// An independent model computes the whole chain from the same code list:
// FIR in 64-bit integers, integer part with saturation, the segment
// controller, AMV, WL (saturating at 2047) and the perceptron. The testbench
// checks every filtered sample, the filter latency (TAPS+1 cycles), each
// segment end, the LED label one cycle after it, and every 24-bit result
// frame received from the serial transmitter. It also counts how often each
// mechanism occurred (frame error, segment, rejected rise, both labels, WL
// saturation, result frame, training frame, mode switch, dropped frame) and
// fails if any never did.
module tb_emg_classifier_top;
  import emg_pkg::*;

  localparam int MAXS = 4000;
  localparam int TH   = 16;

  logic clk = 1'b0, rst_n = 1'b0, train_mode = 1'b0;
  logic tx_drop;
  logic adc_sclk = 1'b0, adc_sdata = 1'b0, adc_cs_n = 1'b1;
  logic rx_err, mov1, mov2, tx_sclk, tx_sdata, tx_cs_n;
  logic filt_valid, seg_count, seg_open, seg_end;
  sample_t filt_sample;

  emg_classifier_top dut (
    .clk, .rst_n, .train_mode_i(train_mode),
    .adc_sclk_i(adc_sclk), .adc_sdata_i(adc_sdata), .adc_cs_n_i(adc_cs_n), .rx_err_o(rx_err),
    .mov1_o(mov1), .mov2_o(mov2),
    .tx_sclk_o(tx_sclk), .tx_sdata_o(tx_sdata), .tx_cs_n_o(tx_cs_n), .tx_drop_o(tx_drop),
    .filt_valid_o(filt_valid), .filt_sample_o(filt_sample),
    .seg_count_o(seg_count), .seg_open_o(seg_open), .seg_end_o(seg_end)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------------
  // stimulus and reference model
  // ------------------------------------------------------------------
  int nsamp = 0;
  int codes [MAXS];
  int xs    [MAXS];          // expected 11-bit filtered samples
  int nseg = 0;
  int e_label [64];
  int e_amv   [64];
  int e_wl    [64];
  int n_reject = 0, n_wl_sat = 0, n_contr = 0, n_rot = 0;
  bit e_cnt [MAXS];          // sample belongs to a segment
  int e_pos [MAXS];          // its position in the segment
  int n_train = 0, n_fast = 0;   // first sample of training / fast phase
  int nseg0 = 0;             // segments classified before training mode
  int phase = 0;

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic add_burst(input int len, input real f_hz, input real amp, input int noise);
    for (int i = 0; i < len; i++) begin
      real v;
      v = 465.0 + amp * $sin(2.0 * 3.14159265358979 * f_hz * real'(i) / 1100.0);
      codes[nsamp] = clamp(int'(v) + int'($urandom_range(0, 2 * noise)) - noise, 0, 1023);
      nsamp++;
    end
  endtask

  function automatic int n_fast_samples();
    int c = 0;
    for (int n = n_fast; n < nsamp; n++) c += e_cnt[n];
    return c;
  endfunction

  task automatic build_model();
    longint acc, y;
    int prev, left, a_sum, w_sum, w_prev, ip;
    longint yt;
    prev = 0; left = 0; w_prev = 0;
    a_sum = 0; w_sum = 0;
    for (int n = 0; n < nsamp; n++) begin
      bit cnt, st;
      if (n == n_train) nseg0 = nseg;
      acc = 0;
      for (int k = 0; k < FIR_TAPS; k++)
        if (n - k >= 0) acc += longint'(FIR_COEF[k]) * longint'(codes[n - k]) * 1024;
      y = (acc + 512) >>> 10;
      if (y > 2097151) y = 2097151;
      if (y < -2097152) y = -2097152;
      ip = int'(y >>> 10);
      xs[n] = clamp(ip, -1024, 1023);
      // segment controller
      st  = (left == 0) && (xs[n] - prev > TH);
      cnt = st || (left > 0);
      if (left == 0 && xs[n] - prev > 0 && xs[n] - prev <= TH) n_reject++;
      if (st) begin left = SEG_LEN; a_sum = 0; w_sum = 0; end
      e_cnt[n] = cnt;
      e_pos[n] = SEG_LEN - left;
      if (cnt) begin
        a_sum += (xs[n] < 0) ? -xs[n] : xs[n];
        w_sum += (xs[n] > prev) ? xs[n] - prev : prev - xs[n];
        left--;
        if (left == 0) begin
          e_amv[nseg] = a_sum / SEG_LEN;
          e_wl[nseg]  = (w_sum > 2047) ? 2047 : w_sum;
          if (w_sum > 2047) n_wl_sat++;
          yt = longint'(e_amv[nseg]) * 64 + longint'(e_wl[nseg]) * 1024 - 1048576;
          e_label[nseg] = (yt > 0) ? 1 : 2;
          if (yt > 0) n_contr++; else n_rot++;
          nseg++;
        end
      end
      prev = xs[n];
    end
  endtask

  // ------------------------------------------------------------------
  // serial link driver (microcontroller side)
  // ------------------------------------------------------------------
  task automatic send_word(input int word, input int nbits);
    adc_cs_n = 1'b0;
    repeat (2) @(negedge clk);
    for (int b = nbits - 1; b >= 0; b--) begin
      adc_sdata = word[b];
      repeat (4) @(negedge clk);
      adc_sclk = 1'b1;
      repeat (4) @(negedge clk);
      adc_sclk = 1'b0;
    end
    repeat (2) @(negedge clk);
    adc_cs_n = 1'b1;
    repeat (10) @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  // monitors
  // ------------------------------------------------------------------
  int got_filt = 0, got_seg = 0, got_frames = 0, got_rx_err = 0;
  int got_tframes = 0, got_fast_frames = 0, got_drops = 0, mode_switches = 0;
  int tq [$];                // expected training frames, in order
  int cycle = 0, t_code = 0;
  logic cs_d = 1'b1;
  bit check_led = 0;
  logic [23:0] rx_frame;
  int rx_bits = 0;
  logic tx_sclk_d = 0, tx_cs_d = 1;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (adc_cs_n && !cs_d) t_code <= cycle;
    cs_d <= adc_cs_n;
    if (rx_err) got_rx_err <= got_rx_err + 1;
    if (tx_drop) got_drops <= got_drops + 1;
    if (filt_valid && e_cnt[got_filt] && phase == 1)
      tq.push_back({2'b00, 11'(xs[got_filt]), 11'(e_pos[got_filt])});
    if (filt_valid) begin
      check(int'(filt_sample) == xs[got_filt], $sformatf("filtered sample %0d (%0d vs %0d)",
            got_filt, filt_sample, xs[got_filt]));
      // from the select release: 3 cycles in the receiver (synchroniser,
      // edge detect, output register), TAPS+1 in the filter, and one more
      // because this monitor registers the release it samples
      check(cycle - t_code == FIR_TAPS + 5, "receiver plus filter latency");
      got_filt <= got_filt + 1;
    end
    if (check_led) begin
      check({mov2, mov1} == 2'(e_label[got_seg - 1]),
            $sformatf("LED label segment %0d: %b expected %0d", got_seg - 1, {mov2, mov1},
                      e_label[got_seg - 1]));
    end
    check_led <= seg_end;
    if (seg_end) begin
      check(got_seg < nseg, "unexpected segment");
      got_seg <= got_seg + 1;
    end
    // result frame receiver
    tx_sclk_d <= tx_sclk;
    tx_cs_d   <= tx_cs_n;
    if (!tx_cs_n && tx_sclk && !tx_sclk_d) begin
      rx_frame <= {rx_frame[22:0], tx_sdata};
      rx_bits  <= rx_bits + 1;
    end
    if (tx_cs_n && !tx_cs_d) begin
      check(rx_bits == 24, "frame length");
      if (phase == 0) begin
        check(rx_frame == {2'(e_label[got_frames]), 11'(e_amv[got_frames]), 11'(e_wl[got_frames])},
              $sformatf("result frame %0d: %h expected label %0d amv %0d wl %0d", got_frames,
                        rx_frame, e_label[got_frames], e_amv[got_frames], e_wl[got_frames]));
        got_frames <= got_frames + 1;
      end else if (phase == 1) begin
        check(tq.size() > 0 && rx_frame == 24'(tq[0]),
              $sformatf("training frame %0d: %h expected %h", got_tframes, rx_frame,
                        (tq.size() > 0) ? tq[0] : -1));
        if (tq.size() > 0) void'(tq.pop_front());
        got_tframes <= got_tframes + 1;
      end else begin
        check(rx_frame[23:22] == 2'b00, "fast training frame tag");
        got_fast_frames <= got_fast_frames + 1;
      end
      rx_bits <= 0;
    end
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // stream: quiet, then bursts of the three kinds separated by quiet
    add_burst(100, 0.0, 0.0, 1);
    for (int r = 0; r < 4; r++) begin
      add_burst(70, 230.0, 300.0, 20);   // strong, fast
      add_burst(120, 0.0, 0.0, 1);
      add_burst(70, 60.0, 40.0, 2);      // weak, slow
      add_burst(120, 0.0, 0.0, 1);
      add_burst(60, 100.0, 6.0, 0);      // below threshold
      add_burst(120, 0.0, 0.0, 1);
    end
    n_train = nsamp;
    for (int r = 0; r < 2; r++) begin
      add_burst(70, 230.0, 300.0, 20);
      add_burst(100, 0.0, 0.0, 1);
      add_burst(70, 60.0, 40.0, 2);
      add_burst(100, 0.0, 0.0, 1);
    end
    n_fast = nsamp;
    add_burst(60, 230.0, 300.0, 20);
    add_burst(100, 0.0, 0.0, 1);
    build_model();
    $display("model: %0d samples, %0d segments (%0d contraction, %0d rotation), %0d WL saturated, %0d rejected rises",
             nsamp, nseg, n_contr, n_rot, n_wl_sat, n_reject);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check({mov2, mov1} == 2'b00, "LEDs off after reset");
    for (int n = 0; n < nsamp; n++) begin
      if (n == n_train || n == n_fast) begin
        repeat (3000) @(negedge clk);          // let the last frame finish
        if (n == n_train) begin train_mode = 1'b1; mode_switches++; end
        phase = (n == n_train) ? 1 : 2;
      end
      if (n == 150) send_word(12'h5a5, 9);     // broken frame, must be dropped
      send_word(codes[n], ADC_W);
      if (phase == 1) repeat (1300) @(negedge clk);   // pace below the frame time
    end
    repeat (3000) @(negedge clk);

    check(got_filt == nsamp, $sformatf("filtered samples %0d of %0d", got_filt, nsamp));
    check(got_seg == nseg, $sformatf("segments %0d of %0d", got_seg, nseg));
    check(got_frames == nseg0, $sformatf("result frames %0d of %0d", got_frames, nseg0));
    check(tq.size() == 0, "training frames all received");
    check(got_fast_frames + got_drops == n_fast_samples(),
          $sformatf("fast phase: %0d frames + %0d drops", got_fast_frames, got_drops));
    // every mechanism must have happened
    check(got_rx_err == 1, "serial frame error seen once");
    check(nseg >= 4, "segments captured");
    check(n_reject > 0, "sub-threshold rises rejected");
    check(n_contr > 0, "contraction label");
    check(n_rot > 0, "rotation label");
    check(n_wl_sat > 0, "WL saturation");
    check(got_frames > 0, "result frames sent");
    check(got_tframes > 0, "training frames sent");
    check(mode_switches > 0, "mode switch");
    check(got_drops > 0, "dropped frames flagged");
    $display("seen: rx errors %0d, segments %0d, contraction %0d, rotation %0d, WL saturated %0d, rejected rises %0d, result frames %0d, training frames %0d + %0d, drops %0d",
             got_rx_err, got_seg, n_contr, n_rot, n_wl_sat, n_reject, got_frames, got_tframes,
             got_fast_frames, got_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

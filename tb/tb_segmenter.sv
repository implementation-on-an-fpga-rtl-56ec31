// tb_segmenter: self-checking test of the detection and segmentation
// controller (threshold 16, 50-sample segments). The testbench feeds a
// stream made of flat stretches, small rises at and below the threshold,
// falls and large rises, with random gaps between strobes. An independent
// model tracks the expected segment state; count_o and start_o are checked
// on every strobe, end_o in every cycle (it must pulse exactly one cycle
// after the 50th counted sample), and every segment must hold 50 samples.
module tb_segmenter;
  import emg_pkg::*;
  localparam int N = SEG_LEN;
  localparam int TH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0;
  sample_t x = '0;
  logic count, start, seg_end, in_seg;
  int checks = 0, failures = 0;
  int segments = 0, rejects = 0;

  segmenter #(.SEG_N(N), .THRESHOLD(TH)) dut (.clk, .rst_n, .valid_i(valid), .x_i(x),
      .count_o(count), .start_o(start), .end_o(seg_end), .in_seg_o(in_seg));

  always #5 clk = ~clk;

  // reference model state
  int m_prev = 0, m_left = 0;
  bit exp_end_next = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic put(input int v);
    bit e_count, e_start;
    int gap;
    @(negedge clk);
    check(seg_end == exp_end_next, "end_o");
    exp_end_next = 0;
    x = SAMP_W'(v);
    valid = 1'b1;
    e_start = (m_left == 0) && (v - m_prev > TH);
    e_count = (m_left > 0) || e_start;
    if (m_left == 0 && v != m_prev && v - m_prev <= TH && v - m_prev > 0) rejects++;
    #1;
    check(count == e_count, "count_o");
    check(start == e_start, "start_o");
    if (e_start) m_left = N;
    if (e_count) begin
      m_left--;
      if (m_left == 0) begin exp_end_next = 1; segments++; end
    end
    m_prev = v;
    @(negedge clk);
    valid = 1'b0;
    check(seg_end == exp_end_next, "end_o");
    exp_end_next = 0;
    gap = $urandom_range(0, 3);
    repeat (gap) begin
      @(negedge clk);
      check(seg_end == 1'b0, "end_o idle");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    v = 0;
    for (int i = 0; i < 20; i++) put(v);        // flat
    put(v + TH); v += TH;                        // rise equal to threshold: no start
    put(v - 5); v -= 5;                          // fall
    put(v + 1); v += 1;                          // small rise
    put(v + TH + 1); v += TH + 1;                // start
    for (int i = 0; i < 60; i++) begin v = $urandom_range(0, 400) - 200; put(v); end
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 3))
        0: ;
        1: v = v + $urandom_range(0, 2 * TH);
        2: v = v - $urandom_range(0, 40);
        default: v = $urandom_range(0, 1000) - 500;
      endcase
      if (v > 1023) v = 1023;
      if (v < -1024) v = -1024;
      put(v);
    end
    check(segments >= 10, "enough segments");
    check(rejects >= 5, "enough sub-threshold rises");
    $display("segments %0d sub-threshold rises %0d", segments, rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

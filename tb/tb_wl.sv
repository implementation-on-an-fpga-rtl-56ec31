// tb_wl: self-checking test of the waveform length unit. The sample stream
// runs continuously (sample_valid every strobe) and segments of 50 samples
// are marked with count/start, so the first difference of a segment is
// taken against the last sample before it. At the end pulse the output must
// equal min(sum |x_i - x_(i-1)|, 2047) and be zero at all other times. Both
// small segments (no saturation) and large ones (saturation) occur.
module tb_wl;
  import emg_pkg::*;
  localparam int N = SEG_LEN;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sv = 0, start = 0, count = 0, end_p = 0;
  sample_t x = '0;
  logic [10:0] wl_out;
  int checks = 0, failures = 0;
  int n_sat = 0, n_unsat = 0;
  int prev = 0;

  wl #(.W(11)) dut (.clk, .rst_n, .sample_valid_i(sv), .start_i(start), .count_i(count),
                    .end_i(end_p), .data_signal_i(x), .wl_o(wl_out));

  always #5 clk = ~clk;

  task automatic strobe(input int v, input bit cnt, input bit st);
    @(negedge clk);
    x = SAMP_W'(v); sv = 1; count = cnt; start = st;
    @(negedge clk);
    sv = 0; count = 0; start = 0;
    checks++;
    if (wl_out != 0) begin failures++; $display("FAIL output not zero"); end
    prev = v;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, sum, amp, exp_wl;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      repeat ($urandom_range(1, 4)) strobe(int'($urandom_range(0, 200)) - 100, 0, 0);
      amp = (s % 3 == 0) ? 1023 : (s % 3 == 1) ? 20 : 2;
      sum = 0;
      for (int i = 0; i < N; i++) begin
        v = int'($urandom_range(0, 2 * amp)) - amp;
        if (s == 0) v = (i % 2) ? 1023 : -1024;
        sum += (v > prev) ? v - prev : prev - v;
        strobe(v, 1, i == 0);
      end
      exp_wl = (sum > 2047) ? 2047 : sum;
      if (sum > 2047) n_sat++; else n_unsat++;
      end_p = 1;
      #1;
      checks++;
      if (wl_out != 11'(exp_wl)) begin
        failures++;
        $display("FAIL segment %0d: wl %0d expected %0d", s, wl_out, exp_wl);
      end
      @(negedge clk);
      end_p = 0;
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

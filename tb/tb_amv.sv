// tb_amv: self-checking test of the absolute mean value unit. Random
// segments of 50 signed 11-bit samples (including full-scale ones) are fed
// with count/start as the segment controller would drive them, with
// unrelated samples in between; at the end pulse the output must equal
// floor(sum |x| / 50), and it must be zero in every other cycle.
module tb_amv;
  import emg_pkg::*;
  localparam int N = SEG_LEN;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, count = 0, end_p = 0;
  sample_t x = '0;
  logic [16:0] amv_out;
  int checks = 0, failures = 0;

  amv #(.N(N), .ACC_W(17)) dut (.clk, .rst_n, .start_i(start), .count_i(count), .end_i(end_p),
                                 .data_signal_i(x), .amv_o(amv_out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, sum, mode;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      // samples outside a segment
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        x = SAMP_W'($urandom);
        checks++;
        if (amv_out != 0) begin failures++; $display("FAIL output not zero outside end"); end
      end
      sum = 0;
      mode = s % 4;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        case (mode)
          0: v = -1024;
          1: v = 1023;
          default: v = int'($urandom_range(0, 2047)) - 1024;
        endcase
        if (s < 2) v = (s == 0) ? -1024 : 1023;
        x = SAMP_W'(v);
        sum += (v < 0) ? -v : v;
        count = 1;
        start = (i == 0);
        @(negedge clk);
        count = 0; start = 0;
        checks++;
        if (amv_out != 0) begin failures++; $display("FAIL output not zero during segment"); end
      end
      end_p = 1;
      #1;
      checks++;
      if (amv_out != 17'(sum / N)) begin
        failures++;
        $display("FAIL segment %0d: amv %0d expected %0d", s, amv_out, sum / N);
      end
      @(negedge clk);
      end_p = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

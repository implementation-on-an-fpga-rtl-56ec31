// tb_perceptron: self-checking test of the perceptron with its label
// decoder. Two instances run side by side: one with the shipped example
// model (w1 = 0.0625, w2 = 1.0, theta = -1024) and one with a test model
// (w1 = -2.5, w2 = 0.75, theta = 100.5). For random and corner feature pairs
// the expected y~ is computed in 64-bit integers (Q.10), and y~, y^, the
// label (01 for y~ > 0, 10 otherwise), the LED outputs and the one-cycle
// latency of valid_o are checked. The label must hold between segments and
// be 00 after reset. Cases with y~ exactly 0 must give label 10.
module tb_perceptron;
  import emg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic vin = 0;
  logic [10:0] amv_i = '0, wl_i = '0;
  logic v_a, v_b, yh_a, yh_b, m1_a, m2_a, m1_b, m2_b;
  logic signed [33:0] yt_a, yt_b;
  label_t lab_a, lab_b;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  perceptron dut_a (.clk, .rst_n, .valid_i(vin), .amv_i, .wl_i, .valid_o(v_a),
                    .y_tilde_o(yt_a), .y_hat_o(yh_a), .label_o(lab_a), .mov1_o(m1_a), .mov2_o(m2_a));
  perceptron #(.WEIGHT_FILE("tb/pcp_weights_test.hex"), .BIAS_FILE("tb/pcp_bias_test.hex"))
    dut_b (.clk, .rst_n, .valid_i(vin), .amv_i, .wl_i, .valid_o(v_b),
           .y_tilde_o(yt_b), .y_hat_o(yh_b), .label_o(lab_b), .mov1_o(m1_b), .mov2_o(m2_b));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (amv %0d wl %0d)", what, amv_i, wl_i); end
  endtask

  task automatic check_out(input longint y, input logic signed [33:0] yt, input logic yh,
                           input label_t lab, input logic m1, input logic m2, input string who);
    label_t e;
    e = (y > 0) ? LABEL_CONTRACTION : LABEL_ROTATION;
    check(longint'(yt) == y, {who, " y_tilde"});
    check(yh == (y > 0), {who, " y_hat"});
    check(lab == e, {who, " label"});
    check(m1 == e[0] && m2 == e[1], {who, " leds"});
  endtask

  task automatic classify(input int a, input int w);
    longint ya, yb;
    label_t la, lb;
    ya = longint'(a) * 64 + longint'(w) * 1024 - 1048576;
    yb = longint'(a) * -2560 + longint'(w) * 768 + 102912;
    if (ya > 0) n_pos++; else n_neg++;
    @(negedge clk);
    amv_i = 11'(a); wl_i = 11'(w); vin = 1;
    @(negedge clk);
    vin = 0;
    check(v_a && v_b, "valid_o one cycle after valid_i");
    check_out(ya, yt_a, yh_a, lab_a, m1_a, m2_a, "example model");
    check_out(yb, yt_b, yh_b, lab_b, m1_b, m2_b, "test model");
    la = lab_a; lb = lab_b;
    amv_i = 11'($urandom); wl_i = 11'($urandom);
    repeat (3) begin
      @(negedge clk);
      check(!v_a && !v_b, "valid_o idle");
      check(lab_a == la && lab_b == lb, "label held");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(lab_a == LABEL_NONE && !m1_a && !m2_a, "label 00 in reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(lab_a == LABEL_NONE && lab_b == LABEL_NONE, "label 00 after reset");
    classify(0, 1024);      // example model: y~ = 0 exactly -> rotation
    classify(16, 1023);     // y~ = 0 exactly
    classify(17, 1023);     // y~ > 0
    classify(2047, 2047);
    classify(0, 0);
    classify(2047, 0);
    classify(0, 2047);
    classify(67, 201);      // test model: 67*-2560 + 201*768 + 102912 = 87744
    for (int i = 0; i < 500; i++) classify($urandom_range(0, 2047), $urandom_range(0, 2047));
    for (int i = 0; i < 300; i++) classify($urandom_range(0, 1024), $urandom_range(900, 1100));
    check(n_pos > 50 && n_neg > 50, "both classes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

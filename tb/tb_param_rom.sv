// tb_param_rom: self-checking test of the parameter ROM. Reads every word of
// an eight-word test image through both read ports in all address
// combinations, and checks the shipped weight and bias images against their
// documented values (w1 = 0.0625, w2 = 1.0, theta = -1024 in Q11.10), and
// a memory filled from its INIT parameter alone.
module tb_param_rom;
  logic [2:0]  a8 [2];
  logic [21:0] d8 [2];
  logic [0:0]  aw [2];
  logic [21:0] dw [2];
  logic [0:0]  ab [1];
  logic [21:0] db [1];
  int checks = 0, failures = 0;
  logic [21:0] img [8] = '{22'h000001, 22'h2aaaaa, 22'h155555, 22'h3fffff,
                           22'h200000, 22'h1fffff, 22'h0abcde, 22'h012345};

  localparam logic [21:0] ZERO8 [8] = '{default: '0};
  param_rom #(.DEPTH(8), .WIDTH(22), .NPORTS(2), .INIT(ZERO8), .INIT_FILE("tb/rom_test.hex"))
    u_test (.addr_i(a8), .data_o(d8));
  param_rom #(.INIT_FILE("rtl/perceptron_weights.hex")) u_w (.addr_i(aw), .data_o(dw));
  // contents from the INIT parameter alone
  logic [1:0]  ai [2];
  logic [21:0] di [2];
  localparam logic [21:0] IMG4 [4] = '{22'h111111, 22'h222222, 22'h333333, 22'h3abcde};
  param_rom #(.DEPTH(4), .NPORTS(2), .INIT(IMG4))
    u_i (.addr_i(ai), .data_o(di));
  localparam logic [21:0] ZERO1 [1] = '{default: '0};
  param_rom #(.DEPTH(1), .WIDTH(22), .NPORTS(1), .INIT(ZERO1), .INIT_FILE("rtl/perceptron_bias.hex"))
    u_b (.addr_i(ab), .data_o(db));

  task automatic check(input logic [21:0] got, input logic [21:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a8[0] = 3'(i); a8[1] = 3'(j);
        #1;
        check(d8[0], img[i], "port 0");
        check(d8[1], img[j], "port 1");
      end
    for (int i = 0; i < 4; i++) begin
      ai[0] = 2'(i); ai[1] = 2'(3 - i);
      #1;
      check(di[0], (i == 3) ? 22'h3abcde : 22'(i + 1) * 22'h111111, "INIT port 0");
      check(di[1], (i == 0) ? 22'h3abcde : 22'(4 - i) * 22'h111111, "INIT port 1");
    end
    aw[0] = 1'b0; aw[1] = 1'b1; ab[0] = 1'b0;
    #1;
    check(dw[0], 22'h000040, "w1");
    check(dw[1], 22'h000400, "w2");
    check(db[0], 22'h300000, "theta");
    aw[0] = 1'b1; aw[1] = 1'b0;
    #1;
    check(dw[0], 22'h000400, "w2 on port 0");
    check(dw[1], 22'h000040, "w1 on port 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_serial_rx: self-checking test of the serial-to-parallel sample register.
// Sends random 10-bit words MSB first under cs_n with a slow serial clock,
// checks every received word and its single valid pulse, checks the delay
// from the select release to valid (3 clk cycles), and sends short and long
// frames that must be dropped with a frame error.
module tb_serial_rx;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, sdata = 1'b0, cs_n = 1'b1;
  logic [W-1:0] data;
  logic valid, ferr;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  int t_release, t_valid;
  int cycle = 0;

  serial_rx #(.WORD_W(W)) dut (.clk, .rst_n, .sclk_i(sclk), .sdata_i(sdata), .cs_n_i(cs_n),
                               .data_o(data), .valid_o(valid), .frame_err_o(ferr));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (valid) begin nvalid <= nvalid + 1; t_valid <= cycle; end
    if (ferr)  nerr <= nerr + 1;
  end

  task automatic send(input logic [31:0] word, input int nbits);
    cs_n = 1'b0;
    repeat (4) @(negedge clk);
    for (int b = nbits - 1; b >= 0; b--) begin
      sdata = word[b];
      repeat (3) @(negedge clk);
      sclk = 1'b1;
      repeat (3) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (3) @(negedge clk);
    cs_n = 1'b1;
    t_release = cycle;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w;
    int nv0, ne0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      w = (i == 0) ? '1 : (i == 1) ? '0 : W'($urandom);
      nv0 = nvalid; ne0 = nerr;
      send(w, W);
      checks++;
      if (nvalid != nv0 + 1 || nerr != ne0 || data !== w) begin
        failures++;
        $display("FAIL word %0d: sent %h got %h (valid %0d err %0d)", i, w, data, nvalid - nv0, nerr - ne0);
      end
      checks++;
      if (t_valid - t_release != 3) begin
        failures++;
        $display("FAIL latency %0d", t_valid - t_release);
      end
    end
    // wrong frame lengths
    for (int n = 1; n <= 14; n++) begin
      if (n == W) continue;
      nv0 = nvalid; ne0 = nerr;
      send($urandom, n);
      checks++;
      if (nvalid != nv0 || nerr != ne0 + 1) begin
        failures++;
        $display("FAIL frame of %0d bits: valid %0d err %0d", n, nvalid - nv0, nerr - ne0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

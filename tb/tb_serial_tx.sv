// tb_serial_tx: self-checking test of the result transmitter. A receiver
// model samples tx_sdata_o on every rising edge of tx_sclk_o while
// tx_cs_n_o is low and rebuilds each 24-bit word, which must equal the
// loaded one. The frame must last WORD_W * 2 * HALF_PERIOD + 2 cycles of
// busy_o, and a load while busy must be ignored. Run with HALF_PERIOD 3.
module tb_serial_tx;
  localparam int W = 24, HP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 0;
  logic [W-1:0] din = '0;
  logic busy, sclk, sdata, cs_n;
  int checks = 0, failures = 0;
  logic [W-1:0] rx_word;
  int rx_bits = 0, frames = 0;
  logic sclk_d = 0;

  serial_tx #(.WORD_W(W), .HALF_PERIOD(HP)) dut (.clk, .rst_n, .load_i(load), .data_i(din),
      .busy_o(busy), .tx_sclk_o(sclk), .tx_sdata_o(sdata), .tx_cs_n_o(cs_n));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    sclk_d <= sclk;
    if (!cs_n && sclk && !sclk_d) begin
      rx_word <= {rx_word[W-2:0], sdata};
      rx_bits <= rx_bits + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w;
    int nbusy;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 200; f++) begin
      w = (f == 0) ? '1 : (f == 1) ? 24'h800001 : W'($urandom);
      @(negedge clk);
      rx_bits = 0;
      din = w; load = 1;
      @(negedge clk);
      load = 0;
      nbusy = 0;
      while (busy) begin
        nbusy++;
        if (nbusy == 10) begin din = ~w; load = 1; end    // ignored
        else load = 0;
        @(negedge clk);
      end
      load = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (rx_word !== w || rx_bits != W) begin
        failures++;
        $display("FAIL frame %0d: sent %h got %h (%0d bits)", f, w, rx_word, rx_bits);
      end
      checks++;
      if (nbusy != W * 2 * HP + 2) begin
        failures++;
        $display("FAIL frame %0d busy for %0d cycles", f, nbusy);
      end
      checks++;
      if (!cs_n || sclk) begin failures++; $display("FAIL idle lines"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

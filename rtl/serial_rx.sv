// serial_rx: serial-to-parallel register that receives ADC samples from the
// microcontroller.
//
// The microcontroller shifts each conversion result into the FPGA bit by bit,
// most significant bit first, framed by an active-low select. The three
// serial lines come from another clock domain: each passes a two-flop
// synchroniser, and a bit is taken on a detected rising edge of sclk_i while
// cs_n_i is low. When cs_n_i returns high after exactly WORD_W bits, the word
// is presented on data_o with a one-cycle valid_o pulse, two to three clk
// cycles after the edge. A frame with another bit count is dropped and
// flagged with a one-cycle frame_err_o pulse.
//
// The source design only states that shift registers receive the converted
// bits and that samples have 10 bits; the framing (select, clock, MSB first)
// and the synchronisers are this design's choices. clk must be at least four
// times faster than sclk_i.
module serial_rx #(
  parameter int unsigned WORD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk_i,
  input  logic              sdata_i,
  input  logic              cs_n_i,
  output logic [WORD_W-1:0] data_o,
  output logic              valid_o,
  output logic              frame_err_o
);

  localparam int unsigned CNT_W = $clog2(WORD_W + 2);

  logic [1:0] sclk_s, sdata_s, cs_n_s;
  logic       sclk_d, cs_n_d;
  logic [WORD_W-1:0] shreg;
  logic [CNT_W-1:0]  nbits;

  wire sclk_rise = sclk_s[1] & ~sclk_d;
  wire cs_rise   = cs_n_s[1] & ~cs_n_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s      <= '0;
      sdata_s     <= '0;
      cs_n_s      <= '1;
      sclk_d      <= 1'b0;
      cs_n_d      <= 1'b1;
      shreg       <= '0;
      nbits       <= '0;
      data_o      <= '0;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      sclk_s  <= {sclk_s[0], sclk_i};
      sdata_s <= {sdata_s[0], sdata_i};
      cs_n_s  <= {cs_n_s[0], cs_n_i};
      sclk_d  <= sclk_s[1];
      cs_n_d  <= cs_n_s[1];
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      if (cs_rise) begin
        if (nbits == CNT_W'(WORD_W)) begin
          data_o  <= shreg;
          valid_o <= 1'b1;
        end else begin
          frame_err_o <= 1'b1;
        end
        nbits <= '0;
      end else if (!cs_n_s[1] && sclk_rise) begin
        shreg <= {shreg[WORD_W-2:0], sdata_s[1]};
        if (nbits <= CNT_W'(WORD_W)) nbits <= nbits + 1'b1;
      end
    end
  end

endmodule

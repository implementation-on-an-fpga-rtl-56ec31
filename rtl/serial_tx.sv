// serial_tx: parallel-to-serial register that returns processing results to
// the microcontroller.
//
// A WORD_W-bit word is loaded with a one-cycle load_i while busy_o is low.
// The register then drives an active-low select tx_cs_n_o and shifts the word
// out most significant bit first on tx_sdata_o, with its own serial clock
// tx_sclk_o: each bit is put on the line while tx_sclk_o is low and held
// through the rising edge, where the receiver samples it. Each clock phase
// lasts HALF_PERIOD clk cycles, so one word takes WORD_W * 2 * HALF_PERIOD
// cycles plus one cycle of select setup and one of release. A load while
// busy_o is high is ignored.
//
// From the source design: shift registers send the processing result bits to
// a buffer in the microcontroller. The framing, bit order, the FPGA-driven
// serial clock and HALF_PERIOD are this design's choices.
module serial_tx #(
  parameter int unsigned WORD_W      = 24,
  parameter int unsigned HALF_PERIOD = 25
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic [WORD_W-1:0] data_i,
  output logic              busy_o,
  output logic              tx_sclk_o,
  output logic              tx_sdata_o,
  output logic              tx_cs_n_o
);

  localparam int unsigned DIV_W = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam int unsigned BIT_W = $clog2(WORD_W + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_SHIFT, S_DONE} state_t;

  state_t            state;
  logic [WORD_W-1:0] shreg;
  logic [DIV_W-1:0]  div;
  logic [BIT_W-1:0]  nleft;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shreg     <= '0;
      div       <= '0;
      nleft     <= '0;
      tx_sclk_o <= 1'b0;
      tx_cs_n_o <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx_sclk_o <= 1'b0;
          tx_cs_n_o <= 1'b1;
          if (load_i) begin
            shreg     <= data_i;
            nleft     <= BIT_W'(WORD_W);
            div       <= '0;
            tx_cs_n_o <= 1'b0;
            state     <= S_SETUP;
          end
        end
        S_SETUP: state <= S_SHIFT;
        S_SHIFT: begin
          if (div == DIV_W'(HALF_PERIOD - 1)) begin
            div <= '0;
            if (!tx_sclk_o) begin
              tx_sclk_o <= 1'b1;
            end else begin
              tx_sclk_o <= 1'b0;
              shreg     <= {shreg[WORD_W-2:0], 1'b0};
              nleft     <= nleft - 1'b1;
              if (nleft == BIT_W'(1)) state <= S_DONE;
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        S_DONE: begin
          tx_cs_n_o <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign tx_sdata_o = shreg[WORD_W-1];
  assign busy_o     = (state != S_IDLE);

endmodule

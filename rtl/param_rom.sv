// param_rom: read-only memory for the trained perceptron parameters.
//
// DEPTH words of WIDTH bits, fixed at configuration time: the memory is
// first filled from the INIT parameter and then, if INIT_FILE is not empty,
// overwritten from that hex file (one word per line, two's complement,
// Q11.10 for the 22-bit width). Installing a newly trained model means
// rewriting the file (or INIT) and rebuilding; nothing writes the memory at
// run time. The memory has NPORTS asynchronous read ports, so both synaptic
// weights can be read in the same cycle and feed both multipliers at once.
//
// From the source design: weights and bias are kept in ROMs initialised from
// a .hex file in 22-bit fixed point. The INIT parameter (which also lets
// tools that ignore $readmemh see the contents), the number of read ports
// and the asynchronous read are this design's choices. The defaults describe
// the two-word weight memory holding the example model of emg_pkg; any
// other DEPTH needs an INIT of that depth.
module param_rom
  import emg_pkg::*;
#(
  parameter int unsigned DEPTH     = 2,
  parameter int unsigned WIDTH     = 22,
  parameter int unsigned NPORTS    = 2,
  parameter logic [WIDTH-1:0] INIT [DEPTH] = PCP_WEIGHTS,
  parameter string       INIT_FILE = ""
) (
  input  logic [((DEPTH > 1) ? $clog2(DEPTH) : 1)-1:0] addr_i [NPORTS],
  output logic [WIDTH-1:0]                             data_o [NPORTS]
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT[i];
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++) data_o[p] = mem[addr_i[p]];
  end

endmodule

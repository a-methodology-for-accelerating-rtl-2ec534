// lut6: six-input look-up table, the combinational element of a slice.
//
// The LUT is a 64 x 1 memory: the six inputs form the address and the addressed
// bit of the 64-bit truth table is the output. The truth table is an input port
// rather than a parameter so that it can follow the configuration memory while
// the design runs, which is how a reconfiguration of the LUT (and so an emulated
// transient fault) reaches the logic. Purely combinational.
module lut6 (
  input  logic [63:0] init,  // truth table, bit n = output for address n
  input  logic [5:0]  i,     // inputs I5..I0
  output logic        o
);
  assign o = init[i];
endmodule

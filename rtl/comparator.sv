// comparator: watches the outputs of the GOLDEN and FAULTY CUT instances.
//
// Each cycle of the CUT clock it compares the two output vectors bit by bit; the
// first cycle in which they differ sets the sticky mismatch flag, which is the
// interrupt that ends an injection and classifies the fault as an error. The flag
// stays set until the fault-injection system resets the CUTs and the comparator
// together. The width is a parameter so that the block fits any CUT output.
// Timing: mismatch rises one CUT clock after the first differing sample.
module comparator #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high, CUT clock domain
  input  logic [W-1:0] golden,
  input  logic [W-1:0] faulty,
  output logic         mismatch
);
  always_ff @(posedge clk) begin
    if (rst)                    mismatch <= 1'b0;
    else if (golden != faulty)  mismatch <= 1'b1;
  end
endmodule

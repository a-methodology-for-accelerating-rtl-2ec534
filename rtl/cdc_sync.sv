// cdc_sync: multi-flop synchronizer for a level signal entering a clock domain.
//
// The circuit under test and the fault-injection system run on unrelated clocks,
// so every control signal that crosses between them (the reset request towards the
// CUT, the mismatch interrupt towards the injector) passes through STAGES flip-flops
// clocked by the receiving domain. Output follows the input after STAGES cycles of
// clk. Two stages and the reset value are this design's choices.
module cdc_sync #(
  parameter int   STAGES    = 2,
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,   // asynchronous reset of the receiving domain
  input  logic d,       // signal from the other domain
  output logic q
);
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= {STAGES{RESET_VAL}};
    else        sr <= {sr[STAGES-2:0], d};
  end

  assign q = sr[STAGES-1];

  initial assert (STAGES >= 2) else $error("cdc_sync needs at least two stages");
endmodule

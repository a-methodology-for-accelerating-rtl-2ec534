// counter_cut: 4-bit up counter used as the circuit under test, with or without
// triple modular redundancy (TMR).
//
// The counter is built the way it maps onto slices: one LUT per bit computes the
// propagate signal of an incrementer and a carry chain (a multiplexer and an XOR
// per bit, carry-in 1) adds one. Each copy of the counter occupies one slice:
// four LUTs, four flip-flops and four multiplexer/XOR pairs.
//   TMR = 1 ("original"): three copies, 12 LUTs. The LUT of bit i in every copy
//     takes bit i of all three copies and outputs their majority, so each copy
//     loads voted+1. The count output is the bitwise majority of the three copies.
//   TMR = 0 ("custom"): one copy, 4 LUTs, each passing its own bit through.
// The truth tables come in on lut_init (from the configuration memory), so a fault
// written into a LUT frame changes the function while the counter runs. LUT k*4+i
// is bit i of copy k. Placing the voter inside the LUTs and voting the outputs in
// plain logic is this design's choice; the counts of LUTs, flip-flops and carry
// elements follow the case study.
// Timing: count advances every clk while rst is low; rst clears all copies.
module counter_cut
  import fi_pkg::*;
#(
  parameter bit  TMR    = 1'b1,
  localparam int COPIES = TMR ? 3 : 1,
  localparam int NLUT   = COPIES * CNT_BITS
) (
  input  logic                clk,
  input  logic                rst,               // synchronous, active high
  input  logic [63:0]         lut_init [NLUT],
  output logic [CNT_BITS-1:0] count
);
  logic [CNT_BITS-1:0] q    [COPIES];
  logic [CNT_BITS-1:0] prop [COPIES];
  logic [CNT_BITS-1:0] sum  [COPIES];
  logic [CNT_BITS:0]   cy   [COPIES];

  for (genvar k = 0; k < COPIES; k++) begin : g_copy
    for (genvar i = 0; i < CNT_BITS; i++) begin : g_bit
      logic [5:0] lut_in;
      if (TMR) begin : g_vote
        assign lut_in = {3'b000, q[2][i], q[1][i], q[0][i]};
      end else begin : g_plain
        assign lut_in = {5'b00000, q[k][i]};
      end
      lut6 u_lut (.init(lut_init[k*CNT_BITS + i]), .i(lut_in), .o(prop[k][i]));
      // carry chain element: MUXCY selects carry-in on propagate, XORCY adds
      assign cy[k][i+1] = prop[k][i] ? cy[k][i] : 1'b0;
      assign sum[k][i]  = prop[k][i] ^ cy[k][i];
    end
    assign cy[k][0] = 1'b1;

    always_ff @(posedge clk) begin
      if (rst) q[k] <= '0;
      else     q[k] <= sum[k];
    end
  end

  if (TMR) begin : g_out_vote
    assign count = (q[0] & q[1]) | (q[0] & q[2]) | (q[1] & q[2]);
  end else begin : g_out_plain
    assign count = q[0];
  end
endmodule

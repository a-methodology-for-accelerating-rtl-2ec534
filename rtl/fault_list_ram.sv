// fault_list_ram: the fault list held by the fault-injection system.
//
// Each entry names one LUT of the FAULTY instance (slice X, Y and LUT letter) and
// carries the outcome of its injection. The host side (the card reader that brings
// the list in and takes the results back) uses port A; the injection controller
// reads entries and writes the annotated results through port B. Both ports are
// synchronous with one cycle of read latency. When both write the same entry in
// one cycle, port B wins. The depth of 8192 is this design's choice and holds the
// 5425-LUT list of the larger case study.
module fault_list_ram
  import fi_pkg::*;
#(
  parameter int DEPTH = 8192,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: host
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  fault_entry_t  a_wdata,
  output fault_entry_t  a_rdata,
  // port B: injection controller
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  fault_entry_t  b_wdata,
  output fault_entry_t  b_rdata
);
  fault_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we)                                mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule

// fisoc: the fault-injection system on chip.
//
// It holds the fault list (fault_list_ram), the injection sequencer
// (fi_controller) and the timeout timer (fi_timer), and reaches the configuration
// memory through its configuration access port. The host side loads the list of
// LUTs to attack before a campaign and reads the annotated outcomes afterwards;
// there is no host traffic during the campaign. start runs num_faults entries;
// done rises when all are annotated, with the error and timeout totals on
// n_error and n_timeout.
// The published system is a soft processor running the sequence as software; here
// the same steps are done by a state machine (see fi_controller).
// All ports are in the clk domain; cut_rst_req and mismatch cross to and from the
// CUT domain through synchronizers outside this block.
module fisoc
  import fi_pkg::*;
#(
  parameter int DEPTH         = 8192,
  parameter int RST_CYCLES    = 16,
  parameter int SETTLE_CYCLES = 8,
  localparam int AW           = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host (fault list in, results out)
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  fault_entry_t  host_wdata,
  output fault_entry_t  host_rdata,
  // campaign control
  input  logic          start,
  input  logic [AW:0]   num_faults,
  input  logic [31:0]   timeout_limit,
  input  logic [15:0]   set_cycles,
  output logic          busy,
  output logic          done,
  output logic [AW:0]   n_error,
  output logic [AW:0]   n_timeout,
  output logic [AW:0]   n_skipped,
  // CUT side
  output logic          cut_rst_req,
  input  logic          mismatch,
  // configuration access port
  cfg_if.master         icap
);
  logic          list_we;
  logic [AW-1:0] list_addr;
  fault_entry_t  list_wdata, list_rdata;
  logic          tmr_start, tmr_stop, tmr_timeout, tmr_running;

  fault_list_ram #(.DEPTH(DEPTH)) u_list (
    .clk    (clk),
    .a_we   (host_we),
    .a_addr (host_addr),
    .a_wdata(host_wdata),
    .a_rdata(host_rdata),
    .b_we   (list_we),
    .b_addr (list_addr),
    .b_wdata(list_wdata),
    .b_rdata(list_rdata)
  );

  fi_timer #(.CW(32)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (tmr_start),
    .stop   (tmr_stop),
    .limit  (timeout_limit),
    .running(tmr_running),
    .timeout(tmr_timeout)
  );

  fi_controller #(
    .DEPTH(DEPTH), .RST_CYCLES(RST_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .num_faults (num_faults),
    .set_cycles (set_cycles),
    .busy       (busy),
    .done       (done),
    .n_error    (n_error),
    .n_timeout  (n_timeout),
    .n_skipped  (n_skipped),
    .list_we    (list_we),
    .list_addr  (list_addr),
    .list_wdata (list_wdata),
    .list_rdata (list_rdata),
    .cut_rst_req(cut_rst_req),
    .mismatch   (mismatch),
    .tmr_start  (tmr_start),
    .tmr_stop   (tmr_stop),
    .tmr_timeout(tmr_timeout),
    .icap       (icap)
  );
endmodule

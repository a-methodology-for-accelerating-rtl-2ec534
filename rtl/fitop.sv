// fitop: fault-injection top. Emulates single-event transients in the LUTs of a
// circuit under test (CUT) by rewriting its truth tables in the configuration
// memory while it runs, and tells faults that reach the outputs from faults that
// stay latent.
//
// Structure: two instances of the same CUT, GOLDEN and FAULTY, run side by side
// from the same reset; a comparator watches their outputs; the fault-injection
// system (fisoc) resets both before each fault, complements one LUT of the FAULTY
// instance for set_cycles cycles through the configuration access port, and
// classifies the fault by the comparator interrupt or a timeout. The CUT here is
// the 4-bit counter of the first case study, with TMR (TMR = 1, 12 LUTs) or
// without (TMR = 0, 4 LUTs). The LUTs of both instances read their truth tables
// from the configuration memory model (cfg_mem): FAULTY in slices X81Y19, X80Y19,
// X81Y18 (bottom half), GOLDEN in X81Y141, X80Y141, X81Y140 (top half).
//
// Clocks: clk_fi (injector and configuration memory) and clk_cut (CUT and
// comparator) are unrelated. The reset request to the CUT and the mismatch flag
// back cross through two-flop synchronizers. rst_n resets both sides
// asynchronously; the CUT then stays in reset until the injector releases it.
// Ports: the host port loads the fault list and reads outcomes; load_* downloads
// the LUT frames of the bitstream before a campaign. Which LUTs to attack, their
// placement and the campaign control follow the published flow; the two-flop
// synchronizers and the port set are this design's choices.
module fitop
  import fi_pkg::*;
#(
  parameter bit  TMR           = 1'b1,
  parameter int  DEPTH         = 8192,
  parameter int  RST_CYCLES    = 16,
  parameter int  SETTLE_CYCLES = 8,
  localparam int AW            = $clog2(DEPTH),
  localparam int NLUT          = (TMR ? 3 : 1) * CNT_BITS
) (
  input  logic                clk_fi,
  input  logic                clk_cut,
  input  logic                rst_n,
  // host port
  input  logic                host_we,
  input  logic [AW-1:0]       host_addr,
  input  fault_entry_t        host_wdata,
  output fault_entry_t        host_rdata,
  // campaign control
  input  logic                start,
  input  logic [AW:0]         num_faults,
  input  logic [31:0]         timeout_limit,
  input  logic [15:0]         set_cycles,
  output logic                busy,
  output logic                done,
  output logic [AW:0]         n_error,
  output logic [AW:0]         n_timeout,
  output logic [AW:0]         n_skipped,
  // bitstream download (LUT frames)
  input  logic                load_we,
  input  far_t                load_far,
  input  logic [5:0]          load_word,
  input  logic [31:0]         load_data,
  // observation
  output logic [CNT_BITS-1:0] golden_count,
  output logic [CNT_BITS-1:0] faulty_count,
  output logic                mismatch
);
  cfg_if icap (.clk(clk_fi), .rst_n(rst_n));

  logic        cut_rst_req, cut_rst, mismatch_fi;
  lut_site_t   site     [2*NLUT];
  logic [63:0] lut_init [2*NLUT];
  logic [63:0] init_faulty [NLUT];
  logic [63:0] init_golden [NLUT];

  // LUT placement: entry k*4+i is bit i of copy k; FAULTY first, then GOLDEN.
  for (genvar k = 0; k < NLUT / CNT_BITS; k++) begin : g_place
    for (genvar i = 0; i < CNT_BITS; i++) begin : g_lut
      assign site[k*CNT_BITS + i]        = '{x: FAULTY_X[k], y: FAULTY_Y[k], lut: lut_id_t'(i)};
      assign site[NLUT + k*CNT_BITS + i] = '{x: GOLDEN_X[k], y: GOLDEN_Y[k], lut: lut_id_t'(i)};
      assign init_faulty[k*CNT_BITS + i] = lut_init[k*CNT_BITS + i];
      assign init_golden[k*CNT_BITS + i] = lut_init[NLUT + k*CNT_BITS + i];
    end
  end

  fisoc #(
    .DEPTH(DEPTH), .RST_CYCLES(RST_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_fisoc (
    .clk          (clk_fi),
    .rst_n        (rst_n),
    .host_we      (host_we),
    .host_addr    (host_addr),
    .host_wdata   (host_wdata),
    .host_rdata   (host_rdata),
    .start        (start),
    .num_faults   (num_faults),
    .timeout_limit(timeout_limit),
    .set_cycles   (set_cycles),
    .busy         (busy),
    .done         (done),
    .n_error      (n_error),
    .n_timeout    (n_timeout),
    .n_skipped    (n_skipped),
    .cut_rst_req  (cut_rst_req),
    .mismatch     (mismatch_fi),
    .icap         (icap)
  );

  cfg_mem #(.NSITES(2*NLUT)) u_cfg (
    .clk      (clk_fi),
    .icap     (icap),
    .load_we  (load_we),
    .load_far (load_far),
    .load_word(load_word),
    .load_data(load_data),
    .site     (site),
    .lut_init (lut_init)
  );

  cdc_sync #(.STAGES(2), .RESET_VAL(1'b1)) u_sync_rst (
    .clk(clk_cut), .rst_n(rst_n), .d(cut_rst_req), .q(cut_rst)
  );

  cdc_sync #(.STAGES(2), .RESET_VAL(1'b0)) u_sync_mis (
    .clk(clk_fi), .rst_n(rst_n), .d(mismatch), .q(mismatch_fi)
  );

  counter_cut #(.TMR(TMR)) u_golden (
    .clk(clk_cut), .rst(cut_rst), .lut_init(init_golden), .count(golden_count)
  );

  counter_cut #(.TMR(TMR)) u_faulty (
    .clk(clk_cut), .rst(cut_rst), .lut_init(init_faulty), .count(faulty_count)
  );

  comparator #(.W(CNT_BITS)) u_cmp (
    .clk(clk_cut), .rst(cut_rst), .golden(golden_count), .faulty(faulty_count),
    .mismatch(mismatch)
  );
endmodule

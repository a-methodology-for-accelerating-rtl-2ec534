// tb_fisoc: the host loads a five-entry fault list through the host port, runs a
// campaign against the configuration memory model and reads the outcomes back.
// The testbench stands in for the CUT and comparator: it raises mismatch when the
// truth table of a "sensitive" entry is complemented. Checks the annotated list,
// the totals, done, and that every truth table is restored.
module tb_fisoc;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int DEPTH = 32, AW = 5, NF = 5;
  localparam int LIMIT = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_if icap (.clk(clk), .rst_n(rst_n));
  logic host_we = 0;
  logic [AW-1:0] host_addr = 0;
  fault_entry_t host_wdata, host_rdata;
  logic start = 0, busy, done, cut_rst_req, mismatch = 0;
  logic [AW:0] n_error, n_timeout, n_skipped;
  lut_site_t site [NF];
  logic [63:0] lut_init [NF];
  logic [63:0] orig [NF];
  logic [31:0] shadow [key_t];
  bit sensitive [NF] = '{1, 0, 0, 1, 1};
  int checks = 0, failures = 0;
  int cur = -1;
  logic rst_q = 1;

  fisoc #(.DEPTH(DEPTH), .RST_CYCLES(6), .SETTLE_CYCLES(4)) dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata), .start(start),
    .num_faults(6'(NF)), .timeout_limit(32'(LIMIT)), .set_cycles(16'd3),
    .busy(busy), .done(done), .n_error(n_error), .n_timeout(n_timeout),
    .n_skipped(n_skipped), .cut_rst_req(cut_rst_req), .mismatch(mismatch), .icap(icap));

  cfg_mem #(.NSITES(NF)) u_mem (
    .clk(clk), .icap(icap), .load_we(1'b0), .load_far('0), .load_word(6'd0),
    .load_data(32'd0), .site(site), .lut_init(lut_init));

  always @(posedge clk) begin
    rst_q <= cut_rst_req;
    if (rst_n && !cut_rst_req && rst_q) cur++;
    if (cut_rst_req) mismatch <= 0;
    else if (cur >= 0 && cur < NF && sensitive[cur] && lut_init[cur] == ~orig[cur])
      mismatch <= 1;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_wdata = '0;
    for (int s = 0; s < NF; s++)
      site[s] = '{x: 7'(20 * s + 3), y: 8'(31 * s + 2), lut: lut_id_t'(3 - (s % 4))};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the original truth tables are whatever the memory holds at start
    #1;
    for (int s = 0; s < NF; s++) orig[s] = lut_init[s];
    for (int e = 0; e < NF; e++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(e); host_wdata = '{site: site[e], result: RES_NONE};
    end
    @(negedge clk);
    host_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    checks += 3;
    if (n_error != 6'd3)   failures++;
    if (n_timeout != 6'd2) failures++;
    if (n_skipped != 6'd0) failures++;
    for (int e = 0; e < NF; e++) begin
      @(negedge clk);
      host_addr = AW'(e);
      @(negedge clk);
      checks += 2;
      if (host_rdata.result != (sensitive[e] ? RES_ERROR : RES_TIMEOUT)) begin
        failures++;
        $display("FAIL entry %0d outcome %s", e, host_rdata.result.name());
      end
      if (host_rdata.site != site[e]) failures++;
      checks++;
      if (lut_init[e] !== orig[e]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

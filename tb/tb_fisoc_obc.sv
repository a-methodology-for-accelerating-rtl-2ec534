// tb_fisoc_obc: a campaign at the size of the on-board-computer case study.
// The fault-injection system on chip runs 5425 faults, each on a distinct LUT
// drawn at random from the whole device. The LUT count and the split of 3916
// errors to 1509 silent faults are the published ones. The processor design under
// test is not available, so the testbench plays it and its comparator. An entry
// is "sensitive" by a fixed pattern that gives exactly 3916 of them. For such an
// entry the testbench raises mismatch once it sees the LUT's truth table
// complemented in the configuration memory model.
// Checks, from an independent model of the frame layout:
//   - every configuration write of an injection goes to a word that was read in
//     that injection;
//   - the first write to the target word flips exactly the LUT's 16 bits and the
//     second one restores it;
//   - every other word is written back unchanged;
//   - each injection does 4 x 41 reads and twice as many writes;
//   - the list comes back annotated, with the right totals.
// The timeout, reset and settle lengths are short so the campaign runs in seconds.
module tb_fisoc_obc;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int NF = 5425, NERR = 3916, AW = 13;
  localparam int LIMIT = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_if icap (.clk(clk), .rst_n(rst_n));
  logic host_we = 0;
  logic [AW-1:0] host_addr = 0;
  fault_entry_t host_wdata, host_rdata;
  logic start = 0, busy, done, cut_rst_req, mismatch = 0;
  logic [AW:0] n_error, n_timeout, n_skipped;
  lut_site_t sites [NF];
  lut_site_t site [1];
  logic [63:0] lut_init [1];
  logic [63:0] orig;
  bit sensitive [NF];
  int checks = 0, failures = 0;
  int cur = -1, seen = -1;
  logic rst_q = 1;

  fisoc #(.RST_CYCLES(4), .SETTLE_CYCLES(2)) dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata), .start(start),
    .num_faults(14'(NF)), .timeout_limit(32'(LIMIT)), .set_cycles(16'd8),
    .busy(busy), .done(done), .n_error(n_error), .n_timeout(n_timeout),
    .n_skipped(n_skipped), .cut_rst_req(cut_rst_req), .mismatch(mismatch), .icap(icap));

  // only the LUT under attack is watched
  cfg_mem #(.NSITES(1)) u_mem (
    .clk(clk), .icap(icap), .load_we(1'b0), .load_far('0), .load_word(6'd0),
    .load_data(32'd0), .site(site), .lut_init(lut_init));
  assign site[0] = sites[(cur >= 0 && cur < NF) ? cur : 0];

  // CUT and comparator stand-in: one injection per release of the CUT reset
  always @(posedge clk) begin
    rst_q <= cut_rst_req;
    if (rst_n && !cut_rst_req && rst_q) cur++;
    if (cut_rst_req) mismatch <= 0;
    else if (cur >= 0 && cur < NF && seen == cur && sensitive[cur] && lut_init[0] == ~orig)
      mismatch <= 1;
  end

  // the truth table before the injection, taken while the CUT is still settling
  always @(negedge clk)
    if (cur >= 0 && cur < NF && seen != cur) begin
      orig = lut_init[0];
      seen = cur;
    end

  // configuration port monitor
  logic [31:0] rd [key_t];
  int          wr_n [key_t];
  key_t        rd_key;
  logic [31:0] t_far;
  int          t_word, t_hi, mon_cur = -1;
  int          n_reads = 0, n_writes = 0, bad_writes = 0, bad_reads = 0, flips = 0;
  always @(posedge clk) begin
    if (cur != mon_cur && cur >= 0 && cur < NF) begin
      // new injection: forget the reads of the previous one
      rd.delete();
      wr_n.delete();
      ref_locate(int'(sites[cur].x), int'(sites[cur].y), int'(sites[cur].lut),
                 t_far, t_word, t_hi);
      mon_cur = cur;
    end
    if (icap.rvalid) rd[rd_key] = icap.rdata;
    if (icap.req && !icap.we) begin
      rd_key <= key_of(icap.faddr, int'(icap.word));
      n_reads++;
    end
    if (icap.req && icap.we) begin
      key_t k;
      logic [31:0] want;
      bit target;
      k = key_of(icap.faddr, int'(icap.word));
      n_writes++;
      target = (int'(icap.word) == t_word) && (icap.faddr >= t_far) && (icap.faddr < t_far + 4);
      if (!rd.exists(k)) begin
        bad_reads++;
      end else begin
        want = rd[k];
        if (target && !wr_n.exists(k)) begin
          want = want ^ (t_hi ? 32'hFFFF_0000 : 32'h0000_FFFF);
          if (icap.wdata == want) flips++;
        end
        if (icap.wdata != want) begin
          bad_writes++;
          if (bad_writes < 5)
            $display("FAIL entry %0d write far %h word %0d data %h want %h", cur,
                     icap.faddr, icap.word, icap.wdata, want);
        end
      end
      wr_n[k] = wr_n.exists(k) ? wr_n[k] + 1 : 1;
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit used [int];
    int e, ne, t0, t1;
    host_wdata = '0;
    // distinct random LUTs over all 108 x 160 slices
    e = 0;
    while (e < NF) begin
      int x, y, l;
      x = int'($urandom_range(SLICE_X_NUM - 1));
      y = int'($urandom_range(SLICE_Y_NUM - 1));
      l = int'($urandom_range(3));
      if (!used.exists((x * 256 + y) * 4 + l)) begin
        used[(x * 256 + y) * 4 + l] = 1;
        sites[e] = '{x: 7'(x), y: 8'(y), lut: lut_id_t'(l)};
        e++;
      end
    end
    // exactly NERR sensitive entries, spread over the list
    ne = 0;
    for (int i = 0; i < NF; i++) begin
      sensitive[i] = ((i + 1) * NERR / NF) != (i * NERR / NF);
      if (sensitive[i]) ne++;
    end
    checks++;
    if (ne != NERR) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NF; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(i); host_wdata = '{site: sites[i], result: RES_NONE};
    end
    @(negedge clk);
    host_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = $time / 10;
    wait (done);
    t1 = $time / 10;
    $display("campaign of %0d faults took %0d cycles (%0d per fault)", NF, t1 - t0,
             (t1 - t0) / NF);
    checks += 3;
    if (n_error != 14'(NERR))     failures++;
    if (n_timeout != 14'(NF - NERR)) failures++;
    if (n_skipped != 14'd0)        failures++;
    $display("errors %0d, silent %0d", n_error, n_timeout);
    checks += 5;
    if (n_reads != NF * LUT_FRAMES * FRAME_WORDS) begin
      failures++;
      $display("FAIL %0d configuration reads", n_reads);
    end
    if (n_writes != 2 * NF * LUT_FRAMES * FRAME_WORDS) begin
      failures++;
      $display("FAIL %0d configuration writes", n_writes);
    end
    if (flips != NF * LUT_FRAMES) begin
      failures++;
      $display("FAIL %0d of %0d frame flips", flips, NF * LUT_FRAMES);
    end
    if (bad_writes != 0) failures++;
    if (bad_reads != 0) begin
      failures++;
      $display("FAIL %0d writes to words not read first", bad_reads);
    end
    for (int i = 0; i < NF; i++) begin
      @(negedge clk);
      host_addr = AW'(i);
      @(negedge clk);
      checks += 2;
      if (host_rdata.result != (sensitive[i] ? RES_ERROR : RES_TIMEOUT)) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d outcome %s", i, host_rdata.result.name());
      end
      if (host_rdata.site != sites[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

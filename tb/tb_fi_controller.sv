// tb_fi_controller: a campaign of 8 faults against the configuration memory model.
// The testbench plays the fault list (one cycle read latency) and the CUT: for a
// "sensitive" entry it raises mismatch as soon as it sees the target LUT's truth
// table complemented. Checks: each truth table is complemented completely during
// its injection and restored afterwards, no other LUT changes, the outcomes and totals are right, an out-of-device entry is skipped,
// the CUT is reset before every injection and a timeout fault takes the expected
// number of cycles.
module tb_fi_controller;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int DEPTH = 16, AW = 4, NF = 8, NS = 8;
  localparam int RST = 4, SETTLE = 3, SETC = 5, LIMIT = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_if icap (.clk(clk), .rst_n(rst_n));
  logic start = 0, busy, done;
  logic [AW:0] n_error, n_timeout, n_skipped;
  logic list_we;
  logic [AW-1:0] list_addr;
  fault_entry_t list_wdata, list_rdata;
  logic cut_rst_req, mismatch = 0, tmr_start, tmr_stop, tmr_timeout, tmr_running;
  logic load_we = 0;
  far_t load_far = '0;
  logic [5:0] load_word = 0;
  logic [31:0] load_data = 0;
  lut_site_t site [NS];
  logic [63:0] lut_init [NS];
  logic [63:0] orig [NS];
  fault_entry_t list [DEPTH];
  logic [31:0] shadow [key_t];
  bit sensitive [NF];
  bit seen_flip [NF];
  int checks = 0, failures = 0, resets = 0, other_changed = 0;
  int cur = -1;  // entry being injected: counts releases of the CUT reset

  cfg_mem #(.NSITES(NS)) u_mem (
    .clk(clk), .icap(icap), .load_we(load_we), .load_far(load_far),
    .load_word(load_word), .load_data(load_data), .site(site), .lut_init(lut_init));
  fi_timer u_tmr (.clk(clk), .rst_n(rst_n), .start(tmr_start), .stop(tmr_stop),
                  .limit(32'(LIMIT)), .running(tmr_running), .timeout(tmr_timeout));
  fi_controller #(.DEPTH(DEPTH), .RST_CYCLES(RST), .SETTLE_CYCLES(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_faults(5'(NF)), .set_cycles(16'(SETC)),
    .busy(busy), .done(done), .n_error(n_error), .n_timeout(n_timeout),
    .n_skipped(n_skipped), .list_we(list_we), .list_addr(list_addr),
    .list_wdata(list_wdata), .list_rdata(list_rdata), .cut_rst_req(cut_rst_req),
    .mismatch(mismatch), .tmr_start(tmr_start), .tmr_stop(tmr_stop),
    .tmr_timeout(tmr_timeout), .icap(icap));

  // fault list memory
  always_ff @(posedge clk) begin
    list_rdata <= list[list_addr];
    if (list_we) list[list_addr] <= list_wdata;
  end

  // CUT stand-in: watches the truth tables, raises mismatch for sensitive entries
  logic rst_q = 1;
  always @(posedge clk) begin
    rst_q <= cut_rst_req;
    if (rst_n && !cut_rst_req && rst_q) begin
      resets++;
      cur++;
    end
    if (cut_rst_req) mismatch <= 0;
    else if (cur >= 0 && cur < NF) begin
      int t;
      t = (cur < NS) ? cur : 0;
      if (cur != 6 && lut_init[t] == ~orig[t]) begin
        seen_flip[cur] = 1;
        if (sensitive[cur]) mismatch <= 1;
      end
      for (int s = 0; s < NS; s++)
        if (s != t && lut_init[s] != orig[s]) other_changed++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, tmo_cycles;
    for (int s = 0; s < NS; s++) begin
      site[s] = '{x: 7'(s * 13 + 1), y: 8'(s * 19 + 3), lut: lut_id_t'(s % 4)};
      orig[s] = {$urandom(), $urandom()};
      place_lut(shadow, site[s].x, site[s].y, int'(site[s].lut), orig[s]);
    end
    // entries 0..7 attack sites 0..7, entry 6 lies outside the device
    for (int e = 0; e < NF; e++) begin
      list[e] = '{site: site[e], result: RES_NONE};
      sensitive[e] = (e % 2 == 0);
    end
    list[6].site.x = 7'd120;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (shadow[k]) begin
      @(negedge clk);
      load_we = 1; load_far = far_t'(k[37:6]); load_word = k[5:0]; load_data = shadow[k];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    tmo_cycles = -1;
    while (!done && t0 < 100000) begin
      // cycles of entry 1 (a timeout fault): from its fetch to its store
      if (list_we && list_addr == 4'd0) t1 = t0 + 1;
      if (list_we && list_addr == 4'd1) tmo_cycles = t0 - t1 + 1;
      @(negedge clk);
      t0++;
    end
    checks++;
    if (!done) failures++;
    for (int e = 0; e < NF; e++) begin
      fi_result_t want;
      want = (e == 6) ? RES_NONE : (sensitive[e] ? RES_ERROR : RES_TIMEOUT);
      checks++;
      if (list[e].result != want || list[e].site != (e == 6 ? list[6].site : site[e])) begin
        failures++;
        $display("FAIL entry %0d result %s want %s", e, list[e].result.name(), want.name());
      end
      if (e != 6) begin
        checks++;
        if (!seen_flip[e]) begin
          failures++;
          $display("FAIL entry %0d truth table never complemented", e);
        end
      end
    end
    checks += 4;
    if (n_error != 5'd3)   failures++;  // entries 0, 2, 4 (6 is skipped)
    if (n_timeout != 5'd4) failures++;  // entries 1, 3, 5, 7
    if (n_skipped != 5'd1) failures++;
    if (resets != NF) begin
      failures++;
      $display("FAIL %0d CUT resets for %0d faults", resets, NF);
    end
    checks++;
    if (other_changed != 0) begin
      failures++;
      $display("FAIL other LUTs changed %0d times", other_changed);
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (lut_init[s] !== orig[s]) failures++;
    end
    // timeout fault: fetch 2 + reset + settle + read 165 + timer load 1 + limit
    // + wait 1 + store 1
    checks++;
    if (tmo_cycles != 2 + RST + SETTLE + 165 + 1 + LIMIT + 1 + 1) begin
      failures++;
      $display("FAIL timeout fault took %0d cycles", tmo_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

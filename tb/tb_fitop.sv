// tb_fitop: end-to-end campaigns on the fault-injection top with the real 4-bit
// counters as CUT, one top with TMR (12 LUTs) and one without (4 LUTs).
// For each: the LUT frames of both CUT instances are downloaded (placed by the
// reference model), the fault list names every LUT of the FAULTY instance plus one
// location outside the device, and the campaign runs with the CUT on its own
// clock. Expected, as in the counter case study: with TMR every fault times out
// (0 % errors); without TMR every fault is an error (100 %). Also checked: the
// GOLDEN counter counts, every truth table is complemented during its injection
// and restored, the GOLDEN LUTs never change, the CUT is reset before each fault,
// and the out-of-device entry is skipped. Each mechanism is counted and must occur.
module tb_fitop;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int DEPTH = 8192, AW = 13;
  localparam int LIMIT = 400, SETC = 8;

  logic clk_fi = 0, clk_cut = 0, rst_n = 0;
  always #5 clk_fi = ~clk_fi;
  always #7 clk_cut = ~clk_cut;

  // shared stimulus, one set of outputs per top
  logic host_we_t = 0, host_we_p = 0;
  logic [AW-1:0] host_addr = 0;
  fault_entry_t host_wdata = '0;
  logic start_t = 0, start_p = 0;
  logic [AW:0] num_faults = 0;
  logic load_we_t = 0, load_we_p = 0;
  bit   loaded = 0;
  far_t load_far = '0;
  logic [5:0] load_word = 0;
  logic [31:0] load_data = 0;

  fault_entry_t rd_t, rd_p;
  logic busy_t, done_t, busy_p, done_p, mis_t, mis_p;
  logic [AW:0] err_t, tmo_t, skp_t, err_p, tmo_p, skp_p;
  logic [3:0] gc_t, fc_t, gc_p, fc_p;

  fitop #(.TMR(1'b1)) u_tmr (
    .clk_fi(clk_fi), .clk_cut(clk_cut), .rst_n(rst_n),
    .host_we(host_we_t), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(rd_t),
    .start(start_t), .num_faults(num_faults), .timeout_limit(32'(LIMIT)),
    .set_cycles(16'(SETC)), .busy(busy_t), .done(done_t), .n_error(err_t),
    .n_timeout(tmo_t), .n_skipped(skp_t), .load_we(load_we_t), .load_far(load_far),
    .load_word(load_word), .load_data(load_data), .golden_count(gc_t),
    .faulty_count(fc_t), .mismatch(mis_t));

  fitop #(.TMR(1'b0)) u_plain (
    .clk_fi(clk_fi), .clk_cut(clk_cut), .rst_n(rst_n),
    .host_we(host_we_p), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(rd_p),
    .start(start_p), .num_faults(num_faults), .timeout_limit(32'(LIMIT)),
    .set_cycles(16'(SETC)), .busy(busy_p), .done(done_p), .n_error(err_p),
    .n_timeout(tmo_p), .n_skipped(skp_p), .load_we(load_we_p), .load_far(load_far),
    .load_word(load_word), .load_data(load_data), .golden_count(gc_p),
    .faulty_count(fc_p), .mismatch(mis_p));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_flip_t = 0, n_flip_p = 0, n_reset = 0, n_mismatch = 0, n_gold_changed = 0;
  int n_count_steps = 0;
  logic [3:0] gc_q;
  logic rst_q = 1, mis_q = 0;

  // placement, as documented in fitop
  int fx [3] = '{81, 80, 81};
  int fy [3] = '{19, 19, 18};
  int gy [3] = '{141, 141, 140};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // monitors: complemented truth tables, resets, GOLDEN LUTs, counting
  always @(posedge clk_fi) begin
    for (int l = 0; l < 12; l++) begin
      if (u_tmr.lut_init[l] == ~INIT_MAJ3) n_flip_t++;
      if (loaded && u_tmr.lut_init[12 + l] != INIT_MAJ3) n_gold_changed++;
    end
    for (int l = 0; l < 4; l++) begin
      if (u_plain.lut_init[l] == ~INIT_BUF) n_flip_p++;
      if (loaded && u_plain.lut_init[4 + l] != INIT_BUF) n_gold_changed++;
    end
    rst_q <= u_plain.cut_rst;
    if (loaded && !u_plain.cut_rst && rst_q) n_reset++;  // reset releases
    mis_q <= mis_p;
    if (loaded && mis_p && !mis_q) n_mismatch++;
  end
  always @(posedge clk_cut) begin
    gc_q <= gc_t;
    if (!u_tmr.cut_rst && gc_t == gc_q + 4'd1) n_count_steps++;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] shadow_t [key_t];
    logic [31:0] shadow_p [key_t];
    // bitstreams: TMR top, all three copies of both instances (majority tables);
    // plain top, copy 0 of both instances (pass-through tables)
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 4; l++) begin
        place_lut(shadow_t, fx[k], fy[k], l, INIT_MAJ3);
        place_lut(shadow_t, fx[k], gy[k], l, INIT_MAJ3);
      end
    for (int l = 0; l < 4; l++) begin
      place_lut(shadow_p, fx[0], fy[0], l, INIT_BUF);
      place_lut(shadow_p, fx[0], gy[0], l, INIT_BUF);
    end
    repeat (3) @(negedge clk_fi);
    rst_n = 1;
    foreach (shadow_t[k]) begin
      @(negedge clk_fi);
      load_we_t = 1; load_far = far_t'(k[37:6]); load_word = k[5:0]; load_data = shadow_t[k];
    end
    @(negedge clk_fi);
    load_we_t = 0;
    foreach (shadow_p[k]) begin
      @(negedge clk_fi);
      load_we_p = 1; load_far = far_t'(k[37:6]); load_word = k[5:0]; load_data = shadow_p[k];
    end
    @(negedge clk_fi);
    load_we_p = 0;
    loaded = 1;
    #1;
    for (int l = 0; l < 4; l++) check(u_plain.lut_init[l] == INIT_BUF, "plain download");
    for (int l = 0; l < 12; l++) check(u_tmr.lut_init[l] == INIT_MAJ3, "tmr download");
    // fault list: the 12 FAULTY LUTs, then one location outside the device
    for (int e = 0; e < 13; e++) begin
      @(negedge clk_fi);
      host_we_t = 1;
      host_we_p = 1;
      host_addr = AW'(e);
      host_wdata = (e < 12)
        ? '{site: '{x: 7'(fx[e / 4]), y: 8'(fy[e / 4]), lut: lut_id_t'(e % 4)}, result: RES_NONE}
        : '{site: '{x: 7'd127, y: 8'd3, lut: LUT_A}, result: RES_NONE};
    end
    @(negedge clk_fi);
    host_we_t = 0;
    host_we_p = 0;
    // TMR campaign: 13 entries
    num_faults = 14'd13;
    start_t = 1;
    @(negedge clk_fi);
    start_t = 0;
    wait (done_t);
    check(err_t == 0 && tmo_t == 12 && skp_t == 1,
          $sformatf("TMR totals err=%0d tmo=%0d skip=%0d", err_t, tmo_t, skp_t));
    for (int l = 0; l < 12; l++) check(u_tmr.lut_init[l] == INIT_MAJ3, "TMR restored");
    // plain campaign: entries 0..3 are its FAULTY LUTs, then the bad entry
    @(negedge clk_fi);
    host_we_p = 1; host_addr = AW'(4);
    host_wdata = '{site: '{x: 7'd127, y: 8'd3, lut: LUT_A}, result: RES_NONE};
    @(negedge clk_fi);
    host_we_p = 0;
    num_faults = 14'd5;
    start_p = 1;
    @(negedge clk_fi);
    start_p = 0;
    wait (done_p);
    check(err_p == 4 && tmo_p == 0 && skp_p == 1,
          $sformatf("plain totals err=%0d tmo=%0d skip=%0d", err_p, tmo_p, skp_p));
    for (int l = 0; l < 4; l++) check(u_plain.lut_init[l] == INIT_BUF, "plain restored");
    // outcomes read back through the host port
    for (int e = 0; e < 13; e++) begin
      @(negedge clk_fi);
      host_addr = AW'(e);
      @(negedge clk_fi);
      if (e < 12) check(rd_t.result == RES_TIMEOUT, $sformatf("TMR entry %0d", e));
      if (e < 4)  check(rd_p.result == RES_ERROR, $sformatf("plain entry %0d", e));
      if (e == 4) check(rd_p.result == RES_NONE, "plain skipped entry");
      if (e == 12) check(rd_t.result == RES_NONE, "TMR skipped entry");
    end
    // mechanisms
    check(n_flip_t > 0, "TMR truth table complemented");
    check(n_flip_p > 0, "plain truth table complemented");
    check(n_reset == 5, $sformatf("CUT resets %0d", n_reset));
    check(n_mismatch == 4, $sformatf("comparator interrupts %0d", n_mismatch));
    check(n_gold_changed == 0, "GOLDEN LUTs untouched");
    check(n_count_steps > 100, "GOLDEN counter counts");
    $display("mechanisms: tmr_flips=%0d plain_flips=%0d resets=%0d interrupts=%0d steps=%0d",
             n_flip_t, n_flip_p, n_reset, n_mismatch, n_count_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fitop_full: one complete campaign on the fault-injection top with every
// parameter at its default (TMR counter, 8192-entry fault list). The LUT frames of
// both counter instances are downloaded, all 12 LUTs of the FAULTY instance are
// attacked in turn, and the outcomes are read back through the host port. As in
// the counter case study, the triplicated counter must mask every fault: 12
// timeouts, no errors, truth tables restored, GOLDEN LUTs untouched.
module tb_fitop_full;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int AW = 13;
  localparam int LIMIT = 1000, SETC = 16;

  logic clk_fi = 0, clk_cut = 0, rst_n = 0;
  always #5 clk_fi = ~clk_fi;
  always #6 clk_cut = ~clk_cut;

  logic host_we = 0, start = 0, busy, done, mis;
  logic [AW-1:0] host_addr = 0;
  fault_entry_t host_wdata = '0, host_rdata;
  logic [AW:0] num_faults = 0, n_err, n_tmo, n_skp;
  logic load_we = 0;
  far_t load_far = '0;
  logic [5:0] load_word = 0;
  logic [31:0] load_data = 0;
  logic [3:0] gc, fc;

  fitop u_top (
    .clk_fi(clk_fi), .clk_cut(clk_cut), .rst_n(rst_n),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .host_rdata(host_rdata), .start(start), .num_faults(num_faults),
    .timeout_limit(32'(LIMIT)), .set_cycles(16'(SETC)), .busy(busy), .done(done),
    .n_error(n_err), .n_timeout(n_tmo), .n_skipped(n_skp), .load_we(load_we),
    .load_far(load_far), .load_word(load_word), .load_data(load_data),
    .golden_count(gc), .faulty_count(fc), .mismatch(mis));

  int checks = 0, failures = 0;
  int n_mis = 0;
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

  always @(posedge clk_cut) if (busy && mis) n_mis++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] shadow [key_t];
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 4; l++) begin
        place_lut(shadow, fx[k], fy[k], l, INIT_MAJ3);
        place_lut(shadow, fx[k], gy[k], l, INIT_MAJ3);
      end
    repeat (3) @(negedge clk_fi);
    rst_n = 1;
    foreach (shadow[k]) begin
      @(negedge clk_fi);
      load_we = 1; load_far = far_t'(k[37:6]); load_word = k[5:0]; load_data = shadow[k];
    end
    @(negedge clk_fi);
    load_we = 0;
    for (int e = 0; e < 12; e++) begin
      @(negedge clk_fi);
      host_we = 1;
      host_addr = AW'(e);
      host_wdata = '{site: '{x: 7'(fx[e / 4]), y: 8'(fy[e / 4]), lut: lut_id_t'(e % 4)},
                     result: RES_NONE};
    end
    @(negedge clk_fi);
    host_we = 0;
    num_faults = 14'd12;
    start = 1;
    @(negedge clk_fi);
    start = 0;
    wait (done);
    check(n_err == 0 && n_tmo == 12 && n_skp == 0,
          $sformatf("totals err=%0d tmo=%0d skip=%0d", n_err, n_tmo, n_skp));
    check(n_mis == 0, "no comparator interrupt with TMR");
    for (int e = 0; e < 12; e++) begin
      @(negedge clk_fi);
      host_addr = AW'(e);
      @(negedge clk_fi);
      check(host_rdata.result == RES_TIMEOUT, $sformatf("entry %0d outcome", e));
    end
    check(gc == fc, "outputs agree at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

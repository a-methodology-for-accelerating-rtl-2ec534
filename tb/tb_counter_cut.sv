// tb_counter_cut: both counter variants must count 0,1,2,... with the intended
// truth tables. With one LUT complemented, the TMR counter's output must stay
// correct while the plain counter must go wrong.
module tb_counter_cut;
  import fi_pkg::*;
  logic clk = 0, rst = 1;
  logic [63:0] init_t [12];
  logic [63:0] init_p [4];
  logic [3:0]  cnt_t, cnt_p;
  int checks = 0, failures = 0;
  int ref_cnt;

  always #5 clk = ~clk;

  counter_cut #(.TMR(1'b1)) dut_t (.clk(clk), .rst(rst), .lut_init(init_t), .count(cnt_t));
  counter_cut #(.TMR(1'b0)) dut_p (.clk(clk), .rst(rst), .lut_init(init_p), .count(cnt_p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(input int cycles, input bit check_p, output int bad_t,
                               output int bad_p);
    bad_t = 0;
    bad_p = 0;
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      ref_cnt = (ref_cnt + 1) % 16;
      checks++;
      if (int'(cnt_t) != ref_cnt) bad_t++;
      if (check_p) begin
        checks++;
        if (int'(cnt_p) != ref_cnt) bad_p++;
      end
    end
  endtask

  initial begin
    int bt, bp;
    for (int k = 0; k < 12; k++) init_t[k] = 64'hE8E8_E8E8_E8E8_E8E8; // majority of I0..I2
    for (int k = 0; k < 4; k++)  init_p[k] = 64'hAAAA_AAAA_AAAA_AAAA; // I0
    @(negedge clk);
    @(negedge clk);
    checks += 2;
    if (cnt_t != 0) failures++;
    if (cnt_p != 0) failures++;
    rst = 0;
    ref_cnt = 0;
    run_and_check(40, 1, bt, bp);
    failures += bt + bp;
    // complement each TMR LUT in turn for 3 cycles: output must not change
    for (int k = 0; k < 12; k++) begin
      init_t[k] = ~init_t[k];
      run_and_check(3, 0, bt, bp);
      failures += bt;
      init_t[k] = ~init_t[k];
      run_and_check(3, 0, bt, bp);
      failures += bt;
    end
    // complement a plain LUT for one cycle: the count must go wrong and stay wrong
    for (int k = 0; k < 4; k++) begin
      rst = 1;
      @(negedge clk);
      rst = 0;
      ref_cnt = 0;
      init_p[k] = ~init_p[k];
      run_and_check(1, 0, bt, bp);
      init_p[k] = ~init_p[k];
      bp = 0;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        ref_cnt = (ref_cnt + 1) % 16;
        if (int'(cnt_p) != ref_cnt) bp++;
      end
      checks++;
      if (bp != 16) begin
        failures++;
        $display("FAIL plain LUT %0d fault had no effect", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

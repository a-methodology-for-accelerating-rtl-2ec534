// tb_cdc_sync: the output must follow a random input exactly two clocks later and
// start at the reset value.
module tb_cdc_sync;
  logic clk = 0, rst_n = 0, d = 0, q, q1;
  int checks = 0, failures = 0;
  logic hist [3];

  always #5 clk = ~clk;

  cdc_sync #(.STAGES(2), .RESET_VAL(1'b0)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  cdc_sync #(.STAGES(2), .RESET_VAL(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (q !== 1'b0 || q1 !== 1'b1) failures++;
    rst_n = 1;
    hist = '{0, 0, 0};
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("FAIL n=%0d q=%b want %b", n, q, hist[1]);
        end
      end
      hist[1] = hist[0];
      d = 1'($urandom());
      hist[0] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

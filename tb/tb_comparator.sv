// tb_comparator: the mismatch flag must rise one clock after the first differing
// sample, stay set while the outputs agree again, and clear only on reset.
module tb_comparator;
  logic clk = 0, rst = 1, mismatch;
  logic [3:0] g = 0, f = 0;
  int checks = 0, failures = 0;
  bit expect_m;

  always #5 clk = ~clk;

  comparator #(.W(4)) dut (.clk(clk), .rst(rst), .golden(g), .faulty(f), .mismatch(mismatch));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    expect_m = 0;
    for (int n = 0; n < 2000; n++) begin
      if (n % 97 == 0) begin
        rst = 1;
        @(negedge clk);
        rst = 0;
        expect_m = 0;
        checks++;
        if (mismatch) failures++;
      end
      g = 4'($urandom());
      f = ($urandom_range(0, 15) == 0) ? 4'($urandom()) : g;
      @(negedge clk);
      if (g != f) expect_m = 1;
      checks++;
      if (mismatch !== expect_m) begin
        failures++;
        $display("FAIL n=%0d mismatch=%b want %b", n, mismatch, expect_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lut6: random truth tables and inputs; the output must equal the addressed
// truth-table bit, worked out by shifting.
module tb_lut6;
  logic [63:0] init;
  logic [5:0]  i;
  logic        o;
  int checks = 0, failures = 0;

  lut6 dut (.init(init), .i(i), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      init = {$urandom(), $urandom()};
      i    = 6'($urandom_range(0, 63));
      #1;
      checks++;
      if (o !== 1'((init >> i) & 64'd1)) begin
        failures++;
        $display("FAIL init=%h i=%0d o=%b", init, i, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

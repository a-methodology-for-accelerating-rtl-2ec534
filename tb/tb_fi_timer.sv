// tb_fi_timer: timeout must rise at the `limit`-th clock edge after the edge that
// samples start, hold until
// the next start or stop, and never rise after a stop.
module tb_fi_timer;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, running, timeout;
  logic [31:0] limit = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fi_timer #(.CW(32)) dut (.clk(clk), .rst_n(rst_n), .start(start), .stop(stop),
                           .limit(limit), .running(running), .timeout(timeout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      limit = 32'($urandom_range(1, 300));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;  // clock edges after the one that sampled start
      while (!timeout && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != int'(limit)) begin
        failures++;
        $display("FAIL limit=%0d timeout after %0d", limit, cyc);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (!timeout) failures++;
      // a stopped run must not time out
      limit = 32'd20;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (5) @(negedge clk);
      stop = 1;
      @(negedge clk);
      stop = 0;
      repeat (40) @(negedge clk);
      checks++;
      if (timeout || running) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

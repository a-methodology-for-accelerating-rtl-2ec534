// tb_fault_list_ram: random writes through both ports against a model array,
// read back through both ports with one cycle of latency; port B wins a collision.
module tb_fault_list_ram;
  import fi_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  fault_entry_t a_wdata, b_wdata, a_rdata, b_rdata;
  fault_entry_t model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fault_list_ram #(.DEPTH(DEPTH)) dut (
    .clk(clk), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_wdata = '0;
    b_wdata = '0;
    // fill from port A
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      a_we = 1;
      a_addr = 8'(n);
      a_wdata = fault_entry_t'($urandom());
      model[n] = a_wdata;
    end
    @(negedge clk);
    a_we = 0;
    for (int n = 0; n < 3000; n++) begin
      fault_entry_t ea, eb;
      a_we = 1'($urandom());
      b_we = 1'($urandom());
      a_addr = 8'($urandom());
      b_addr = ($urandom_range(0, 7) == 0) ? a_addr : 8'($urandom());
      a_wdata = fault_entry_t'($urandom());
      b_wdata = fault_entry_t'($urandom());
      ea = model[a_addr];
      eb = model[b_addr];
      @(negedge clk);
      checks += 2;
      if (a_rdata !== ea) failures++;
      if (b_rdata !== eb) failures++;
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fi_timer: timeout timer of the fault-injection system.
//
// Every injected fault is treated as latent or silent unless the comparator
// reports a difference before this timer expires. start loads the limit and begins
// counting clock cycles; timeout rises after exactly `limit` cycles and stays high
// until the next start or stop. stop halts the timer without a timeout. The 32-bit
// cycle count is this design's choice.
module fi_timer #(
  parameter int CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop,
  input  logic [CW-1:0] limit,
  output logic          running,
  output logic          timeout
);
  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      running   <= 1'b0;
      timeout   <= 1'b0;
    end else if (start) begin
      remaining <= limit;
      running   <= (limit != '0);
      timeout   <= (limit == '0);
    end else if (stop) begin
      running   <= 1'b0;
      timeout   <= 1'b0;
    end else if (running) begin
      if (remaining == CW'(1)) begin
        running <= 1'b0;
        timeout <= 1'b1;
      end
      remaining <= remaining - CW'(1);
    end
  end
endmodule

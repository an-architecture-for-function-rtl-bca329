// acc_compare: the compare functions used through a function pointer in the
// document's sorting example, int less(int a, int b) { return a < b; } and
// int greater(int a, int b) { return a > b; }, as a minimal-interface
// accelerator. GREATER selects which of the two is built.
//
// Signed 32-bit compare; return_port is 1 or 0. Timing as acc_sum: done_port
// pulses one cycle after start_port is first seen. Both instances share one
// register layout (two parameters, one return value), which is what lets a
// single call site reach either of them through a pointer.
module acc_compare
  import hwcall_pkg::*;
#(
  parameter bit GREATER = 1'b0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_port,
  output logic          done_port,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] return_port
);
  logic armed_q, result;

  assign result = GREATER ? ($signed(a) > $signed(b)) : ($signed(a) < $signed(b));

  always_ff @(posedge clk) begin
    if (rst) begin
      armed_q     <= 1'b0;
      done_port   <= 1'b0;
      return_port <= '0;
    end else begin
      armed_q   <= start_port;
      done_port <= start_port && !armed_q;
      if (start_port && !armed_q) return_port <= DW'(result);
    end
  end
endmodule

// acc_sum: the `sum` function of the document's examples, int sum(int a,
// int b) { return a + b; }, as an accelerator with the minimal interface.
//
// start_port is a level held by the wrapper's controller until done_port; the
// core computes on the first cycle it sees start and pulses done_port (with
// return_port valid) one cycle later. It fires again only after start has
// fallen. No memory channel: the function touches no memory.
module acc_sum
  import hwcall_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start_port,
  output logic          done_port,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] return_port
);
  logic armed_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed_q     <= 1'b0;
      done_port   <= 1'b0;
      return_port <= '0;
    end else begin
      armed_q   <= start_port;
      done_port <= start_port && !armed_q;
      if (start_port && !armed_q) return_port <= a + b;
    end
  end
endmodule

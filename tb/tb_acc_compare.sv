// tb_acc_compare: a less and a greater instance side by side on random and
// equal signed operands; done_port one cycle after start, result 1 or 0.
module tb_acc_compare;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start_port, done_l, done_g;
  logic [31:0] a, b, ret_l, ret_g;
  int checks = 0, failures = 0;

  acc_compare #(.GREATER(1'b0)) u_less (.clk, .rst, .start_port, .done_port(done_l), .a, .b, .return_port(ret_l));
  acc_compare #(.GREATER(1'b1)) u_greater (.clk, .rst, .start_port, .done_port(done_g), .a, .b, .return_port(ret_g));

  initial begin
    start_port = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      a = $urandom_range(0, 20) - 10; b = (k % 5 == 0) ? a : $urandom_range(0, 20) - 10;
      if (k % 7 == 0) a = $urandom;
      @(negedge clk); start_port = 1;
      @(negedge clk);
      checks++;
      if (!done_l || !done_g || ret_l !== 32'($signed(a) < $signed(b)) || ret_g !== 32'($signed(a) > $signed(b))) begin
        failures++; $display("FAIL: a=%0d b=%0d less=%0d greater=%0d", $signed(a), $signed(b), ret_l, ret_g);
      end
      @(negedge clk); start_port = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_acc_sum: random operands; start_port is held as the wrapper's controller
// holds it. done_port must pulse exactly once, one cycle after start is first
// seen, with return_port = a + b, and not again while start stays high.
module tb_acc_sum;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start_port, done_port;
  logic [31:0] a, b, return_port;
  int checks = 0, failures = 0;

  acc_sum dut (.clk, .rst, .start_port, .done_port, .a, .b, .return_port);

  initial begin
    start_port = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      int lat, dones;
      a = $urandom; b = $urandom;
      @(negedge clk); start_port = 1;
      lat = 0; dones = 0;
      do begin @(negedge clk); lat++; end while (!done_port && lat < 10);
      checks++;
      if (lat != 1 || return_port !== a + b) begin
        failures++; $display("FAIL: %h + %h = %h after %0d cycles", a, b, return_port, lat);
      end
      repeat (3) begin @(negedge clk); if (done_port) dones++; end
      start_port = 0;
      checks++;
      if (dones != 0) begin failures++; $display("FAIL: repeated done while start held"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

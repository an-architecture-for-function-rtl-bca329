// tb_wb_if_controller: walks the A -> B -> C -> A cycle and checks that
// events that do not belong to the current state are ignored (the lock), and
// that start_port is high exactly in B.
module tb_wb_if_controller;
  import hwcall_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ctrl_wr, ctrl_rd, done_port, start_port;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  wb_if_controller dut (.clk, .rst, .ctrl_wr, .ctrl_rd, .done_port, .start_port, .state);

  task automatic step(input bit w, input bit r, input bit d, input ctrl_state_e exp);
    @(negedge clk);
    ctrl_wr = w; ctrl_rd = r; done_port = d;
    @(posedge clk); #1;
    ctrl_wr = 0; ctrl_rd = 0; done_port = 0;
    checks++;
    if (state !== exp || start_port !== (exp == CTRL_BUSY)) begin
      failures++;
      $display("FAIL: w%0b r%0b d%0b -> %s start=%b, want %s", w, r, d, state.name(), start_port, exp.name());
    end
  endtask

  initial begin
    ctrl_wr = 0; ctrl_rd = 0; done_port = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 3; k++) begin
      step(0, 1, 0, CTRL_IDLE);  // read in A: stays
      step(0, 0, 1, CTRL_IDLE);  // done in A: ignored
      step(1, 0, 0, CTRL_BUSY);  // W
      step(1, 0, 0, CTRL_BUSY);  // second start ignored
      step(0, 1, 0, CTRL_BUSY);  // polling read in B
      step(0, 0, 0, CTRL_BUSY);
      step(0, 0, 1, CTRL_DONE);  // D
      step(1, 0, 0, CTRL_DONE);  // write in C ignored
      step(0, 0, 1, CTRL_DONE);
      step(0, 1, 0, CTRL_IDLE);  // R
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

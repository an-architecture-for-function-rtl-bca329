// tb_notify_caller: done_port with a notification address must produce one
// Wishbone write of NOTIFY_DATA to that address, held until ack; done_port
// with address 0 must produce nothing. The slave's ack delay is random.
module tb_notify_caller;
  import hwcall_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic done_port, busy;
  logic [31:0] notify_addr;
  wb_req_t wbm_o;
  wb_rsp_t wbm_i;
  int checks = 0, failures = 0, writes = 0;
  logic [31:0] last_adr, last_dat;

  notify_caller #(.NOTIFY_DATA(32'h0000_0300)) dut (.clk, .rst, .done_port, .notify_addr, .busy, .wbm_o, .wbm_i);

  // Slave with random latency, counting completed write cycles.
  int wait_n;
  always @(posedge clk) begin
    wbm_i.ack <= 1'b0;
    if (wbm_o.cyc && wbm_o.stb && !wbm_i.ack) begin
      if (wait_n == 0) begin
        wbm_i.ack <= 1'b1;
        if (wbm_o.we) begin writes++; last_adr = wbm_o.adr; last_dat = wbm_o.dat; end
        wait_n = $urandom_range(0, 4);
      end else wait_n--;
    end
  end

  initial begin
    wbm_i = '0; wait_n = 2; done_port = 0; notify_addr = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 20; k++) begin
      int n_before;
      logic [31:0] a;
      n_before = writes;
      a = (k % 4 == 3) ? 32'h0 : ($urandom & 32'hFFFF_FFFC) | 32'h4;
      @(negedge clk); notify_addr = a; done_port = 1;
      @(negedge clk); done_port = 0; notify_addr = $urandom;
      repeat (12) @(posedge clk);
      checks++;
      if (a == 0) begin
        if (writes != n_before) begin failures++; $display("FAIL: wrote without address"); end
      end else if (writes != n_before + 1 || last_adr != a || last_dat != 32'h300) begin
        failures++;
        $display("FAIL: notify %h: writes %0d->%0d adr %h dat %h", a, n_before, writes, last_adr, last_dat);
      end
      checks++;
      if (busy || wbm_o.cyc) begin failures++; $display("FAIL: still busy after ack"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

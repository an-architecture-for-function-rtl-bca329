// tb_builtin_wait_call: two instances, the default one (one argument and a
// return value, the configuration of the document's state diagram) and one
// with three arguments and no return value. A behavioural bus model answers
// every memory operation after a random delay and logs it; a callee model
// sends the notification write on the slave chain some cycles after its
// control register is written. For each call the log must be exactly:
// argument writes to fun+4..., the control write carrying CALL_SITE_ADDR,
// then (with a return value) the read of fun+4*(NP+1) and the write of that
// value to ret_addr, then the release read of fun; the return value must not
// be read before the notification, and done must pulse once at the end.
module tb_builtin_wait_call;
  import hwcall_pkg::*;
  localparam logic [31:0] SITE0 = 32'h0000_0180, SITE1 = 32'h0000_0280;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- instance 0: NP = 1, HAS_RET = 1 (defaults apart from the site)
  logic          start0, done0;
  logic [31:0]   fun0, ret_addr0;
  logic [31:0]   par0 [1];
  mem_req_t      mout0, s_in0;
  mem_rsp_t      min0, s_out0;
  builtin_wait_call #(.CALL_SITE_ADDR(SITE0)) dut0 (
    .clk, .rst, .start(start0), .fun_addr(fun0), .params(par0), .ret_addr(ret_addr0),
    .done(done0), .mout(mout0), .min(min0), .s_in(s_in0), .s_out(s_out0)
  );

  // ---- instance 1: NP = 3, HAS_RET = 0
  logic          start1, done1;
  logic [31:0]   fun1, ret_addr1;
  logic [31:0]   par1 [3];
  mem_req_t      mout1, s_in1;
  mem_rsp_t      min1, s_out1;
  builtin_wait_call #(.NP(3), .HAS_RET(1'b0), .CALL_SITE_ADDR(SITE1)) dut1 (
    .clk, .rst, .start(start1), .fun_addr(fun1), .params(par1), .ret_addr(ret_addr1),
    .done(done1), .mout(mout1), .min(min1), .s_in(s_in1), .s_out(s_out1)
  );

  // ---- bus + callee model (one per instance)
  typedef struct { bit we; logic [31:0] addr; logic [31:0] data; } op_t;
  op_t log0 [$], log1 [$];
  logic [31:0] retval0;
  bit notified0, notified1, early_read0;
  int dones0, dones1;

  task automatic serve(input int which);
    forever begin
      mem_req_t r;
      @(negedge clk);
      r = (which == 0) ? mout0 : mout1;
      if (r.we || r.oe) begin
        op_t o;
        o.we = r.we; o.addr = r.addr; o.data = r.wdata;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        if (which == 0) begin
          if (r.oe && r.addr == fun0 + 8 && !notified0) early_read0 = 1;
          min0.rdata = (r.oe && r.addr == fun0 + 8) ? retval0 : 32'h0000_0002;
          log0.push_back(o);
          min0.rdy = 1; @(negedge clk); min0.rdy = 0;
        end else begin
          min1.rdata = 32'h2;
          log1.push_back(o);
          min1.rdy = 1; @(negedge clk); min1.rdy = 0;
        end
      end
    end
  endtask

  task automatic notify(input int which);
    logic [31:0] site;
    site = (which == 0) ? SITE0 : SITE1;
    repeat ($urandom_range(3, 10)) @(negedge clk);
    if (which == 0) begin
      s_in0 = '{we: 1'b1, oe: 1'b0, addr: site, wdata: 32'h300, size: 8'd32};
      do @(negedge clk); while (!s_out0.rdy);
      s_in0 = '0; notified0 = 1;
    end else begin
      s_in1 = '{we: 1'b1, oe: 1'b0, addr: site, wdata: 32'h300, size: 8'd32};
      do @(negedge clk); while (!s_out1.rdy);
      s_in1 = '0; notified1 = 1;
    end
  endtask

  always @(negedge clk) begin
    if (done0) dones0++;
    if (done1) dones1++;
  end

  // Watch for the control write and answer with the notification.
  initial forever begin
    @(negedge clk);
    if (mout0.we && mout0.addr == fun0 && !notified0) begin
      while (mout0.we && mout0.addr == fun0) @(negedge clk);
      notify(0);
    end
  end
  initial forever begin
    @(negedge clk);
    if (mout1.we && mout1.addr == fun1 && !notified1) begin
      while (mout1.we && mout1.addr == fun1) @(negedge clk);
      notify(1);
    end
  end

  initial begin
    start0 = 0; start1 = 0; min0 = '0; min1 = '0; s_in0 = '0; s_in1 = '0;
    fun0 = 0; fun1 = 0; par0[0] = 0; par1 = '{0, 0, 0}; ret_addr0 = 0; ret_addr1 = 0;
    dones0 = 0; dones1 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    fork serve(0); serve(1); join_none

    for (int k = 0; k < 8; k++) begin
      int d0;
      log0.delete(); notified0 = 0; early_read0 = 0; d0 = dones0;
      fun0 = 32'h400 + 32'h100 * $urandom_range(0, 7);
      par0[0] = $urandom; ret_addr0 = 32'h1000 + 4 * $urandom_range(0, 63); retval0 = $urandom;
      @(negedge clk); start0 = 1; @(negedge clk); start0 = 0;
      fun0 = fun0; par0[0] = par0[0];
      wait (dones0 == d0 + 1);
      repeat (3) @(negedge clk);
      check(log0.size() == 5, $sformatf("call %0d: %0d bus operations, want 5", k, log0.size()));
      if (log0.size() == 5) begin
        check(log0[0].we && log0[0].addr == fun0 + 4 && log0[0].data == par0[0], "argument write");
        check(log0[1].we && log0[1].addr == fun0 && log0[1].data == SITE0, "control write with call site");
        check(!log0[2].we && log0[2].addr == fun0 + 8, "return value read");
        check(log0[3].we && log0[3].addr == ret_addr0 && log0[3].data == retval0, "return value stored");
        check(!log0[4].we && log0[4].addr == fun0, "release read of control register");
      end
      check(!early_read0, "return read only after notification");
      check(dones0 == d0 + 1, "one done pulse");
    end

    for (int k = 0; k < 4; k++) begin
      int d1;
      log1.delete(); notified1 = 0; d1 = dones1;
      fun1 = 32'h800 + 32'h100 * k;
      foreach (par1[i]) par1[i] = $urandom;
      @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
      wait (dones1 == d1 + 1);
      repeat (3) @(negedge clk);
      check(log1.size() == 5, $sformatf("void call %0d: %0d bus operations, want 5", k, log1.size()));
      if (log1.size() == 5) begin
        for (int i = 0; i < 3; i++)
          check(log1[i].we && log1[i].addr == fun1 + 4 * (i + 1) && log1[i].data == par1[i],
                $sformatf("argument %0d write", i));
        check(log1[3].we && log1[3].addr == fun1 && log1[3].data == SITE1, "control write");
        check(!log1[4].we && log1[4].addr == fun1, "release read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

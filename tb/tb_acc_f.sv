// tb_acc_f: the f core with a behavioural model of the sort accelerator and
// of the bus around it. When f writes sort's control register, the model
// checks the arguments f passed (vec address, 3, less for a != 0, greater
// otherwise), sorts f's array by reading and writing it through f's slave
// chain the way the real sort does over the bus, then sends the notification
// write to the call-site address and expects the release read. Checks: the
// arguments, the array contents seen by the model ('b','c','a' at every
// call), the sorted result read back through the slave chain, exactly one
// done pulse per call, and that an address outside vec reads as 0.
module tb_acc_f;
  import hwcall_pkg::*;
  localparam logic [31:0] SORT = 32'h300, LESS = 32'h400, GREATER = 32'h500;
  localparam logic [31:0] VEC = 32'h640, SITE = 32'h680;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_port, done_port;
  logic [31:0] a;
  mem_req_t mout, s_in;
  mem_rsp_t min, s_out;

  acc_f #(.SORT_ADDR(SORT), .LESS_ADDR(LESS), .GREATER_ADDR(GREATER),
          .VEC_ADDR(VEC), .CALL_SITE_ADDR(SITE)) dut (
    .clk, .rst, .start_port, .done_port, .a, .mout, .min, .s_in, .s_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] sort_reg [4];
  int releases, starts;
  bit s_busy;

  task automatic slave_op(input mem_req_t r, output logic [31:0] rdata);
    while (s_busy) @(negedge clk);
    s_busy = 1;
    s_in = r;
    do @(negedge clk); while (!s_out.rdy);
    rdata = s_out.rdata;
    s_in = '0;
    s_busy = 0;
  endtask

  task automatic vec_rd(input int i, output logic [31:0] v);
    slave_op('{we: 1'b0, oe: 1'b1, addr: VEC + 4 * i, wdata: 32'h0, size: 8'd8}, v);
  endtask

  task automatic vec_wr(input int i, input logic [7:0] v);
    logic [31:0] unused;
    slave_op('{we: 1'b1, oe: 1'b0, addr: VEC + 4 * i, wdata: {24'hABCDEF, v}, size: 8'd8}, unused);
  endtask

  // Behavioural sort: same bubble-sort order as the real accelerator.
  task automatic model_sort(input logic [31:0] vaddr, input int n, input logic [31:0] cmp);
    logic [31:0] x, y, unused;
    logic [7:0] init [3];
    bit swap;
    init = '{"b", "c", "a"};
    check(vaddr == VEC && n == 3, "f passes vec and 3");
    check(cmp == ((a != 0) ? LESS : GREATER), "f passes the compare pointer chosen by a");
    for (int i = 0; i < 3; i++) begin
      vec_rd(i, x);
      check(x == {24'h0, init[i]}, $sformatf("vec[%0d] initialised", i));
    end
    for (int p = 0; p < n - 1; p++)
      for (int i = 1; i < n; i++) begin
        vec_rd(i, x);
        vec_rd(i - 1, y);
        swap = (cmp == LESS) ? (x < y) : (x > y);
        if (swap) begin
          vec_wr(i, y[7:0]);
          vec_wr(i - 1, x[7:0]);
        end
      end
    repeat ($urandom_range(1, 5)) @(negedge clk);
    slave_op('{we: 1'b1, oe: 1'b0, addr: SITE, wdata: SORT, size: 8'd32}, unused);
  endtask

  initial begin : bus_model
    logic [31:0] rd;
    forever begin
      @(negedge clk);
      if (mout.we || mout.oe) begin
        mem_req_t r;
        r = mout;
        rd = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        check(r.addr >= SORT && r.addr < SORT + 16, $sformatf("f addresses sort only (%h)", r.addr));
        if (r.we) begin
          sort_reg[(r.addr - SORT) >> 2] = r.wdata;
          if (r.addr == SORT) begin
            starts++;
            check(r.wdata == SITE, "control write carries the call site");
            fork model_sort(sort_reg[1], sort_reg[2], sort_reg[3]); join_none
          end
        end else if (r.addr == SORT) begin
          rd = 2;
          releases++;
        end
        min.rdata = rd; min.rdy = 1;
        @(negedge clk);
        min.rdy = 0;
      end
    end
  end

  initial begin
    logic [31:0] v;
    logic [7:0] want [3];
    start_port = 0; a = 0; min = '0; s_in = '0; s_busy = 0;
    releases = 0; starts = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      int dones, r0, s0;
      a = (k < 2) ? 32'(k) : (($urandom_range(0, 1) == 1) ? $urandom : 32'd0);
      r0 = releases; s0 = starts;
      @(negedge clk); start_port = 1;
      do @(negedge clk); while (!done_port);
      start_port = 0;
      dones = 0;
      repeat (4) begin @(negedge clk); if (done_port) dones++; end
      check(dones == 0, "single done pulse");
      check(starts == s0 + 1 && releases == r0 + 1, "one call and one release per f");
      if (a != 0) want = '{"a", "b", "c"}; else want = '{"c", "b", "a"};
      for (int i = 0; i < 3; i++) begin
        vec_rd(i, v);
        check(v == {24'h0, want[i]}, $sformatf("f(%0d): vec[%0d] = %0d", a, i, v));
      end
      slave_op('{we: 1'b0, oe: 1'b1, addr: VEC + 32'h10, wdata: 32'h0, size: 8'd32}, v);
      check(v == 0, "address outside vec reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

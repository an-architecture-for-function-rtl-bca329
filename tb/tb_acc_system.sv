// tb_acc_system: end-to-end test of the accelerator cluster at its default
// parameters.
//
// A RAM model sits on the external slave port; the testbench plays the
// outside master (the role software or a test harness takes) on the external
// master port and issues calls the way a processor would: it writes the
// parameters, writes the control register, polls it until the done state and
// reads the return register. Scenarios:
//   1. funA(a, b, c) for several random operands: funA calls sum through the
//      non-inlined mechanism; the result must be c * (a + b).
//   2. sum called directly with a notification address in RAM: the
//      notification write must land there.
//   3. sort on vectors in RAM, with compare = less and compare = greater
//      (function pointer calls); the RAM must end up sorted both ways.
//   4. a second start written while sort is busy must be ignored (lock).
//   5. f(a) for a = 1, 0 and random: f calls sort on its own local array
//      {'b','c','a'} with less or greater; the array, read back over the
//      bus, must be "abc" or "cba".
// Mechanisms counted and required at least once: non-inlined calls, function
// pointer calls to each compare function, notifications between accelerators
// and to RAM, internal loop-back stores, bus contention between two
// masters, a rejected start, calls of sort by f and sort's bus accesses to
// f's local array. Call overhead of the funA->sum call is printed.
module tb_acc_system;
  import hwcall_pkg::*;

  localparam logic [31:0] FUNA = 32'h100, SUM = 32'h200, SORT = 32'h300,
                          LESS = 32'h400, GREATER = 32'h500, F = 32'h600;
  localparam logic [31:0] RAM = 32'h1000, NOTE = 32'h1F00;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  wb_req_t ext_m_req, ext_s_req;
  wb_rsp_t ext_m_rsp, ext_s_rsp;
  logic [5:0] irq;
  int notes_in_ram;

  acc_system dut (
    .clk, .rst, .ext_m_req, .ext_m_rsp, .ext_s_req, .ext_s_rsp, .irq
  );

  tb_wb_mem #(.DEPTH(1024), .BASE(RAM), .WATCH_ADDR(NOTE)) u_ram (
    .clk, .rst, .req(ext_s_req), .rsp(ext_s_rsp), .watch_writes(notes_in_ram)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ bus master
  task automatic wb_write(input logic [31:0] adr, input logic [31:0] dat);
    @(negedge clk);
    ext_m_req = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: adr, dat: dat, sel: 4'hF};
    do @(negedge clk); while (!ext_m_rsp.ack);
    ext_m_req = WB_REQ_IDLE;
  endtask

  task automatic wb_read(input logic [31:0] adr, output logic [31:0] dat);
    @(negedge clk);
    ext_m_req = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: adr, dat: '0, sel: 4'hF};
    do @(negedge clk); while (!ext_m_rsp.ack);
    dat = ext_m_rsp.dat;
    ext_m_req = WB_REQ_IDLE;
  endtask

  logic [31:0] last_ctrl;
  task automatic wait_done(input logic [31:0] base);
    logic [31:0] st;
    // A polling loop leaves the bus idle between reads, as the instructions
    // of a software loop would; a master that re-requests in the very next
    // cycle keeps the bus under the intercon's policy and starves the others.
    do begin
      repeat (4) @(negedge clk);
      wb_read(base, st);
    end while (st[1:0] != 2'd2);
    last_ctrl = st;
  endtask

  // ------------------------------------------------------ event counters

  // Call-overhead probe on the funA -> sum call: cycles from the builtin's
  // start to sum's start_port (parameters + control write), from sum's
  // done_port to the builtin seeing the notification, and the whole call seen
  // by funA minus the cycles sum itself computed. The smallest values over
  // the calls are kept (the bus is otherwise quiet in scenario 1).
  int t_b0, t_s1, t_d, ph_start, ph_notify, ph_total;
  int min_start = 1 << 30, min_notify = 1 << 30, min_total = 1 << 30, n_probe = 0;
  bit b_start_q, s_start_q, notified_q;
  always @(negedge clk) if (!rst) begin
    if (dut.u_funa.u_call.start && !b_start_q) t_b0 = cycle;
    if (dut.sum_start && !s_start_q) begin
      t_s1 = cycle;
      ph_start = t_s1 - t_b0;
    end
    if (dut.sum_done) t_d = cycle;
    if (dut.u_funa.u_call.notified && !notified_q) ph_notify = cycle - t_d;
    if (dut.u_funa.u_call.done) begin
      ph_total = (cycle - t_b0) - (t_d - t_s1 + 1);
      n_probe++;
      if (ph_start < min_start) min_start = ph_start;
      if (ph_notify < min_notify) min_notify = ph_notify;
      if (ph_total < min_total) min_total = ph_total;
    end
    b_start_q  = dut.u_funa.u_call.start;
    s_start_q  = dut.sum_start;
    notified_q = dut.u_funa.u_call.notified;
  end


  // Calls of sort made by f (sort started while f is busy), and accesses by
  // sort to f's local array over the bus (f's slave chain fed from its
  // Wishbone slave).
  int n_f_sort = 0, n_remote_vec = 0;
  bit sort_start_q;
  always @(negedge clk) if (!rst) begin
    if (dut.sort_start && !sort_start_q && dut.f_start) begin
      n_f_sort++;
      check(dut.sort_par[0] == F + 32'h40 && dut.sort_par[1] == 3,
            "f passes vec and 3 to sort");
    end
    sort_start_q = dut.sort_start;
    if (dut.f_sout.rdy && (dut.f_s.we || dut.f_s.oe) && dut.s_req[5].cyc
        && dut.f_s.addr >= F + 32'h40 && dut.f_s.addr < F + 32'h4C)
      n_remote_vec++;
  end

  int n_sum_calls = 0, n_less = 0, n_greater = 0, n_internal = 0;
  int n_notify = 0, n_contention = 0, n_rejected = 0;
  always @(negedge clk) if (!rst) begin
    if (dut.u_sum.done_port) n_sum_calls++;
    if (dut.g_cmp[0].u_cmp.done_port) n_less++;
    if (dut.g_cmp[1].u_cmp.done_port) n_greater++;
    if (dut.u_funa_wrap.internal && dut.u_funa.s_in.we && dut.u_funa.s_out.rdy) n_internal++;
    if (dut.u_sort_wrap.internal && dut.u_sort.s_in.we && dut.u_sort.s_out.rdy) n_internal++;
    for (int i = 0; i < 5; i++)
      if (dut.u_intercon.m_req[i].cyc && dut.u_intercon.m_req[i].we &&
          dut.u_intercon.state == 2'd1 && dut.u_intercon.gnt == 3'(i) &&
          (dut.u_intercon.m_req[i].adr & 32'hFF) == 32'h80) n_notify++;
    if ($countones(dut.u_intercon.cyc_vec) > 1) n_contention++;
  end

  // --------------------------------------------------------------- scenario
  logic [31:0] rd, a, b, c;
  int t0, t_call;
  logic [7:0] vec [16];
  logic [7:0] ref_v [16];

  task automatic run_sort(input int n, input logic [31:0] cmp, input bit ascending);
    for (int i = 0; i < n; i++) wb_write(RAM + 4*i, {24'b0, vec[i]});
    wb_write(SORT + 4, RAM);
    wb_write(SORT + 8, n);
    wb_write(SORT + 12, cmp);
    wb_write(SORT, 32'h0);
    if (n > 2) begin
      // Second start while busy: must be ignored, parameters unchanged.
      wb_write(SORT + 8, 32'd1);
      wb_write(SORT, 32'h0);
      wb_read(SORT + 8, rd);
      check(rd == n, "parameter write while busy was ignored");
      if (rd == n) n_rejected++;
    end
    wait_done(SORT);
    // Reference: sort a copy.
    for (int i = 0; i < n; i++) ref_v[i] = vec[i];
    for (int p = 0; p < n - 1; p++)
      for (int i = 1; i < n; i++)
        if (ascending ? (ref_v[i] < ref_v[i-1]) : (ref_v[i] > ref_v[i-1])) begin
          logic [7:0] t; t = ref_v[i]; ref_v[i] = ref_v[i-1]; ref_v[i-1] = t;
        end
    for (int i = 0; i < n; i++) begin
      wb_read(RAM + 4*i, rd);
      check(rd == {24'b0, ref_v[i]},
            $sformatf("sort n=%0d cmp=%h element %0d: got %0d want %0d", n, cmp, i, rd, ref_v[i]));
    end
  endtask

  initial begin
    ext_m_req = WB_REQ_IDLE;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // 1. funA -> sum non-inlined calls.
    for (int k = 0; k < 6; k++) begin
      a = $urandom_range(0, 1000) - 500;
      b = $urandom_range(0, 1000);
      c = $urandom_range(0, 50);
      wb_write(FUNA + 4, a);
      wb_write(FUNA + 8, b);
      wb_write(FUNA + 12, c);
      t0 = cycle;
      wb_write(FUNA, 32'h0);
      wait_done(FUNA);
      t_call = cycle - t0;
      wb_read(FUNA + 16, rd);
      check(rd == c * (a + b), $sformatf("funA(%0d,%0d,%0d) = %0d", $signed(a), b, c, $signed(rd)));
      wb_read(SUM, rd);
      check(rd[1:0] == 2'd0, "sum released after the call");
      wb_read(SUM + 12, rd);
      check(rd == a + b, "sum return register holds a+b");
    end
    $display("funA call, from control write to observed done: %0d cycles", t_call);
    $display("call overhead (2 parameters): start %0d, notification %0d, whole call minus callee %0d cycles",
             min_start, min_notify, min_total);
    check(n_probe >= 6, "overhead probe saw every funA call");
    check(min_start > 0 && min_notify > 0 && min_total >= min_start + min_notify,
          "call overhead phases are consistent");

    // 2. Notification to an address in RAM.
    wb_write(SUM + 4, 32'd11);
    wb_write(SUM + 8, 32'd31);
    wb_write(SUM, NOTE);
    wait_done(SUM);
    check(last_ctrl[31:2] == NOTE[31:2], "notification address readable in control register");
    check(notes_in_ram == 1, "notification written to RAM");
    wb_read(SUM + 12, rd);
    check(rd == 42, "sum(11,31)");

    // 3. sort through function pointers.
    vec[0] = "b"; vec[1] = "c"; vec[2] = "a";
    run_sort(3, LESS, 1'b1);
    vec[0] = "b"; vec[1] = "c"; vec[2] = "a";
    run_sort(3, GREATER, 1'b0);
    for (int i = 0; i < 8; i++) vec[i] = 8'($urandom_range(0, 255));
    run_sort(8, LESS, 1'b1);
    for (int i = 0; i < 8; i++) vec[i] = 8'($urandom_range(0, 255));
    run_sort(8, GREATER, 1'b0);


    // 3b. f(a): f owns vec = {'b','c','a'} and calls sort(vec, 3, less) when
    // a != 0, sort(vec, 3, greater) otherwise; sort reaches vec over the bus.
    for (int k = 0; k < 4; k++) begin
      logic [31:0] fa;
      logic [7:0] want [3];
      fa = (k == 0) ? 32'd1 : (k == 1) ? 32'd0 : $urandom_range(0, 1) * $urandom;
      if (fa != 0) want = '{"a", "b", "c"}; else want = '{"c", "b", "a"};
      wb_write(F + 4, fa);
      wb_write(F, 32'h0);
      wait_done(F);
      for (int i = 0; i < 3; i++) begin
        wb_read(F + 32'h40 + 4*i, rd);
        check(rd == {24'b0, want[i]},
              $sformatf("f(%0d): vec[%0d] = %0d, want %0d", fa, i, rd, want[i]));
      end
      wb_read(SORT, rd);
      check(rd[1:0] == 2'd0, "sort released after f's call");
    end

    // Contention: start funA and sort together so their masters overlap.
    for (int i = 0; i < 6; i++) vec[i] = 8'($urandom_range(0, 255));
    for (int i = 0; i < 6; i++) wb_write(RAM + 4*i, {24'b0, vec[i]});
    wb_write(SORT + 4, RAM); wb_write(SORT + 8, 6); wb_write(SORT + 12, LESS);
    wb_write(FUNA + 4, 7); wb_write(FUNA + 8, 8); wb_write(FUNA + 12, 9);
    wb_write(SORT, 0);
    wb_write(FUNA, 0);
    wait_done(FUNA);
    wb_read(FUNA + 16, rd);
    check(rd == 135, "funA(7,8,9) while sort runs");
    wait_done(SORT);

    // Mechanisms.
    check(n_sum_calls >= 7, $sformatf("non-inlined calls to sum: %0d", n_sum_calls));
    check(n_less > 0, $sformatf("pointer calls to less: %0d", n_less));
    check(n_greater > 0, $sformatf("pointer calls to greater: %0d", n_greater));
    check(n_notify > 0, $sformatf("notifications between accelerators: %0d", n_notify));
    check(n_internal > 0, $sformatf("internal loop-back stores: %0d", n_internal));
    check(n_contention > 0, $sformatf("cycles with competing masters: %0d", n_contention));
    check(n_rejected > 0, $sformatf("rejected starts: %0d", n_rejected));
    check(n_f_sort >= 4, $sformatf("non-inlined calls of sort by f: %0d", n_f_sort));
    check(n_remote_vec > 0, $sformatf("bus accesses to f's local vec: %0d", n_remote_vec));
    $display("events: sum=%0d less=%0d greater=%0d notify=%0d internal=%0d contention=%0d rejected=%0d f->sort=%0d remote vec=%0d",
             n_sum_calls, n_less, n_greater, n_notify, n_internal, n_contention, n_rejected, n_f_sort, n_remote_vec);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

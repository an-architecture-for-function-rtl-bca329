// tb_acc_sort: the sort core with a behavioural model of its surroundings:
// the wrapper's loop-back for accesses inside sort's own window (tmp and the
// call site), a byte-per-word vector memory, and two compare accelerators
// (less at LESS, greater at GREATER) which answer a control write with a
// notification write after a random delay. Random vectors of random length
// are sorted both ways and compared with a reference sort; the number of
// calls made through the pointer must be exactly (n-1)^2 for n >= 2, all to
// the accelerator passed in `compare`.
module tb_acc_sort;
  import hwcall_pkg::*;
  localparam logic [31:0] TMP = 32'h340, SITE = 32'h380, VEC = 32'h1000;
  localparam logic [31:0] LESS = 32'h400, GREATER = 32'h500;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_port, done_port;
  logic [31:0] vector, n, compare;
  mem_req_t mout, s_in;
  mem_rsp_t min, s_out;

  acc_sort #(.TMP_ADDR(TMP), .CALL_SITE_ADDR(SITE)) dut (
    .clk, .rst, .start_port, .done_port, .vector, .n, .compare,
    .mout, .min, .s_in, .s_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0]  vmem [32];
  logic [31:0] cmp_reg [2][4];
  int calls [2];
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

  task automatic send_notify(input logic [31:0] adr);
    logic [31:0] unused;
    repeat ($urandom_range(1, 6)) @(negedge clk);
    slave_op('{we: 1'b1, oe: 1'b0, addr: adr, wdata: 32'h1, size: 8'd32}, unused);
  endtask

  initial begin : bus_model
    logic [31:0] rd;
    forever begin
      @(negedge clk);
      if (mout.we || mout.oe) begin
        mem_req_t r;
        int c, k;
        r = mout;
        rd = 0;
        if (r.addr >= 32'h300 && r.addr < 32'h400) begin
          slave_op(r, rd);
        end else if (r.addr >= VEC && r.addr < VEC + 128) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          k = (r.addr - VEC) >> 2;
          if (r.we) vmem[k] = r.wdata[7:0];
          else rd = {24'h0, vmem[k]};
        end else if (r.addr >= LESS && r.addr < GREATER + 32'h100) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          c = (r.addr >= GREATER) ? 1 : 0;
          k = (r.addr - (c ? GREATER : LESS)) >> 2;
          if (r.we) begin
            cmp_reg[c][k] = r.wdata;
            if (k == 0) begin
              calls[c]++;
              cmp_reg[c][3] = c ? 32'($signed(cmp_reg[c][1]) > $signed(cmp_reg[c][2]))
                                : 32'($signed(cmp_reg[c][1]) < $signed(cmp_reg[c][2]));
              fork send_notify(r.wdata); join_none
            end
          end else begin
            rd = (k == 0) ? 32'd2 : cmp_reg[c][k];
          end
        end else begin
          check(0, $sformatf("unexpected master access to %h", r.addr));
        end
        min.rdata = rd; min.rdy = 1;
        @(negedge clk);
        min.rdy = 0;
      end
    end
  end

  task automatic run_sort(input int len, input bit desc);
    logic [7:0] ref_q [$];
    bit ok;
    int exp_calls, c0, c1;
    for (int i = 0; i < 32; i++) vmem[i] = 8'($urandom_range(0, 127));
    for (int i = 0; i < len; i++) ref_q.push_back(vmem[i]);
    if (desc) ref_q.rsort(); else ref_q.sort();
    c0 = calls[0]; c1 = calls[1];
    vector = VEC; n = len; compare = desc ? GREATER : LESS;
    @(negedge clk); start_port = 1;
    do @(negedge clk); while (!done_port);
    start_port = 0;
    ok = 1;
    for (int i = 0; i < len; i++) if (vmem[i] != ref_q[i]) ok = 0;
    check(ok, $sformatf("sort n=%0d desc=%0d", len, desc));
    exp_calls = (len >= 2) ? (len - 1) * (len - 1) : 0;
    check(desc ? (calls[1] - c1 == exp_calls && calls[0] == c0)
               : (calls[0] - c0 == exp_calls && calls[1] == c1),
          $sformatf("call count n=%0d", len));
    @(negedge clk);
  endtask

  initial begin
    start_port = 0; vector = 0; n = 0; compare = 0; min = '0; s_in = '0;
    s_busy = 0; calls[0] = 0; calls[1] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run_sort(0, 0);
    run_sort(1, 1);
    run_sort(2, 0);
    for (int k = 0; k < 16; k++) run_sort($urandom_range(2, 10), k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_acc_funa: the funA core with a behavioural model of everything around
// it: the wrapper's loop-back (master-chain accesses inside funA's window are
// passed onto its slave chain), the bus and the sum accelerator (registers at
// SUM_ADDR; a control write is answered, after a random delay, by a
// notification write to the address written). Checks, for random operands:
// return_port = c * (a + b), one done pulse, sum received a and b, the control
// write carried the call-site address, the local variable e was written over
// the slave chain, and the callee was released by a control read.
module tb_acc_funa;
  import hwcall_pkg::*;
  localparam logic [31:0] SUM = 32'h200, E = 32'h140, SITE = 32'h180;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_port, done_port;
  logic [31:0] a, b, c, return_port;
  mem_req_t mout, s_in;
  mem_rsp_t min, s_out;

  acc_funa #(.SUM_ADDR(SUM), .E_ADDR(E), .CALL_SITE_ADDR(SITE)) dut (
    .clk, .rst, .start_port, .done_port, .a, .b, .c, .return_port,
    .mout, .min, .s_in, .s_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] sum_reg [4];
  int site_writes, e_writes, releases;
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
    repeat ($urandom_range(2, 8)) @(negedge clk);
    slave_op('{we: 1'b1, oe: 1'b0, addr: adr, wdata: SUM, size: 8'd32}, unused);
  endtask

  initial begin : bus_model
    logic [31:0] rd;
    forever begin
      @(negedge clk);
      if (mout.we || mout.oe) begin
        mem_req_t r;
        r = mout;
        if (r.addr >= 32'h100 && r.addr < 32'h200) begin
          if (r.we && r.addr == E) e_writes++;
          slave_op(r, rd);
        end else begin
          repeat ($urandom_range(1, 4)) @(negedge clk);
          rd = 0;
          if (r.we) begin
            sum_reg[(r.addr - SUM) >> 2] = r.wdata;
            if (r.addr == SUM) begin
              if (r.wdata == SITE) site_writes++;
              sum_reg[3] = sum_reg[1] + sum_reg[2];
              fork send_notify(r.wdata); join_none
            end
          end else begin
            if (r.addr == SUM) begin rd = 2; releases++; end
            else rd = sum_reg[(r.addr - SUM) >> 2];
          end
        end
        min.rdata = rd; min.rdy = 1;
        @(negedge clk);
        min.rdy = 0;
      end
    end
  end

  initial begin
    start_port = 0; a = 0; b = 0; c = 0; min = '0; s_in = '0; s_busy = 0;
    site_writes = 0; e_writes = 0; releases = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 20; k++) begin
      int dones, s0, e0, r0;
      a = $urandom_range(0, 2000) - 1000; b = $urandom; c = $urandom_range(0, 99);
      s0 = site_writes; e0 = e_writes; r0 = releases;
      @(negedge clk); start_port = 1;
      dones = 0;
      do @(negedge clk); while (!done_port);
      check(return_port == c * (a + b), $sformatf("funA(%0d,%0d,%0d) = %0d", a, b, c, return_port));
      check(sum_reg[1] == a && sum_reg[2] == b, "sum received a and b");
      check(site_writes == s0 + 1 && e_writes == e0 + 1 && releases == r0 + 1,
            "call site, store of e, release");
      start_port = 0;
      repeat (4) begin @(negedge clk); if (done_port) dones++; end
      check(dones == 0, "single done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

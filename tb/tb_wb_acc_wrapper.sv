// tb_wb_acc_wrapper: the wrapper around a behavioural accelerator core.
//
// The testbench is the Wishbone master on the slave port, the Wishbone slave
// on the master port, and the core (start/done, master chain requests, a
// one-word local memory on the slave chain). Checks:
//   * parameter registers read back; the control register reads state 0;
//   * a control write starts the core (start_port), parameter writes are
//     ignored while busy, the control register shows busy and the
//     notification address; done_port loads the return register, sets irq
//     and produces one notification write (address, data = BASE);
//   * the control read in the done state returns the core to idle;
//   * a master-chain access outside the window becomes a Wishbone cycle with
//     the right sel, and the ack/read data come back as DataRdy/Rdata;
//   * a master-chain access inside the window stays internal (no Wishbone
//     cycle) and reaches the slave chain;
//   * a Wishbone access to a non-register word of the window reaches the
//     slave chain with the filtered address and the size from sel.
module tb_wb_acc_wrapper;
  import hwcall_pkg::*;
  localparam logic [31:0] BASE = 32'h0000_0300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wb_req_t wbs_i, wbm_o;
  wb_rsp_t wbs_o, wbm_i;
  logic irq, core_start, core_done;
  logic [31:0] core_params [2];
  logic [31:0] core_ret;
  mem_req_t core_mout, core_s;
  mem_rsp_t core_min, core_sout;

  wb_acc_wrapper #(.BASE(BASE), .MAX_OFFSET(32'hFF), .NP(2), .HAS_RET(1'b1), .HAS_SLAVE(1'b1)) dut (
    .clk, .rst, .wbs_i, .wbs_o, .wbm_o, .wbm_i, .irq,
    .core_start, .core_done, .core_params, .core_ret,
    .core_mout, .core_min, .core_s, .core_sout
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Core slave chain: one-word memory at BASE+0x40, rdy one cycle later.
  logic [31:0] local_word;
  logic [31:0] last_s_addr;
  logic [7:0]  last_s_size;
  always @(posedge clk) begin
    if (rst) begin core_sout <= '0; local_word <= 0; end
    else begin
      core_sout.rdy <= (core_s.we || core_s.oe) && !core_sout.rdy;
      if ((core_s.we || core_s.oe) && !core_sout.rdy) begin
        last_s_addr <= core_s.addr;
        last_s_size <= core_s.size;
        core_sout.rdata <= local_word;
        if (core_s.we && core_s.addr == BASE + 32'h40) local_word <= core_s.wdata;
      end
    end
  end

  // Wishbone slave on the master port: acks after one cycle, logs writes.
  int notes;
  logic [31:0] note_adr, note_dat, ext_word;
  always @(posedge clk) begin
    if (rst) begin wbm_i <= '0; notes <= 0; ext_word <= 32'h1234_5678; end
    else begin
      wbm_i.ack <= wbm_o.cyc && wbm_o.stb && !wbm_i.ack;
      wbm_i.dat <= ext_word;
      if (wbm_o.cyc && wbm_o.stb && !wbm_i.ack && wbm_o.we) begin
        if (dut.notify_busy) begin notes <= notes + 1; note_adr <= wbm_o.adr; note_dat <= wbm_o.dat; end
        else ext_word <= wbm_o.dat;
      end
    end
  end

  task automatic wb_write(input logic [31:0] adr, input logic [31:0] dat, input logic [3:0] sel = 4'hF);
    @(negedge clk);
    wbs_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: adr, dat: dat, sel: sel};
    do @(negedge clk); while (!wbs_o.ack);
    wbs_i = WB_REQ_IDLE;
  endtask
  task automatic wb_read(input logic [31:0] adr, output logic [31:0] dat);
    @(negedge clk);
    wbs_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: adr, dat: 0, sel: 4'hF};
    do @(negedge clk); while (!wbs_o.ack);
    dat = wbs_o.dat;
    wbs_i = WB_REQ_IDLE;
  endtask
  task automatic core_access(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                             input logic [7:0] size, output logic [31:0] rdat, output bit saw_wb);
    @(negedge clk);
    core_mout = '{we: we, oe: !we, addr: adr, wdata: dat, size: size};
    saw_wb = 0;
    do begin
      @(negedge clk);
      if (wbm_o.cyc) begin
        saw_wb = 1;
        check(wbm_o.adr == adr && wbm_o.we == we && wbm_o.stb, "master cycle signals");
        check(wbm_o.sel == (size == 8 ? 4'h1 : size == 16 ? 4'h3 : 4'hF), "master sel from size");
      end
    end while (!core_min.rdy);
    rdat = core_min.rdata;
    core_mout = '0;
  endtask

  logic [31:0] rd;
  bit saw;
  initial begin
    wbs_i = WB_REQ_IDLE; core_mout = '0; core_done = 0; core_ret = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    wb_write(BASE + 4, 32'd100);
    wb_write(BASE + 8, 32'd23);
    wb_read(BASE + 4, rd);  check(rd == 100, "param a reads back");
    wb_read(BASE + 8, rd);  check(rd == 23, "param b reads back");
    wb_read(BASE, rd);      check(rd[1:0] == 0, "idle state");
    check(!core_start, "no start before control write");

    wb_write(BASE, 32'h0000_2F00);
    check(core_start && core_params[0] == 100 && core_params[1] == 23, "start with parameters");
    wb_write(BASE + 4, 32'd7);
    check(core_params[0] == 100, "parameter write ignored while busy");
    wb_read(BASE, rd);
    check(rd == 32'h0000_2F01, $sformatf("busy state and notify address: %h", rd));

    @(negedge clk); core_ret = 32'd123; core_done = 1;
    @(negedge clk); core_done = 0;
    check(!core_start && irq, "done: start dropped, irq raised");
    repeat (8) @(negedge clk);
    check(notes == 1 && note_adr == 32'h2F00 && note_dat == BASE,
          $sformatf("notification: %0d writes to %h data %h", notes, note_adr, note_dat));
    wb_read(BASE + 12, rd); check(rd == 123, "return register");
    wb_read(BASE, rd);      check(rd[1:0] == 2, "done state");
    wb_read(BASE, rd);      check(rd[1:0] == 0 && !irq, "released by the control read");

    // Start without notification address: no notification.
    wb_write(BASE, 32'h0);
    @(negedge clk); core_done = 1; @(negedge clk); core_done = 0;
    repeat (8) @(negedge clk);
    check(notes == 1, "no notification with address 0");
    wb_read(BASE, rd);

    // External master-chain accesses.
    core_access(1, 32'h0000_5000, 32'hA5A5_0001, 8'd32, rd, saw);
    check(saw && ext_word == 32'hA5A5_0001, "external write");
    core_access(0, 32'h0000_5000, 0, 8'd8, rd, saw);
    check(saw && rd == 32'hA5A5_0001, "external read");

    // Internal master-chain accesses.
    core_access(1, BASE + 32'h40, 32'h0BAD_F00D, 8'd32, rd, saw);
    check(!saw && local_word == 32'h0BAD_F00D, "internal write stays on the slave chain");
    core_access(0, BASE + 32'h40, 0, 8'd32, rd, saw);
    check(!saw && rd == 32'h0BAD_F00D, "internal read");

    // Wishbone access to the slave chain.
    wb_write(BASE + 32'h40 + 32'h0100_0000 + 1, 32'h7777_0000, 4'h3);
    check(local_word == 32'h7777_0000 && last_s_addr == BASE + 32'h40 && last_s_size == 16,
          $sformatf("slave-chain write: addr %h size %0d", last_s_addr, last_s_size));
    wb_read(BASE + 32'h40, rd);
    check(rd == 32'h7777_0000, "slave-chain read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// wb_acc_wrapper: Wishbone B4 wrapper around an accelerator that has the
// minimal interface (start/done, argument and return ports, master and slave
// memory chains).
//
// It gives the accelerator a memory-mapped interface at BASE: word 0 is the
// control register, words 1..NP the input parameters, word NP+1 the return
// value (when HAS_RET). The rest of the window [BASE, BASE+MAX_OFFSET] belongs
// to the accelerator's slave chain (its local memories and call-site
// notification addresses). Three parts:
//
//  * Register pool. Parameter writes are taken only while the controller is
//    idle. Writing the control register starts the accelerator; bits [31:2]
//    of the written word are kept as the notification address (0 = none).
//    Reading it returns {notification address[31:2], state[1:0]}. The return
//    register is loaded when done_port pulses. Register accesses are acked one
//    cycle after the request.
//  * Interface controller (wb_if_controller, states A/B/C) and notify_caller,
//    which on done_port writes to the notification address through this
//    wrapper's Wishbone master port; while it does so it owns that port.
//  * Interconnection logic. range_checker flags a master-chain address inside
//    this accelerator's own window as `internal`. When internal, the
//    accelerator's master chain is closed onto its slave chain (we, oe, addr,
//    wdata, size muxes) and the slave chain's DataRdy/Rdata go back to the
//    master chain. Otherwise the master chain drives the Wishbone master
//    (cyc = stb = !internal & (we | oe), sel from drs_to_sel) and the slave
//    chain is fed from the Wishbone slave: we only during write cycles, oe only
//    during read cycles, address through addr_filter, size from sel_to_drs,
//    and the slave chain's DataRdy becomes ack_o.
//  HAS_SLAVE = 0 marks an accelerator without a slave chain; the wrapper then
//  answers the unused part of the window itself.
//  irq is high while a finished result waits to be collected (state C).
//
// The three-part structure, the multiplexer network and the cyc/stb logic
// follow the document's wrapper circuit. The register offsets, the status
// encoding, the idle-only parameter writes and the one-cycle register ack are
// this design's choices. An internal access has priority over a Wishbone slave
// access, which then waits; BASE must not be 0, because an idle master chain
// drives address 0 and would otherwise count as internal.
module wb_acc_wrapper
  import hwcall_pkg::*;
#(
  parameter logic [AW-1:0] BASE       = 32'h0000_0100,
  parameter logic [AW-1:0] MAX_OFFSET = 32'h0000_00FF,
  parameter int unsigned   NP         = 2,
  parameter bit            HAS_RET    = 1'b1,
  parameter bit            HAS_SLAVE  = 1'b1
) (
  input  logic          clk,
  input  logic          rst,
  // Wishbone slave
  input  wb_req_t       wbs_i,
  output wb_rsp_t       wbs_o,
  // Wishbone master
  output wb_req_t       wbm_o,
  input  wb_rsp_t       wbm_i,
  output logic          irq,
  // minimal interface of the wrapped accelerator
  output logic          core_start,
  input  logic          core_done,
  output logic [DW-1:0] core_params [NP],
  input  logic [DW-1:0] core_ret,
  input  mem_req_t      core_mout,   // Mout_* (master chain output)
  output mem_rsp_t      core_min,    // M_DataRdy, M_Rdata_ram
  output mem_req_t      core_s,      // S_* (slave chain input)
  input  mem_rsp_t      core_sout    // Sout_DataRdy, Sout_Rdata_ram
);
  // With HAS_SLAVE = 0 the accelerator has no slave chain (no local memory):
  // the wrapper then answers Wishbone accesses to the unused part of the
  // window itself, with read data 0, so that no caller waits forever.
  mem_rsp_t sout;
  logic     dummy_rdy_q;

  localparam int unsigned NREG = NP + 1 + (HAS_RET ? 1 : 0);
  localparam int unsigned IW   = $clog2(NREG + 1);

  // ---------------------------------------------------------------- decode
  logic [AW-1:0] offset;
  logic          wb_act, reg_hit, reg_ack_q, reg_pulse;
  logic [IW-1:0] reg_idx;

  assign wb_act  = wbs_i.cyc && wbs_i.stb;
  assign offset  = wbs_i.adr & MAX_OFFSET;
  assign reg_hit = (offset < reg_offset(NREG));
  assign reg_idx = IW'(offset >> 2);
  assign reg_pulse = wb_act && reg_hit && !reg_ack_q;

  // ------------------------------------------------------ controller + regs
  ctrl_state_e   state;
  logic          ctrl_wr, ctrl_rd;
  logic [AW-1:0] notify_q;
  logic [DW-1:0] par_q [NP];
  logic [DW-1:0] ret_q, reg_rdata_q;

  assign ctrl_wr = reg_pulse &&  wbs_i.we && reg_idx == '0;
  assign ctrl_rd = reg_pulse && !wbs_i.we && reg_idx == '0;

  wb_if_controller u_ctrl (
    .clk, .rst,
    .ctrl_wr,
    .ctrl_rd,
    .done_port (core_done),
    .start_port(core_start),
    .state
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_ack_q   <= 1'b0;
      reg_rdata_q <= '0;
      notify_q    <= '0;
      ret_q       <= '0;
      for (int i = 0; i < NP; i++) par_q[i] <= '0;
    end else begin
      reg_ack_q <= reg_pulse;
      if (core_done) ret_q <= core_ret;
      if (reg_pulse) begin
        if (wbs_i.we) begin
          if (reg_idx == '0 && state == CTRL_IDLE)
            notify_q <= {wbs_i.dat[AW-1:2], 2'b00};
          for (int i = 0; i < NP; i++)
            if (reg_idx == IW'(i + 1) && state == CTRL_IDLE) par_q[i] <= wbs_i.dat;
        end else begin
          reg_rdata_q <= '0;
          if (reg_idx == '0) reg_rdata_q <= {notify_q[AW-1:2], state};
          for (int i = 0; i < NP; i++)
            if (reg_idx == IW'(i + 1)) reg_rdata_q <= par_q[i];
          if (HAS_RET && reg_idx == IW'(NP + 1)) reg_rdata_q <= ret_q;
        end
      end
    end
  end

  assign core_params = par_q;
  assign irq         = (state == CTRL_DONE);

  // ---------------------------------------------------------- notify_caller
  logic    notify_busy;
  wb_req_t notify_req;

  notify_caller #(.NOTIFY_DATA(BASE)) u_notify (
    .clk, .rst,
    .done_port  (core_done),
    .notify_addr(notify_q),
    .busy       (notify_busy),
    .wbm_o      (notify_req),
    .wbm_i      (wbm_i)
  );

  // ------------------------------------------------- interconnection logic
  logic          internal;
  logic [SELW-1:0] sel_om;
  logic [SZW-1:0]  size_is;
  logic [AW-1:0]   addr_is;
  logic            we_is, oe_is;
  wb_req_t         core_wbm;

  range_checker u_range (
    .address_in(core_mout.addr),
    .base      (BASE),
    .max_offset(MAX_OFFSET),
    .in_range  (internal)
  );

  drs_to_sel u_drs2s (.data_ram_size(core_mout.size), .sel(sel_om));
  sel_to_drs u_s2drs (.sel(wbs_i.sel), .data_ram_size(size_is));
  addr_filter u_filter (
    .address_in (wbs_i.adr),
    .base       (BASE),
    .max_offset (MAX_OFFSET),
    .address_out(addr_is)
  );

  // Wishbone-side slave requests that are not for the register pool.
  assign we_is = wb_act &&  wbs_i.we && !reg_hit;
  assign oe_is = wb_act && !wbs_i.we && !reg_hit;

  always_ff @(posedge clk) begin
    if (rst) dummy_rdy_q <= 1'b0;
    else     dummy_rdy_q <= !HAS_SLAVE && (we_is || oe_is) && !dummy_rdy_q;
  end

  always_comb begin
    sout = HAS_SLAVE ? core_sout : '{rdy: dummy_rdy_q, rdata: '0};
  end

  always_comb begin
    // weMux, oeMux, addrMux, wDataMux, dRSMux
    if (internal) begin
      core_s = core_mout;
    end else begin
      core_s.we    = we_is;
      core_s.oe    = oe_is;
      core_s.addr  = addr_is;
      core_s.wdata = wbs_i.dat;
      core_s.size  = size_is;
    end

    // DataRdy demultiplexer/multiplexer and rDataMux
    core_min.rdy   = internal ? sout.rdy   : (wbm_i.ack && !notify_busy);
    core_min.rdata = internal ? sout.rdata : wbm_i.dat;

    // Wishbone master built from the master chain (cyc_om / stb_om)
    core_wbm.cyc = !internal && (core_mout.we || core_mout.oe);
    core_wbm.stb = core_wbm.cyc;
    core_wbm.we  = core_mout.we;
    core_wbm.adr = core_mout.addr;
    core_wbm.dat = core_mout.wdata;
    core_wbm.sel = sel_om;

    wbm_o = notify_busy ? notify_req : core_wbm;

    // Wishbone slave response
    wbs_o.ack = reg_ack_q || (!internal && sout.rdy);
    wbs_o.dat = reg_ack_q ? reg_rdata_q : sout.rdata;
  end

  // The controller only leaves B on done_port, which must not come unasked.
  always_ff @(posedge clk)
    if (!rst) assert (!core_done || state == CTRL_BUSY)
      else $error("wb_acc_wrapper: done_port outside of a computation");
endmodule

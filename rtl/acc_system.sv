// acc_system: accelerators top module. A cluster of wrapped accelerators that
// call each other over a shared Wishbone B4 bus without a processor.
//
// Contents (each accelerator = wb_acc_wrapper + minimal-interface core):
//   funA     int funA(int a, int b, int c): calls sum through the non-inlined
//            mechanism and returns c * sum(a, b)
//   sum      int sum(int a, int b)
//   sort     void sort(char *vector, size_t n, int (*compare)(int, int)):
//            calls its compare argument through a function pointer
//   less     int less(int a, int b)     (a < b)
//   greater  int greater(int a, int b)  (a > b)
//   f        int f(int a): owns the local array vec = {'b','c','a'} and calls
//            sort(vec, 3, a ? less : greater) through the non-inlined
//            mechanism; sort then works on vec across the bus
// and one wb_intercon with a master and a slave port for every accelerator
// plus one external master port (for example the testing infrastructure or a
// processor that starts the top-level call) and one external slave port (for
// example a RAM holding the data the accelerators work on).
//
// Address map: each accelerator owns an aligned window of WIN bytes at its
// *_BASE parameter (its function pointer). Inside a window: word 0 control,
// words 1..N parameters, the next word the return value, then local memories
// at +0x40 and call-site notification addresses at +0x80. Every address
// outside the six windows goes to the external slave port.
//
// Intercon master order (lower index = higher priority): funA, sum, sort,
// less, greater, f, external. Slave order: the same, the external slave being
// the default slave.
//
// irq[i] is high while accelerator i (same order) holds an uncollected result.
// All bases are module parameters so the cluster can be relocated; they must
// be non-zero and WIN-aligned.
//
// Timing: one clock, rising edge, synchronous active-high reset. A bus
// transfer on an idle intercon takes 4 cycles; the funA -> sum call costs 14
// cycles to start sum and 4 cycles from sum's done_port to funA seeing the
// notification.
//
// Following the thesis: the accelerators behind Wishbone wrappers on one
// shared intercon with an extra external master and slave port, base
// addresses as parameters, calls by register writes and notification writes,
// and the two example programs (funA/sum, and f calling sort with a compare
// pointer).
// This design's own choices: the addresses and window layout, the port order,
// the external slave as default slave, and the irq outputs.
module acc_system
  import hwcall_pkg::*;
#(
  parameter logic [AW-1:0] FUNA_BASE    = 32'h0000_0100,
  parameter logic [AW-1:0] SUM_BASE     = 32'h0000_0200,
  parameter logic [AW-1:0] SORT_BASE    = 32'h0000_0300,
  parameter logic [AW-1:0] LESS_BASE    = 32'h0000_0400,
  parameter logic [AW-1:0] GREATER_BASE = 32'h0000_0500,
  parameter logic [AW-1:0] F_BASE       = 32'h0000_0600,
  parameter logic [AW-1:0] WIN          = 32'h0000_0100
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t ext_m_req,   // from an outside master
  output wb_rsp_t ext_m_rsp,
  output wb_req_t ext_s_req,   // to an outside slave
  input  wb_rsp_t ext_s_rsp,
  output logic [5:0] irq
);
  localparam int unsigned NACC = 6;
  localparam int unsigned NM   = NACC + 1;
  localparam int unsigned NS   = NACC + 1;
  localparam logic [AW-1:0] MAXOFF = WIN - 1;
  localparam logic [AW-1:0] LOCAL_OFF = 32'h40;
  localparam logic [AW-1:0] SITE_OFF  = 32'h80;

  localparam logic [AW-1:0] SLV_BASE [NS] =
    '{FUNA_BASE, SUM_BASE, SORT_BASE, LESS_BASE, GREATER_BASE, F_BASE, 32'h0};
  localparam logic [AW-1:0] SLV_SIZE [NS] = '{WIN, WIN, WIN, WIN, WIN, WIN, 32'h0};

  wb_req_t m_req [NM];
  wb_rsp_t m_rsp [NM];
  wb_req_t s_req [NS];
  wb_rsp_t s_rsp [NS];

  wb_intercon #(
    .NM(NM), .NS(NS), .SLV_BASE(SLV_BASE), .SLV_SIZE(SLV_SIZE),
    .DEFAULT_SLV(NACC)
  ) u_intercon (
    .clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp
  );

  assign m_req[NACC] = ext_m_req;
  assign ext_m_rsp   = m_rsp[NACC];
  assign ext_s_req   = s_req[NACC];
  assign s_rsp[NACC] = ext_s_rsp;

  // ------------------------------------------------------------------ funA
  logic          funa_start, funa_done;
  logic [DW-1:0] funa_par [3];
  logic [DW-1:0] funa_ret;
  mem_req_t      funa_mout, funa_s;
  mem_rsp_t      funa_min, funa_sout;

  wb_acc_wrapper #(
    .BASE(FUNA_BASE), .MAX_OFFSET(MAXOFF), .NP(3), .HAS_RET(1'b1), .HAS_SLAVE(1'b1)
  ) u_funa_wrap (
    .clk, .rst,
    .wbs_i(s_req[0]), .wbs_o(s_rsp[0]), .wbm_o(m_req[0]), .wbm_i(m_rsp[0]),
    .irq(irq[0]),
    .core_start(funa_start), .core_done(funa_done), .core_params(funa_par),
    .core_ret(funa_ret), .core_mout(funa_mout), .core_min(funa_min),
    .core_s(funa_s), .core_sout(funa_sout)
  );

  acc_funa #(
    .SUM_ADDR(SUM_BASE), .E_ADDR(FUNA_BASE + LOCAL_OFF),
    .CALL_SITE_ADDR(FUNA_BASE + SITE_OFF)
  ) u_funa (
    .clk, .rst,
    .start_port(funa_start), .done_port(funa_done),
    .a(funa_par[0]), .b(funa_par[1]), .c(funa_par[2]), .return_port(funa_ret),
    .mout(funa_mout), .min(funa_min), .s_in(funa_s), .s_out(funa_sout)
  );

  // ------------------------------------------------------------------- sum
  logic          sum_start, sum_done;
  logic [DW-1:0] sum_par [2];
  logic [DW-1:0] sum_ret;
  mem_rsp_t      sum_min_unused;
  mem_req_t      sum_s_unused;

  wb_acc_wrapper #(
    .BASE(SUM_BASE), .MAX_OFFSET(MAXOFF), .NP(2), .HAS_RET(1'b1), .HAS_SLAVE(1'b0)
  ) u_sum_wrap (
    .clk, .rst,
    .wbs_i(s_req[1]), .wbs_o(s_rsp[1]), .wbm_o(m_req[1]), .wbm_i(m_rsp[1]),
    .irq(irq[1]),
    .core_start(sum_start), .core_done(sum_done), .core_params(sum_par),
    .core_ret(sum_ret), .core_mout(MEM_REQ_IDLE), .core_min(sum_min_unused),
    .core_s(sum_s_unused), .core_sout(MEM_RSP_IDLE)
  );

  acc_sum u_sum (
    .clk, .rst,
    .start_port(sum_start), .done_port(sum_done),
    .a(sum_par[0]), .b(sum_par[1]), .return_port(sum_ret)
  );

  // ------------------------------------------------------------------ sort
  logic          sort_start, sort_done;
  logic [DW-1:0] sort_par [3];
  mem_req_t      sort_mout, sort_s;
  mem_rsp_t      sort_min, sort_sout;

  wb_acc_wrapper #(
    .BASE(SORT_BASE), .MAX_OFFSET(MAXOFF), .NP(3), .HAS_RET(1'b0), .HAS_SLAVE(1'b1)
  ) u_sort_wrap (
    .clk, .rst,
    .wbs_i(s_req[2]), .wbs_o(s_rsp[2]), .wbm_o(m_req[2]), .wbm_i(m_rsp[2]),
    .irq(irq[2]),
    .core_start(sort_start), .core_done(sort_done), .core_params(sort_par),
    .core_ret('0), .core_mout(sort_mout), .core_min(sort_min),
    .core_s(sort_s), .core_sout(sort_sout)
  );

  acc_sort #(
    .TMP_ADDR(SORT_BASE + LOCAL_OFF), .CALL_SITE_ADDR(SORT_BASE + SITE_OFF)
  ) u_sort (
    .clk, .rst,
    .start_port(sort_start), .done_port(sort_done),
    .vector(sort_par[0]), .n(sort_par[1]), .compare(sort_par[2]),
    .mout(sort_mout), .min(sort_min), .s_in(sort_s), .s_out(sort_sout)
  );

  // --------------------------------------------------------------------- f
  logic          f_start, f_done;
  logic [DW-1:0] f_par [1];
  mem_req_t      f_mout, f_s;
  mem_rsp_t      f_min, f_sout;

  wb_acc_wrapper #(
    .BASE(F_BASE), .MAX_OFFSET(MAXOFF), .NP(1), .HAS_RET(1'b0), .HAS_SLAVE(1'b1)
  ) u_f_wrap (
    .clk, .rst,
    .wbs_i(s_req[5]), .wbs_o(s_rsp[5]), .wbm_o(m_req[5]), .wbm_i(m_rsp[5]),
    .irq(irq[5]),
    .core_start(f_start), .core_done(f_done), .core_params(f_par),
    .core_ret('0), .core_mout(f_mout), .core_min(f_min),
    .core_s(f_s), .core_sout(f_sout)
  );

  acc_f #(
    .SORT_ADDR(SORT_BASE), .LESS_ADDR(LESS_BASE), .GREATER_ADDR(GREATER_BASE),
    .VEC_ADDR(F_BASE + LOCAL_OFF), .CALL_SITE_ADDR(F_BASE + SITE_OFF)
  ) u_f (
    .clk, .rst,
    .start_port(f_start), .done_port(f_done), .a(f_par[0]),
    .mout(f_mout), .min(f_min), .s_in(f_s), .s_out(f_sout)
  );

  // ----------------------------------------------------- less and greater
  for (genvar g = 0; g < 2; g++) begin : g_cmp
    localparam logic [AW-1:0] CBASE = (g == 0) ? LESS_BASE : GREATER_BASE;
    logic          c_start, c_done;
    logic [DW-1:0] c_par [2];
    logic [DW-1:0] c_ret;
    mem_rsp_t      c_min_unused;
    mem_req_t      c_s_unused;

    wb_acc_wrapper #(
      .BASE(CBASE), .MAX_OFFSET(MAXOFF), .NP(2), .HAS_RET(1'b1), .HAS_SLAVE(1'b0)
    ) u_wrap (
      .clk, .rst,
      .wbs_i(s_req[3+g]), .wbs_o(s_rsp[3+g]), .wbm_o(m_req[3+g]), .wbm_i(m_rsp[3+g]),
      .irq(irq[3+g]),
      .core_start(c_start), .core_done(c_done), .core_params(c_par),
      .core_ret(c_ret), .core_mout(MEM_REQ_IDLE), .core_min(c_min_unused),
      .core_s(c_s_unused), .core_sout(MEM_RSP_IDLE)
    );

    acc_compare #(.GREATER(g == 1)) u_cmp (
      .clk, .rst,
      .start_port(c_start), .done_port(c_done),
      .a(c_par[0]), .b(c_par[1]), .return_port(c_ret)
    );
  end
endmodule

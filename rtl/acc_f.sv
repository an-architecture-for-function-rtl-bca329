// acc_f: the entry function of the document's function-pointer example,
//   int f(int a) { char vec[] = { 'b', 'c', 'a' };
//                  if (a) sort(vec, 3, less); else sort(vec, 3, greater); }
// with sort marked for the non-inlined mechanism, so the call becomes
// __builtin_wait_call(sort, 0, vec, 3, a ? less : greater).
//
// The accelerator owns the local array vec: three one-word memories at
// VEC_ADDR, VEC_ADDR + 4, VEC_ADDR + 8 on its slave chain (one char per word,
// low byte lane, as everywhere in this design). On start it loads the
// initial values 'b', 'c', 'a' into vec (the array initialiser runs on every
// call), then pulses its builtin_wait_call unit with fun = SORT_ADDR and the
// arguments (VEC_ADDR, 3, a != 0 ? LESS_ADDR : GREATER_ADDR). sort, running in
// another accelerator, reads and writes vec over the bus through this
// accelerator's Wishbone slave; when sort's notification arrives at
// CALL_SITE_ADDR the unit releases sort and f pulses done_port. sort returns
// nothing, so no value is read back. The sorted vec stays readable over the
// bus until the next start.
//
// Slave chain: vec words are readable and writable (a write stores the low
// byte, a read returns it zero-extended); the builtin unit answers
// CALL_SITE_ADDR; any other address is answered with 0. Each slave access is
// answered one cycle after it is seen. Timing: vec is initialised in the
// cycle after the start edge, the call starts one cycle later, done_port
// pulses one cycle after the unit's done.
//
// The program, the initial values and the choice of callee follow the
// document's example. The document's f is declared int but returns nothing;
// this accelerator therefore has no return value. Initialising vec directly
// rather than by three stores is this design's choice.
module acc_f
  import hwcall_pkg::*;
#(
  parameter logic [AW-1:0] SORT_ADDR      = 32'h0000_0300,
  parameter logic [AW-1:0] LESS_ADDR      = 32'h0000_0400,
  parameter logic [AW-1:0] GREATER_ADDR   = 32'h0000_0500,
  parameter logic [AW-1:0] VEC_ADDR       = 32'h0000_0640,
  parameter logic [AW-1:0] CALL_SITE_ADDR = 32'h0000_0680
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_port,
  output logic          done_port,
  input  logic [DW-1:0] a,
  output mem_req_t      mout,
  input  mem_rsp_t      min,
  input  mem_req_t      s_in,
  output mem_rsp_t      s_out
);
  localparam int unsigned VEC_LEN = 3;
  localparam logic [7:0] VEC_INIT [VEC_LEN] = '{8'h62, 8'h63, 8'h61};  // 'b' 'c' 'a'

  typedef enum logic [1:0] {G_IDLE, G_INIT, G_CALL, G_WAIT} gstate_e;

  gstate_e       state;
  logic          armed_q, call_done;
  logic [7:0]    vec_q [VEC_LEN];
  logic [DW-1:0] call_args [3];
  mem_rsp_t      call_sout;
  logic          loc_hit, loc_rdy_q, vec_hit;
  logic [1:0]    vec_idx;

  assign call_args[0] = VEC_ADDR;
  assign call_args[1] = DW'(VEC_LEN);
  assign call_args[2] = (a != '0) ? LESS_ADDR : GREATER_ADDR;

  builtin_wait_call #(
    .NP(3), .HAS_RET(1'b0), .CALL_SITE_ADDR(CALL_SITE_ADDR)
  ) u_call (
    .clk, .rst,
    .start   (state == G_CALL),
    .fun_addr(SORT_ADDR),
    .params  (call_args),
    .ret_addr('0),
    .done    (call_done),
    .mout,
    .min,
    .s_in,
    .s_out   (call_sout)
  );

  // Local array vec and default responder on the slave chain.
  assign loc_hit = (s_in.we || s_in.oe) && (s_in.addr != CALL_SITE_ADDR);
  assign vec_hit = (s_in.addr >= VEC_ADDR) && (s_in.addr < VEC_ADDR + AW'(4 * VEC_LEN));
  assign vec_idx = 2'((s_in.addr - VEC_ADDR) >> 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      loc_rdy_q <= 1'b0;
      for (int i = 0; i < VEC_LEN; i++) vec_q[i] <= '0;
    end else begin
      loc_rdy_q <= loc_hit && !loc_rdy_q;
      if (state == G_INIT) begin
        for (int i = 0; i < VEC_LEN; i++) vec_q[i] <= VEC_INIT[i];
      end else if (loc_hit && !loc_rdy_q && s_in.we && vec_hit) begin
        vec_q[vec_idx] <= s_in.wdata[7:0];
      end
    end
  end

  always_comb begin
    s_out       = call_sout;
    s_out.rdy   = call_sout.rdy | loc_rdy_q;
    s_out.rdata = (loc_rdy_q && vec_hit) ? {24'h0, vec_q[vec_idx]} : '0;
  end

  // Caller FSM.
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= G_IDLE;
      armed_q   <= 1'b0;
      done_port <= 1'b0;
    end else begin
      armed_q   <= start_port;
      done_port <= 1'b0;
      case (state)
        G_IDLE: if (start_port && !armed_q) state <= G_INIT;
        G_INIT: state <= G_CALL;
        G_CALL: state <= G_WAIT;
        G_WAIT: if (call_done) begin
          done_port <= 1'b1;
          state     <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  // The slave chain answers one access at a time.
  always_ff @(posedge clk)
    if (!rst) assert (!(loc_rdy_q && call_sout.rdy))
      else $error("acc_f: two slave-chain responders at once");
endmodule

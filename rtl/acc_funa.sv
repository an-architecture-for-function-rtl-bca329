// acc_funa: the caller of the document's non-inlined call example,
//   int funA(int a, int b, int c) { int e; e = sum(a, b); return c * e; }
// with sum marked for the non-inlined mechanism, so the call becomes
// __builtin_wait_call(sum, 1, a, b, &e).
//
// The accelerator contains one builtin_wait_call unit (two arguments, return
// value) and the local variable e, a one-word memory at E_ADDR on its slave
// chain. Sequence: on start it pulses the unit with fun = SUM_ADDR, arguments
// a and b and destination E_ADDR; the unit writes the callee's registers over
// the bus, waits for the notification at CALL_SITE_ADDR, reads the callee's
// return register and stores the value into e. E_ADDR lies inside this
// accelerator's own window, so that store is looped back onto its own slave
// chain by the wrapper. Then return_port = c * e and done_port pulses.
//
// Slave chain: e is readable and writable at E_ADDR; the builtin unit answers
// CALL_SITE_ADDR; any other address is answered with 0 so that no access
// hangs. Every slave access is answered one cycle after it is seen.
module acc_funa
  import hwcall_pkg::*;
#(
  parameter logic [AW-1:0] SUM_ADDR       = 32'h0000_0200,
  parameter logic [AW-1:0] E_ADDR         = 32'h0000_0140,
  parameter logic [AW-1:0] CALL_SITE_ADDR = 32'h0000_0180
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_port,
  output logic          done_port,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] c,
  output logic [DW-1:0] return_port,
  output mem_req_t      mout,
  input  mem_rsp_t      min,
  input  mem_req_t      s_in,
  output mem_rsp_t      s_out
);
  typedef enum logic [1:0] {F_IDLE, F_CALL, F_WAIT, F_MUL} fstate_e;

  fstate_e       state;
  logic          armed_q, call_start, call_done;
  logic [DW-1:0] e_q;
  logic [DW-1:0] call_args [2];
  mem_rsp_t      call_sout;
  logic          loc_hit, loc_rdy_q;

  assign call_args[0] = a;
  assign call_args[1] = b;
  assign call_start   = (state == F_CALL);

  builtin_wait_call #(
    .NP(2), .HAS_RET(1'b1), .CALL_SITE_ADDR(CALL_SITE_ADDR)
  ) u_call (
    .clk, .rst,
    .start   (call_start),
    .fun_addr(SUM_ADDR),
    .params  (call_args),
    .ret_addr(E_ADDR),
    .done    (call_done),
    .mout,
    .min,
    .s_in,
    .s_out   (call_sout)
  );

  // Local memory (variable e) and default responder on the slave chain.
  assign loc_hit = (s_in.we || s_in.oe) && (s_in.addr != CALL_SITE_ADDR);

  always_ff @(posedge clk) begin
    if (rst) begin
      loc_rdy_q <= 1'b0;
      e_q       <= '0;
    end else begin
      loc_rdy_q <= loc_hit && !loc_rdy_q;
      if (loc_hit && !loc_rdy_q && s_in.we && s_in.addr == E_ADDR) e_q <= s_in.wdata;
    end
  end

  always_comb begin
    s_out       = call_sout;
    s_out.rdy   = call_sout.rdy | loc_rdy_q;
    s_out.rdata = (loc_rdy_q && s_in.addr == E_ADDR) ? e_q : '0;
  end

  // Caller FSM.
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= F_IDLE;
      armed_q     <= 1'b0;
      done_port   <= 1'b0;
      return_port <= '0;
    end else begin
      armed_q   <= start_port;
      done_port <= 1'b0;
      case (state)
        F_IDLE: if (start_port && !armed_q) state <= F_CALL;
        F_CALL: state <= F_WAIT;
        F_WAIT: if (call_done) state <= F_MUL;
        F_MUL: begin
          return_port <= c * e_q;
          done_port   <= 1'b1;
          state       <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule

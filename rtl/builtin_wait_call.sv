// builtin_wait_call: functional unit that performs one non-inlined function
// call from inside a caller accelerator.
//
// A call site that invokes a marked function, directly or through a function
// pointer, is given one instance of this unit. When `start` is pulsed with the
// callee's base address (`fun_addr`, the function pointer), the argument values
// and, for a call whose result is assigned, the address of the destination
// variable, the unit walks through:
//   WAIT          idle; clears the notification flag on start
//   SEND_PARAM    writes argument k to fun_addr + 4*(k+1), k = 0..NP-1
//   START_COMP    writes CALL_SITE_ADDR into the callee's control register
//   WAIT_NOTIF    waits until the callee writes to CALL_SITE_ADDR
//   READ_RET      reads the return register, fun_addr + 4*(NP+1)
//   WRITE_RET     writes that value to ret_addr
//   DONE          reads the callee's control register, which releases the
//                 callee (its controller returns to idle on that read), then
//                 pulses `done` and returns to WAIT
// READ_RET and WRITE_RET are skipped when HAS_RET is 0. Because the registers
// are reached relative to fun_addr, any callee with the same parameter and
// return types can be called through the same unit: that is how a function
// pointer call is carried out.
//
// Bus side: `mout`/`min` is the minimal-interface master channel (a request is
// held until min.rdy), `s_in`/`s_out` the slave chain on which the
// notification write arrives; only writes to CALL_SITE_ADDR are answered
// here (rdy one cycle after the request). Each memory operation takes as long
// as the bus needs; the unit adds no cycle between operations.
//
// The state sequence and the relative addressing follow the document. The
// release read in DONE, the notification flag that also catches an early
// notification, and the register offsets are this design's choices.
module builtin_wait_call
  import hwcall_pkg::*;
#(
  parameter int unsigned   NP             = 1,
  parameter bit            HAS_RET        = 1'b1,
  parameter logic [AW-1:0] CALL_SITE_ADDR = 32'h0000_0180
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW-1:0] fun_addr,
  input  logic [DW-1:0] params [NP],
  input  logic [AW-1:0] ret_addr,
  output logic          done,
  output mem_req_t      mout,
  input  mem_rsp_t      min,
  input  mem_req_t      s_in,
  output mem_rsp_t      s_out
);
  typedef enum logic [2:0] {
    B_WAIT, B_SEND_PARAM, B_START_COMP, B_WAIT_NOTIF,
    B_READ_RET, B_WRITE_RET, B_DONE
  } bstate_e;

  localparam int unsigned KW = (NP > 1) ? $clog2(NP) : 1;

  bstate_e       state;
  logic [KW-1:0] k;
  logic [AW-1:0] fun_q, ret_addr_q;
  logic [DW-1:0] par_q [NP];
  logic [DW-1:0] ret_q;
  logic          notified, notif_hit, rdy_q;

  // Notification snoop on the slave chain.
  assign notif_hit = s_in.we && (s_in.addr == CALL_SITE_ADDR);

  always_ff @(posedge clk) begin
    if (rst) rdy_q <= 1'b0;
    else     rdy_q <= notif_hit && !rdy_q;
  end

  always_comb begin
    s_out       = '0;
    s_out.rdy   = rdy_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= B_WAIT;
      k          <= '0;
      fun_q      <= '0;
      ret_addr_q <= '0;
      ret_q      <= '0;
      notified   <= 1'b0;
      for (int i = 0; i < NP; i++) par_q[i] <= '0;
    end else begin
      if (notif_hit) notified <= 1'b1;
      case (state)
        B_WAIT: if (start) begin
          fun_q      <= fun_addr;
          ret_addr_q <= ret_addr;
          par_q      <= params;
          k          <= '0;
          notified   <= 1'b0;
          state      <= (NP > 0) ? B_SEND_PARAM : B_START_COMP;
        end
        B_SEND_PARAM: if (min.rdy) begin
          if (k == KW'(NP - 1)) state <= B_START_COMP;
          k <= k + 1'b1;
        end
        B_START_COMP: if (min.rdy) state <= B_WAIT_NOTIF;
        B_WAIT_NOTIF: if (notified) state <= HAS_RET ? B_READ_RET : B_DONE;
        B_READ_RET: if (min.rdy) begin
          ret_q <= min.rdata;
          state <= B_WRITE_RET;
        end
        B_WRITE_RET: if (min.rdy) state <= B_DONE;
        B_DONE: if (min.rdy) state <= B_WAIT;
        default: state <= B_WAIT;
      endcase
    end
  end

  always_comb begin
    mout = '0;
    case (state)
      B_SEND_PARAM: begin
        mout.we    = 1'b1;
        mout.addr  = fun_q + reg_offset(32'(k) + 1);
        mout.wdata = par_q[k];
        mout.size  = SZW'(DW);
      end
      B_START_COMP: begin
        mout.we    = 1'b1;
        mout.addr  = fun_q;
        mout.wdata = CALL_SITE_ADDR;
        mout.size  = SZW'(DW);
      end
      B_READ_RET: begin
        mout.oe    = 1'b1;
        mout.addr  = fun_q + reg_offset(NP + 1);
        mout.size  = SZW'(DW);
      end
      B_WRITE_RET: begin
        mout.we    = 1'b1;
        mout.addr  = ret_addr_q;
        mout.wdata = ret_q;
        mout.size  = SZW'(DW);
      end
      B_DONE: begin
        mout.oe    = 1'b1;
        mout.addr  = fun_q;
        mout.size  = SZW'(DW);
      end
      default: ;
    endcase
  end

  assign done = (state == B_DONE) && min.rdy;
endmodule

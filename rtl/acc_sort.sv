// acc_sort: the function-pointer example of the document,
//   void sort(char *vector, size_t n, int (*compare)(int a, int b))
// where every compare(vector[i], vector[i-1]) becomes
// __builtin_wait_call(compare, 1, vector[i], vector[i-1], &tmp) and the
// elements are swapped when tmp is non-zero.
//
// The callee is whatever accelerator base address arrives in the `compare`
// parameter at run time: less gives an ascending order, greater a descending
// one. The document elides the loop structure; this core runs a plain bubble
// sort, n-1 passes of i = 1 .. n-1, each step:
//   load vector[i], load vector[i-1]            (master chain, 8-bit loads)
//   call compare(vector[i], vector[i-1]) -> tmp (builtin_wait_call)
//   if tmp: store vector[i] <- old vector[i-1], vector[i-1] <- old vector[i]
// Each char occupies one 32-bit word (address vector + 4*i, low byte lane),
// following the word-per-object layout of this design; loads zero-extend.
//
// The load/store unit and the builtin unit share the master chain by OR (the
// accelerator's bus merger); only one of them is active at a time. tmp is a
// one-word local memory at TMP_ADDR on the slave chain, reached by the
// builtin's store through the wrapper's internal loop-back; CALL_SITE_ADDR is
// answered by the builtin unit, any other slave address with 0. void
// function: no return_port. done_port pulses one cycle after the last step.
module acc_sort
  import hwcall_pkg::*;
#(
  parameter logic [AW-1:0] TMP_ADDR       = 32'h0000_0340,
  parameter logic [AW-1:0] CALL_SITE_ADDR = 32'h0000_0380
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_port,
  output logic          done_port,
  input  logic [DW-1:0] vector,
  input  logic [DW-1:0] n,
  input  logic [DW-1:0] compare,
  output mem_req_t      mout,
  input  mem_rsp_t      min,
  input  mem_req_t      s_in,
  output mem_rsp_t      s_out
);
  typedef enum logic [3:0] {
    T_IDLE, T_LD_I, T_LD_IM1, T_CALL, T_WAIT, T_TEST, T_ST_I, T_ST_IM1,
    T_NEXT, T_DONE
  } tstate_e;

  tstate_e       state;
  logic          armed_q, call_start, call_done;
  logic [DW-1:0] pass_q, i_q, vi_q, vim1_q, tmp_q;
  logic [DW-1:0] call_args [2];
  mem_req_t      lsu_req, call_req;
  mem_rsp_t      call_sout;
  logic          loc_hit, loc_rdy_q;

  assign call_args[0] = vi_q;
  assign call_args[1] = vim1_q;
  assign call_start   = (state == T_CALL);

  builtin_wait_call #(
    .NP(2), .HAS_RET(1'b1), .CALL_SITE_ADDR(CALL_SITE_ADDR)
  ) u_call (
    .clk, .rst,
    .start   (call_start),
    .fun_addr(compare),
    .params  (call_args),
    .ret_addr(TMP_ADDR),
    .done    (call_done),
    .mout    (call_req),
    .min,
    .s_in,
    .s_out   (call_sout)
  );

  // Local memory (variable tmp) and default responder on the slave chain.
  assign loc_hit = (s_in.we || s_in.oe) && (s_in.addr != CALL_SITE_ADDR);

  always_ff @(posedge clk) begin
    if (rst) begin
      loc_rdy_q <= 1'b0;
      tmp_q     <= '0;
    end else begin
      loc_rdy_q <= loc_hit && !loc_rdy_q;
      if (loc_hit && !loc_rdy_q && s_in.we && s_in.addr == TMP_ADDR) tmp_q <= s_in.wdata;
    end
  end

  always_comb begin
    s_out       = call_sout;
    s_out.rdy   = call_sout.rdy | loc_rdy_q;
    s_out.rdata = (loc_rdy_q && s_in.addr == TMP_ADDR) ? tmp_q : '0;
  end

  // Load/store unit requests.
  always_comb begin
    lsu_req = '0;
    case (state)
      T_LD_I:   begin lsu_req.oe = 1'b1; lsu_req.addr = vector + (i_q << 2); end
      T_LD_IM1: begin lsu_req.oe = 1'b1; lsu_req.addr = vector + ((i_q - 1) << 2); end
      T_ST_I:   begin lsu_req.we = 1'b1; lsu_req.addr = vector + (i_q << 2);
                      lsu_req.wdata = vim1_q; end
      T_ST_IM1: begin lsu_req.we = 1'b1; lsu_req.addr = vector + ((i_q - 1) << 2);
                      lsu_req.wdata = vi_q; end
      default: ;
    endcase
    if (lsu_req.we || lsu_req.oe) lsu_req.size = 8'd8;
    mout = lsu_req | call_req;   // bus merger
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= T_IDLE;
      armed_q   <= 1'b0;
      done_port <= 1'b0;
      pass_q    <= '0;
      i_q       <= '0;
      vi_q      <= '0;
      vim1_q    <= '0;
    end else begin
      armed_q   <= start_port;
      done_port <= 1'b0;
      case (state)
        T_IDLE: if (start_port && !armed_q) begin
          pass_q <= '0;
          i_q    <= 1;
          state  <= (n > 1) ? T_LD_I : T_DONE;
        end
        T_LD_I:   if (min.rdy) begin vi_q   <= {24'b0, min.rdata[7:0]}; state <= T_LD_IM1; end
        T_LD_IM1: if (min.rdy) begin vim1_q <= {24'b0, min.rdata[7:0]}; state <= T_CALL; end
        T_CALL:   state <= T_WAIT;
        T_WAIT:   if (call_done) state <= T_TEST;
        T_TEST:   state <= (tmp_q != '0) ? T_ST_I : T_NEXT;
        T_ST_I:   if (min.rdy) state <= T_ST_IM1;
        T_ST_IM1: if (min.rdy) state <= T_NEXT;
        T_NEXT: begin
          if (i_q == n - 1) begin
            i_q    <= 1;
            pass_q <= pass_q + 1;
            state  <= (pass_q + 1 == n - 1) ? T_DONE : T_LD_I;
          end else begin
            i_q   <= i_q + 1;
            state <= T_LD_I;
          end
        end
        T_DONE: begin
          done_port <= 1'b1;
          state     <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule

// notify_caller: tells the caller that the accelerator has finished, by one
// Wishbone classic write cycle to the notification address.
//
// Two states, as in the document's notify_caller state machine: `wait` and
// `notify`. done_port moves from wait to notify when a notification address
// was supplied (non-zero); in notify the unit drives cyc/stb/we with the
// notification address and holds them until ack, then returns to wait.
// The written data is the accelerator's own base address (NOTIFY_DATA), so a
// caller could tell who finished; the caller only needs the address.
// `busy` is high in notify and tells the wrapper to hand its master port to
// this unit. The return condition (ack) and the data word are this design's
// choices.
module notify_caller
  import hwcall_pkg::*;
#(
  parameter logic [DW-1:0] NOTIFY_DATA = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          done_port,
  input  logic [AW-1:0] notify_addr,
  output logic          busy,
  output wb_req_t       wbm_o,
  input  wb_rsp_t       wbm_i
);
  typedef enum logic {N_WAIT, N_NOTIFY} nstate_e;

  nstate_e       state;
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= N_WAIT;
      addr_q <= '0;
    end else begin
      case (state)
        N_WAIT: if (done_port && notify_addr != '0) begin
          addr_q <= notify_addr;
          state  <= N_NOTIFY;
        end
        N_NOTIFY: if (wbm_i.ack) state <= N_WAIT;
        default: state <= N_WAIT;
      endcase
    end
  end

  assign busy = (state == N_NOTIFY);

  always_comb begin
    wbm_o = WB_REQ_IDLE;
    if (state == N_NOTIFY) begin
      wbm_o.cyc = 1'b1;
      wbm_o.stb = 1'b1;
      wbm_o.we  = 1'b1;
      wbm_o.adr = addr_q;
      wbm_o.dat = NOTIFY_DATA;
      wbm_o.sel = '1;
    end
  end
endmodule

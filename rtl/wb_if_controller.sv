// wb_if_controller: the accelerator's interface controller, tied to its
// control register.
//
// Three states, as in the document's controller state machine:
//   A (CTRL_IDLE)  nothing running; a write to the control register (ctrl_wr)
//                  moves to B
//   B (CTRL_BUSY)  start_port is held high; the accelerator's done_port moves
//                  to C, dropping start_port
//   C (CTRL_DONE)  result available; a read of the control register (ctrl_rd)
//                  moves back to A
// Any other event leaves the state unchanged, so a second caller's write while
// the accelerator is in B or C is ignored: the control register doubles as a
// lock. start_port is a combinational decode of the state, so it falls in the
// cycle after done_port. Reset goes to A.
module wb_if_controller
  import hwcall_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ctrl_wr,
  input  logic        ctrl_rd,
  input  logic        done_port,
  output logic        start_port,
  output ctrl_state_e state
);
  always_ff @(posedge clk) begin
    if (rst) state <= CTRL_IDLE;
    else begin
      case (state)
        CTRL_IDLE: if (ctrl_wr)   state <= CTRL_BUSY;
        CTRL_BUSY: if (done_port) state <= CTRL_DONE;
        CTRL_DONE: if (ctrl_rd)   state <= CTRL_IDLE;
        default:                  state <= CTRL_IDLE;
      endcase
    end
  end

  assign start_port = (state == CTRL_BUSY);
endmodule

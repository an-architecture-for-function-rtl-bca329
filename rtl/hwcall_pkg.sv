// hwcall_pkg: types and constants shared by the accelerator cluster.
//
// Two bus flavours meet in this design:
//   * Wishbone B4 classic cycles (wb_req_t / wb_rsp_t) between wrapped
//     accelerators and the shared intercon. Only the minimal signal set is
//     carried: cyc, stb, we, adr, dat, sel and ack.
//   * The accelerator "minimal interface" memory channel (mem_req_t /
//     mem_rsp_t). A request is a level: we or oe stays high, with addr, wdata
//     and size stable, until the responder pulses rdy for one cycle. Idle
//     requesters drive all-zero so several of them can be merged by OR into a
//     daisy chain. size is the transfer width in bits (8, 16 or 32).
//
// Addresses are 32-bit byte addresses. Every register and every memory object
// occupies one aligned 32-bit word; sub-word accesses use the low byte lanes.
//
// Memory-mapped interface of an accelerator (word offsets from its base, the
// base address being the accelerator's "function pointer"):
//   0            control register: write = start (data = notification address,
//                0 = no notification); read = {notify address[31:2], state}
//   1 .. N       input parameters
//   N + 1        return value (when the function has one)
package hwcall_pkg;

  localparam int unsigned AW   = 32;   // address width
  localparam int unsigned DW   = 32;   // data width
  localparam int unsigned SELW = DW / 8;
  localparam int unsigned SZW  = 8;    // minimal-interface size field width

  typedef struct packed {
    logic            cyc;
    logic            stb;
    logic            we;
    logic [AW-1:0]   adr;
    logic [DW-1:0]   dat;
    logic [SELW-1:0] sel;
  } wb_req_t;

  typedef struct packed {
    logic          ack;
    logic [DW-1:0] dat;
  } wb_rsp_t;

  typedef struct packed {
    logic           we;
    logic           oe;
    logic [AW-1:0]  addr;
    logic [DW-1:0]  wdata;
    logic [SZW-1:0] size;
  } mem_req_t;

  typedef struct packed {
    logic          rdy;
    logic [DW-1:0] rdata;
  } mem_rsp_t;

  localparam wb_req_t  WB_REQ_IDLE  = '0;
  localparam wb_rsp_t  WB_RSP_IDLE  = '0;
  localparam mem_req_t MEM_REQ_IDLE = '0;
  localparam mem_rsp_t MEM_RSP_IDLE = '0;

  // Status codes in bits [1:0] of the control register (states of the
  // interface controller).
  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,   // A: ready for a new call
    CTRL_BUSY = 2'd1,   // B: computing, start_port high
    CTRL_DONE = 2'd2    // C: result valid, waits for the control register read
  } ctrl_state_e;

  // Byte offset of register k in an accelerator interface.
  function automatic logic [AW-1:0] reg_offset(input int unsigned k);
    return AW'(k * 4);
  endfunction

endpackage

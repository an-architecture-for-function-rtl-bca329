// tb_wb_mem: simulation model of a word-organised RAM with a Wishbone B4
// classic slave port, used by testbenches as the memory behind an external
// slave interface.
//
// DEPTH 32-bit words starting at BASE; addresses outside wrap modulo DEPTH.
// ack is registered: it rises one cycle after cyc & stb and lasts one cycle.
// Byte lanes are honoured on writes. It also counts writes to WATCH_ADDR, so
// a testbench can see notification messages aimed at the memory.
module tb_wb_mem
  import hwcall_pkg::*;
#(
  parameter int unsigned   DEPTH      = 1024,
  parameter logic [AW-1:0] BASE       = 32'h0000_1000,
  parameter logic [AW-1:0] WATCH_ADDR = 32'h0000_1F00
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t req,
  output wb_rsp_t rsp,
  output int      watch_writes
);
  logic [DW-1:0] mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] idx;

  assign idx = ($clog2(DEPTH))'((req.adr - BASE) >> 2);

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp          <= '0;
      watch_writes <= 0;
    end else begin
      rsp.ack <= req.cyc && req.stb && !rsp.ack;
      if (req.cyc && req.stb && !rsp.ack) begin
        if (req.we) begin
          for (int b = 0; b < SELW; b++)
            if (req.sel[b]) mem[idx][8*b +: 8] <= req.dat[8*b +: 8];
          if (req.adr == WATCH_ADDR) watch_writes <= watch_writes + 1;
        end
        rsp.dat <= mem[idx];
      end
    end
  end
endmodule

// sel_to_drs: converts a Wishbone byte-select vector back into the
// minimal-interface transfer size in bits.
//
// The size is eight times the position of the highest selected byte lane plus
// one (sel 0001 -> 8, 0011 -> 16, 1111 -> 32), matching drs_to_sel. No lane
// selected gives 0. Combinational; the mapping is this design's choice.
module sel_to_drs
  import hwcall_pkg::*;
(
  input  logic [SELW-1:0] sel,
  output logic [SZW-1:0]  data_ram_size
);
  always_comb begin
    data_ram_size = '0;
    for (int i = 0; i < SELW; i++)
      if (sel[i]) data_ram_size = SZW'(8 * (i + 1));
  end
endmodule

// drs_to_sel: converts the minimal-interface transfer size (in bits) into a
// Wishbone byte-select vector.
//
// Objects are word aligned and sub-word values sit in the low byte lanes, so
// an 8-bit transfer selects lane 0, 16 bits lanes 1:0 and anything wider all
// four lanes. A size of 0 (no transfer) selects no lane. Combinational. The
// block's name and its size-to-select role are the document's; the lane
// mapping is this design's choice.
module drs_to_sel
  import hwcall_pkg::*;
(
  input  logic [SZW-1:0]  data_ram_size,
  output logic [SELW-1:0] sel
);
  always_comb begin
    if (data_ram_size == '0)       sel = '0;
    else if (data_ram_size <= 8)   sel = 4'b0001;
    else if (data_ram_size <= 16)  sel = 4'b0011;
    else                           sel = 4'b1111;
  end
endmodule

// range_checker: tells whether an address lies inside an accelerator's own
// address range.
//
// in_range is high when base <= address_in <= base + max_offset. The wrapper
// uses it to decide whether a memory operation started by the accelerator is
// closed on the accelerator's own slave chain (internal) or goes out on the
// Wishbone master interface. Purely combinational. The three inputs follow the
// block's description (an address plus the start and extent of the internal
// range); the unsigned compare is this design's choice.
module range_checker
  import hwcall_pkg::*;
(
  input  logic [AW-1:0] address_in,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] max_offset,
  output logic          in_range
);
  logic [AW-1:0] offset;

  always_comb begin
    offset   = address_in - base;
    in_range = (address_in >= base) && (offset <= max_offset);
  end
endmodule

// addr_filter: maps an address arriving on the Wishbone slave interface onto
// the accelerator's slave chain.
//
// The slave chain works with absolute addresses inside the accelerator's
// window [base, base + max_offset], the window being a power of two in size
// and aligned to it. The filter keeps the offset bits of the incoming address,
// replaces the bits above them with the base and clears the two byte-offset
// bits, so that a stray high bit or a misaligned address never reaches the
// accelerator as a foreign address. Combinational. The document names the
// block only; this masking is this design's choice.
module addr_filter
  import hwcall_pkg::*;
(
  input  logic [AW-1:0] address_in,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] max_offset,
  output logic [AW-1:0] address_out
);
  always_comb
    address_out = (base & ~max_offset) | (address_in & max_offset & ~AW'(3));
endmodule

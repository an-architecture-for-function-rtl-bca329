// tb_range_checker: random and boundary addresses against an independent
// in-range computation done in 64-bit arithmetic.
module tb_range_checker;
  import hwcall_pkg::*;
  logic [31:0] address_in, base, max_offset;
  logic        in_range;
  int checks = 0, failures = 0;

  range_checker dut (.address_in, .base, .max_offset, .in_range);

  task automatic try(input logic [31:0] a, input logic [31:0] bs, input logic [31:0] mo);
    longint unsigned lo, hi;
    bit exp;
    address_in = a; base = bs; max_offset = mo;
    #1;
    lo = bs; hi = longint'(bs) + longint'(mo);
    exp = (longint'(a) >= lo) && (longint'(a) <= hi);
    checks++;
    if (in_range !== exp) begin
      failures++;
      $display("FAIL: addr=%h base=%h max=%h got %b", a, bs, mo, in_range);
    end
  endtask

  initial begin
    try(32'h100, 32'h100, 32'hFF);
    try(32'h1FF, 32'h100, 32'hFF);
    try(32'h200, 32'h100, 32'hFF);
    try(32'h0FF, 32'h100, 32'hFF);
    try(32'h0, 32'h100, 32'hFF);
    try(32'hFFFF_FFFF, 32'hFFFF_FF00, 32'hFF);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] bs, mo;
      bs = $urandom & 32'hFFFF_FF00;
      mo = 32'hFF;
      try(bs + $urandom_range(0, 600) - 200, bs, mo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

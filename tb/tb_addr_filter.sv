// tb_addr_filter: random addresses and aligned windows; the output must be the
// window base plus the word-aligned offset of the input.
module tb_addr_filter;
  import hwcall_pkg::*;
  logic [31:0] address_in, base, max_offset, address_out, exp;
  int checks = 0, failures = 0;

  addr_filter dut (.address_in, .base, .max_offset, .address_out);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sh;
      sh = $urandom_range(4, 12);
      max_offset = (32'd1 << sh) - 1;
      base = $urandom & ~max_offset;
      address_in = $urandom;
      #1;
      exp = base + ((address_in % (32'd1 << sh)) / 4) * 4;
      checks++;
      if (address_out !== exp) begin
        failures++;
        $display("FAIL: in=%h base=%h max=%h got %h want %h", address_in, base, max_offset, address_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_drs_to_sel: every size from 0 to 64 against the expected byte-lane mask.
module tb_drs_to_sel;
  import hwcall_pkg::*;
  logic [7:0] data_ram_size;
  logic [3:0] sel, exp;
  int checks = 0, failures = 0;

  drs_to_sel dut (.data_ram_size, .sel);

  initial begin
    for (int s = 0; s <= 64; s++) begin
      data_ram_size = 8'(s);
      #1;
      exp = (s == 0) ? 4'b0000 : (s <= 8) ? 4'b0001 : (s <= 16) ? 4'b0011 : 4'b1111;
      checks++;
      if (sel !== exp) begin failures++; $display("FAIL: size %0d -> %b", s, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_sel_to_drs: all sixteen select vectors, and the round trip through
// drs_to_sel for the sizes the accelerators use.
module tb_sel_to_drs;
  import hwcall_pkg::*;
  logic [3:0] sel, sel2;
  logic [7:0] data_ram_size, size_in;
  int checks = 0, failures = 0;
  int exp;

  sel_to_drs dut (.sel, .data_ram_size);
  drs_to_sel u_back (.data_ram_size(size_in), .sel(sel2));

  initial begin
    for (int v = 0; v < 16; v++) begin
      sel = 4'(v);
      #1;
      exp = 0;
      for (int b = 0; b < 4; b++) if (v[b]) exp = 8 * (b + 1);
      checks++;
      if (data_ram_size !== 8'(exp)) begin failures++; $display("FAIL: sel %b -> %0d", sel, data_ram_size); end
    end
    for (int k = 0; k < 3; k++) begin
      size_in = (k == 0) ? 8'd8 : (k == 1) ? 8'd16 : 8'd32;
      #1; sel = sel2; #1;
      checks++;
      if (data_ram_size !== size_in) begin failures++; $display("FAIL: round trip %0d", size_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_wb_arbiter: drives random request vectors and decide strobes and compares
// the registered grant with a reference model of the policy: the last granted
// master keeps the bus while it requests, otherwise the lowest requesting
// index wins; the grant is frozen while decide is low.
module tb_wb_arbiter;
  localparam int NM = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NM-1:0] req;
  logic decide;
  logic [1:0] gnt;
  logic gnt_valid;
  int checks = 0, failures = 0;
  int exp_last, exp_valid, keeps = 0, lowest = 0;

  wb_arbiter #(.NM(NM)) dut (.clk, .rst, .req, .decide, .gnt, .gnt_valid);

  initial begin
    req = '0; decide = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    exp_last = 0; exp_valid = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req = NM'($urandom);
      if ($urandom_range(0, 3) == 0) req = req | NM'(1 << exp_last);
      decide = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (decide) begin
        exp_valid = (req != 0);
        if (req != 0) begin
          if (req[exp_last]) keeps++;
          else begin
            for (int m = NM - 1; m >= 0; m--) if (req[m]) exp_last = m;
            lowest++;
          end
        end
      end
      #1;
      checks++;
      if (gnt_valid !== 1'(exp_valid) || (exp_valid && gnt !== 2'(exp_last))) begin
        failures++;
        $display("FAIL: step %0d req=%b gnt=%0d/%b want %0d/%0d", i, req, gnt, gnt_valid, exp_last, exp_valid);
      end
    end
    checks++;
    if (keeps == 0 || lowest == 0) begin failures++; $display("FAIL: policy branches not both exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_wb_intercon: three masters and two RAM slaves on the shared bus.
//
// Checks: (1) a single transfer on an idle bus is acked 4 cycles after the
// request with a one-cycle slave (arbitration, request register, slave,
// response register); (2) with masters 0 and 2 requesting in the same cycle,
// master 0 is served first; (3) an unmapped address is answered with 0;
// (4) all three masters run random write/read-back traffic concurrently on
// their own addresses in both slaves and every read returns the value the
// same master last wrote.
module tb_wb_intercon;
  import hwcall_pkg::*;
  localparam int NM = 3, NS = 2;
  localparam logic [31:0] SB [NS] = '{32'h0000_1000, 32'h0000_2000};
  localparam logic [31:0] SS [NS] = '{32'h0000_1000, 32'h0000_1000};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  wb_req_t m_req [NM];
  wb_rsp_t m_rsp [NM];
  wb_req_t s_req [NS];
  wb_rsp_t s_rsp [NS];
  int unused_w [NS];
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  wb_intercon #(.NM(NM), .NS(NS), .SLV_BASE(SB), .SLV_SIZE(SS)) dut (
    .clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp
  );

  for (genvar j = 0; j < NS; j++) begin : g_mem
    tb_wb_mem #(.DEPTH(1024), .BASE(SB[j]), .WATCH_ADDR(32'hFFFF_FFF0)) u_mem (
      .clk, .rst, .req(s_req[j]), .rsp(s_rsp[j]), .watch_writes(unused_w[j])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input int m, input bit we, input logic [31:0] adr,
                      input logic [31:0] wdat, output logic [31:0] rdat, output int lat);
    int t0;
    @(negedge clk);
    m_req[m] = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: wdat, sel: 4'hF};
    t0 = cycle;
    do @(negedge clk); while (!m_rsp[m].ack);
    lat = cycle - t0;
    rdat = m_rsp[m].dat;
    m_req[m] = WB_REQ_IDLE;
  endtask

  int first_acked = -1, second_acked = -1;
  always @(negedge clk) begin
    if (m_rsp[0].ack || m_rsp[2].ack) begin
      if (first_acked < 0) first_acked = m_rsp[0].ack ? 0 : 2;
      else if (second_acked < 0) second_acked = m_rsp[0].ack ? 0 : 2;
    end
  end

  task automatic traffic(input int m);
    logic [31:0] shadow [8];
    logic [31:0] r;
    int lat;
    for (int k = 0; k < 8; k++) shadow[k] = '0;
    for (int k = 0; k < 8; k++) begin
      shadow[k] = $urandom;
      xfer(m, 1, SB[k % 2] + 32'h100 * m + 4 * k, shadow[k], r, lat);
    end
    for (int n = 0; n < 40; n++) begin
      int k;
      k = $urandom_range(0, 7);
      if ($urandom_range(0, 1)) begin
        shadow[k] = $urandom;
        xfer(m, 1, SB[k % 2] + 32'h100 * m + 4 * k, shadow[k], r, lat);
      end else begin
        xfer(m, 0, SB[k % 2] + 32'h100 * m + 4 * k, 0, r, lat);
        check(r == shadow[k], $sformatf("master %0d word %0d: %h want %h", m, k, r, shadow[k]));
      end
    end
  endtask

  initial begin
    logic [31:0] r;
    int lat;
    for (int i = 0; i < NM; i++) m_req[i] = WB_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);

    xfer(1, 1, 32'h1010, 32'hCAFE_0001, r, lat);
    check(lat == 4, $sformatf("idle-bus write latency %0d, want 4", lat));
    xfer(1, 0, 32'h1010, 0, r, lat);
    check(lat == 4 && r == 32'hCAFE_0001, $sformatf("idle-bus read latency %0d data %h", lat, r));
    xfer(0, 0, 32'h8000, 0, r, lat);
    check(r == 0, "unmapped address reads 0");

    // Simultaneous requests: lower index first.
    repeat (2) @(negedge clk);
    first_acked = -1; second_acked = -1;
    fork
      xfer(2, 1, 32'h2000, 1, r, lat);
      begin logic [31:0] r2; int l2; xfer(0, 1, 32'h2004, 2, r2, l2); end
    join
    #1;
    check(first_acked == 0 && second_acked == 2,
          $sformatf("priority to master 0: served %0d then %0d", first_acked, second_acked));

    fork
      traffic(0);
      traffic(1);
      traffic(2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// wb_arbiter: decides which Wishbone master owns the shared bus.
//
// Policy (from the intercon description): while the last granted master keeps
// claiming the bus (cyc high) it keeps the grant; otherwise the requesting
// master with the lowest index wins, so lower indexes have higher priority.
// The decision takes one clock cycle: it is evaluated while `decide` is high
// and registered, appearing on gnt/gnt_valid at the next edge. While `decide`
// is low (a transfer is in progress) the grant is frozen. The last granted
// index survives an idle period so that a returning master is still preferred.
// How far the last grant counts is this design's reading: a master that drops
// cyc for one cycle and raises it again keeps winning, so a master that polls
// without pauses can starve the others.
//
// Ports: req[i] is master i's cyc_o; gnt is the granted index, gnt_valid says
// a master was chosen. Reset: no valid grant, last granted master 0.
module wb_arbiter #(
  parameter int unsigned NM = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NM-1:0]           req,
  input  logic                    decide,
  output logic [$clog2(NM)-1:0]   gnt,
  output logic                    gnt_valid
);
  localparam int unsigned GW = $clog2(NM);

  logic [GW-1:0] last_q, pick;
  logic          any;

  always_comb begin
    any  = |req;
    pick = last_q;
    if (!req[last_q]) begin
      for (int i = NM - 1; i >= 0; i--)
        if (req[i]) pick = GW'(i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_q    <= '0;
      gnt_valid <= 1'b0;
    end else if (decide) begin
      gnt_valid <= any;
      if (any) last_q <= pick;
    end
  end

  assign gnt = last_q;
endmodule

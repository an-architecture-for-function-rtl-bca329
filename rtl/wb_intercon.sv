// wb_intercon: shared-bus Wishbone B4 intercon for NM masters and NS slaves.
//
// Two cooperating parts, as in the cluster's intercon: the arbiter
// (wb_arbiter) picks one master, then the connection logic links that master
// to the slave its address selects. One transfer is in flight at a time, using
// the classic single read/write cycle.
//
// The connection logic holds registers between the two sides, which breaks
// the combinational path from any master to any slave:
//   IDLE  arbiter decides among the masters asserting cyc (1 cycle)
//   ARB   the granted master's request is copied into a register and its
//         address decoded; a master that dropped cyc meanwhile is skipped
//   REQ   the registered request drives the chosen slave until it acks; the
//         read data is registered
//   RESP  ack (and read data) is driven to the master for exactly one cycle,
//         then back to IDLE
// A master therefore sees its ack 3 cycles after its request plus the slave's
// own latency. The slave's cyc/stb fall in the cycle after its ack.
//
// Slave j answers addresses SLV_BASE[j] <= adr < SLV_BASE[j] + SLV_SIZE[j],
// the lowest matching j first. An address no window matches goes to slave
// DEFAULT_SLV; with DEFAULT_SLV >= NS it is answered by the intercon itself
// with read data 0, so that no master can hang. The register stage, the
// arbitration policy and the one-cycle decision follow the document; the
// decode scheme and the default-slave rule are this design's choices.
module wb_intercon
  import hwcall_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 2,
  parameter logic [AW-1:0] SLV_BASE [NS] = '{32'h0000_0000, 32'h0000_1000},
  parameter logic [AW-1:0] SLV_SIZE [NS] = '{32'h0000_1000, 32'h0000_1000},
  parameter int unsigned DEFAULT_SLV = NS
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t m_req [NM],
  output wb_rsp_t m_rsp [NM],
  output wb_req_t s_req [NS],
  input  wb_rsp_t s_rsp [NS]
);
  localparam int unsigned MW = $clog2(NM);
  localparam int unsigned SW = $clog2(NS + 1);

  typedef enum logic [1:0] {ST_IDLE, ST_ARB, ST_REQ, ST_RESP} state_e;

  state_e          state;
  logic [NM-1:0]   cyc_vec;
  logic [MW-1:0]   gnt;
  logic            gnt_valid;
  wb_req_t         req_q;
  logic [SW-1:0]   slv_q, slv_dec;
  logic [DW-1:0]   dat_q;
  wb_req_t         gm_req;
  wb_rsp_t         gs_rsp;

  always_comb
    for (int i = 0; i < NM; i++) cyc_vec[i] = m_req[i].cyc;

  wb_arbiter #(.NM(NM)) u_arbiter (
    .clk, .rst,
    .req      (cyc_vec),
    .decide   (state == ST_IDLE),
    .gnt      (gnt),
    .gnt_valid(gnt_valid)
  );

  // Request of the granted master and address decode.
  always_comb begin
    gm_req  = m_req[gnt];
    slv_dec = SW'(DEFAULT_SLV);
    for (int j = NS - 1; j >= 0; j--)
      if (gm_req.adr >= SLV_BASE[j] && (gm_req.adr - SLV_BASE[j]) < SLV_SIZE[j])
        slv_dec = SW'(j);
  end

  always_comb begin
    gs_rsp = WB_RSP_IDLE;
    for (int j = 0; j < NS; j++)
      if (slv_q == SW'(j)) gs_rsp = s_rsp[j];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      req_q <= WB_REQ_IDLE;
      slv_q <= '0;
      dat_q <= '0;
    end else begin
      case (state)
        ST_IDLE: if (|cyc_vec) state <= ST_ARB;
        ST_ARB: begin
          if (gnt_valid && gm_req.cyc && gm_req.stb) begin
            req_q <= gm_req;
            slv_q <= slv_dec;
            state <= ST_REQ;
          end else begin
            state <= ST_IDLE;
          end
        end
        ST_REQ: begin
          if (slv_q >= SW'(NS)) begin
            dat_q <= '0;
            req_q <= WB_REQ_IDLE;
            state <= ST_RESP;
          end else if (gs_rsp.ack) begin
            dat_q <= gs_rsp.dat;
            req_q <= WB_REQ_IDLE;
            state <= ST_RESP;
          end
        end
        ST_RESP: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int j = 0; j < NS; j++)
      s_req[j] = (state == ST_REQ && slv_q == SW'(j)) ? req_q : WB_REQ_IDLE;
    for (int i = 0; i < NM; i++) begin
      m_rsp[i] = WB_RSP_IDLE;
      if (state == ST_RESP && gnt == MW'(i)) begin
        m_rsp[i].ack = 1'b1;
        m_rsp[i].dat = dat_q;
      end
    end
  end

  // A slave must only acknowledge a cycle addressed to it.
  always_ff @(posedge clk)
    if (!rst)
      for (int j = 0; j < NS; j++)
        assert (!s_rsp[j].ack || s_req[j].cyc)
          else $error("wb_intercon: slave %0d acked without a cycle", j);
endmodule

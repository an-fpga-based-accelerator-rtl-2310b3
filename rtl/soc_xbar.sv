// soc_xbar: fully connected crossbar of the device subsystem, between the bus masters (host
// port, cluster DMA, proxy-core instruction fetch) and the slaves (L2 scratchpad, HW mailbox).
//
// By default every master reaches every slave. A request is routed by address: slave s owns
// [SLV_BASE[s], SLV_BASE[s] + SLV_SIZE[s]); the crossbar forwards the offset inside that window.
// M_MASK[m][s] = 0 hides slave s from master m; the multi-cluster top uses it to give each
// cluster its own port into the shared L2 (several slaves with the same window), with the
// highest-numbered visible slave winning when windows overlap.
// Each slave has a round-robin arbiter, so masters talking to different slaves proceed in the
// same cycle. The response (rvalid, rdata) comes back one cycle after the slave's ready and is
// steered to the master recorded at the handshake. An address that hits no slave is accepted
// at once and answered with all-ones data. Slaves must answer exactly one cycle after ready.
// The document's interconnect is a fully connected AXI4 crossbar; this one keeps its topology
// and arbitration but carries single-beat requests of the reduced system bus instead of the
// five AXI4 channels and bursts.
module soc_xbar
  import ooc_pkg::*;
#(
  parameter int unsigned NM = 3,
  parameter int unsigned NS = 2,
  parameter logic [NS-1:0][31:0] SLV_BASE = {MBOX_BASE, L2_BASE},
  parameter logic [NS-1:0][31:0] SLV_SIZE = {32'h0000_1000, 32'h0004_0000},
  parameter logic [NM-1:0][NS-1:0] M_MASK = '1
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  sbus_req_t [NM-1:0]   m_req_i,
  output sbus_rsp_t [NM-1:0]   m_rsp_o,
  output sbus_req_t [NS-1:0]   s_req_o,
  input  sbus_rsp_t [NS-1:0]   s_rsp_i,
  output logic [7:0]           contention_o   // masters held back by arbitration this cycle
);
  localparam int unsigned MW = $clog2(NM > 1 ? NM : 2);
  localparam int unsigned SW = $clog2(NS + 1);

  logic [NM-1:0][SW-1:0]  dec;          // NS means "no slave"
  logic [NS-1:0][NM-1:0]  sreq, sgnt;
  logic [NS-1:0][MW-1:0]  sidx;
  logic [NS-1:0]          owner_v_q;
  logic [NS-1:0][MW-1:0]  owner_q;
  logic [NM-1:0]          err_q;

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      dec[m] = SW'(NS);
      for (int s = 0; s < NS; s++)
        if (M_MASK[m][s] && m_req_i[m].addr >= SLV_BASE[s] &&
            m_req_i[m].addr - SLV_BASE[s] < SLV_SIZE[s])
          dec[m] = SW'(s);
    end
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NM; m++)
        sreq[s][m] = m_req_i[m].valid && (dec[m] == SW'(s));
  end

  for (genvar s = 0; s < NS; s++) begin : g_slv
    rr_arbiter #(.N(NM)) u_arb (
      .clk_i, .rst_ni, .req_i(sreq[s]), .adv_i(s_rsp_i[s].ready), .gnt_o(sgnt[s]), .idx_o(sidx[s])
    );
    always_comb begin
      s_req_o[s]       = m_req_i[sidx[s]];
      s_req_o[s].valid = |sreq[s];
      s_req_o[s].addr  = m_req_i[sidx[s]].addr - SLV_BASE[s];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      owner_v_q <= '0;
      owner_q   <= '0;
      err_q     <= '0;
    end else begin
      for (int s = 0; s < NS; s++) begin
        owner_v_q[s] <= s_req_o[s].valid && s_rsp_i[s].ready;
        owner_q[s]   <= sidx[s];
      end
      for (int m = 0; m < NM; m++) err_q[m] <= m_req_i[m].valid && (dec[m] == SW'(NS));
    end
  end

  always_comb begin
    contention_o = '0;
    for (int m = 0; m < NM; m++) begin
      m_rsp_o[m].ready  = (dec[m] == SW'(NS));
      m_rsp_o[m].rvalid = err_q[m];
      m_rsp_o[m].rdata  = err_q[m] ? '1 : '0;
      for (int s = 0; s < NS; s++) begin
        if (dec[m] == SW'(s)) m_rsp_o[m].ready = sgnt[s][m] && s_rsp_i[s].ready;
        if (owner_v_q[s] && owner_q[s] == MW'(m)) begin
          m_rsp_o[m].rvalid = s_rsp_i[s].rvalid;
          m_rsp_o[m].rdata  = s_rsp_i[s].rdata;
        end
      end
      if (m_req_i[m].valid && !m_rsp_o[m].ready) contention_o = contention_o + 8'd1;
    end
  end
endmodule

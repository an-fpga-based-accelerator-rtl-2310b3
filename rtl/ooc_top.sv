// ooc_top: device subsystem of the accelerator-rich overlay in its scenario-aware configuration,
// with N_CL clusters (one by default, the configuration evaluated for the application).
//
// Each cluster (ooc_cluster: L1 TCDM + interconnect, DMA, three HWPE accelerators) has its own
// port into a multi-banked L2 scratchpad (l2_spm with N_L2P = N_CL ports) and its own hardware
// mailbox (hw_mailbox) for host-device synchronisation; all of them meet in one crossbar
// (soc_xbar). The parts that are not built here connect through ports:
//  * host processor: a system-bus master port into the crossbar (L2 at 0x1C00_0000, mailbox of
//    cluster k at 0x1A10_0000 + 0x1000*k) and one mailbox interrupt per cluster, irq_host_o[k];
//  * proxy core of cluster k (RV32 soft core with its instruction cache): its instruction-fetch
//    master on the crossbar, its TCDM data port into L1, its peripheral register bus into the
//    cluster, its register bus to the device side of mailbox k, and the interrupt/event lines.
// Crossbar masters: 0 host, 1+2k DMA of cluster k, 2+2k instruction fetch of cluster k.
// Slaves: k = L2 port k, N_CL+k = mailbox k. The masters of cluster k see only L2 port k and
// mailbox k; the host sees L2 port 0 and every mailbox. All L2 ports reach the same banks, so
// every master can address all of L2.
// Monitoring outputs count bank conflicts, crossbar contention and streamer stalls per cycle.
// The partition, the single-cluster default and the scaling of L2 ports with the number of
// clusters follow the document's overlay architecture; bus protocols, the address map and the
// one-mailbox-per-cluster arrangement are this design's choices.
module ooc_top
  import ooc_pkg::*;
#(
  parameter int unsigned N_CL          = 1,
  parameter int unsigned L2_BANKS      = 4,
  parameter int unsigned L2_BANK_WORDS = 8192,
  parameter int unsigned L1_BANKS      = 8,
  parameter int unsigned L1_BANK_WORDS = 4096,
  parameter int unsigned FIR_TAPS      = 128,
  parameter int unsigned IMG_W         = 1440
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // host processor
  input  sbus_req_t                   host_req_i,
  output sbus_rsp_t                   host_rsp_o,
  output logic      [N_CL-1:0]        irq_host_o,
  // proxy cores, one per cluster
  input  sbus_req_t [N_CL-1:0]        core_ifetch_req_i,
  output sbus_rsp_t [N_CL-1:0]        core_ifetch_rsp_o,
  input  tcdm_req_t [N_CL-1:0]        core_tcdm_req_i,
  output tcdm_rsp_t [N_CL-1:0]        core_tcdm_rsp_o,
  input  reg_req_t  [N_CL-1:0]        core_periph_req_i,
  output logic      [N_CL-1:0][31:0]  core_periph_rdata_o,
  input  reg_req_t  [N_CL-1:0]        core_mbox_req_i,
  output logic      [N_CL-1:0][31:0]  core_mbox_rdata_o,
  output logic      [N_CL-1:0]        irq_core_o,
  output logic      [N_CL-1:0][3:0]   evt_o,
  output logic      [N_CL-1:0][3:0]   busy_o,
  // monitoring
  output logic      [N_CL-1:0][7:0]   l1_conflicts_o,
  output logic      [7:0]             xbar_contention_o,
  output logic      [N_CL-1:0][2:0]   hwpe_stall_o
);
  localparam int unsigned NM = 1 + 2 * N_CL;
  localparam int unsigned NS = 2 * N_CL;

  typedef logic [NS-1:0][31:0] addr_vec_t;
  typedef logic [NM-1:0][NS-1:0] mask_t;

  function automatic addr_vec_t slv_base();
    for (int k = 0; k < N_CL; k++) begin
      slv_base[k]        = L2_BASE;
      slv_base[N_CL + k] = MBOX_BASE + 32'h1000 * 32'(k);
    end
  endfunction
  function automatic addr_vec_t slv_size();
    for (int k = 0; k < N_CL; k++) begin
      slv_size[k]        = 32'(L2_BANKS * L2_BANK_WORDS * 8);
      slv_size[N_CL + k] = 32'h0000_1000;
    end
  endfunction
  function automatic mask_t m_mask();
    m_mask = '0;
    m_mask[0][0] = 1'b1;
    for (int k = 0; k < N_CL; k++) begin
      m_mask[0][N_CL + k]         = 1'b1;
      m_mask[1 + 2 * k][k]        = 1'b1;
      m_mask[1 + 2 * k][N_CL + k] = 1'b1;
      m_mask[2 + 2 * k][k]        = 1'b1;
      m_mask[2 + 2 * k][N_CL + k] = 1'b1;
    end
  endfunction

  sbus_req_t [NM-1:0] mreq;
  sbus_rsp_t [NM-1:0] mrsp;
  sbus_req_t [NS-1:0] sreq;
  sbus_rsp_t [NS-1:0] srsp;

  assign mreq[0]    = host_req_i;
  assign host_rsp_o = mrsp[0];

  soc_xbar #(
    .NM(NM), .NS(NS), .SLV_BASE(slv_base()), .SLV_SIZE(slv_size()), .M_MASK(m_mask())
  ) u_xbar (
    .clk_i, .rst_ni, .m_req_i(mreq), .m_rsp_o(mrsp), .s_req_o(sreq), .s_rsp_i(srsp),
    .contention_o(xbar_contention_o)
  );

  l2_spm #(.N_PORTS(N_CL), .NB_BANKS(L2_BANKS), .BANK_WORDS(L2_BANK_WORDS)) u_l2 (
    .clk_i, .rst_ni, .req_i(sreq[N_CL-1:0]), .rsp_o(srsp[N_CL-1:0])
  );

  for (genvar k = 0; k < N_CL; k++) begin : g_cl
    assign mreq[2 + 2 * k]      = core_ifetch_req_i[k];
    assign core_ifetch_rsp_o[k] = mrsp[2 + 2 * k];

    hw_mailbox #(.DEPTH(8)) u_mbox (
      .clk_i, .rst_ni, .host_req_i(sreq[N_CL + k]), .host_rsp_o(srsp[N_CL + k]),
      .dev_req_i(core_mbox_req_i[k]), .dev_rdata_o(core_mbox_rdata_o[k]),
      .irq_dev_o(irq_core_o[k]), .irq_host_o(irq_host_o[k])
    );

    ooc_cluster #(
      .L1_BANKS(L1_BANKS), .L1_BANK_WORDS(L1_BANK_WORDS), .FIR_TAPS(FIR_TAPS), .IMG_W(IMG_W)
    ) u_cluster (
      .clk_i, .rst_ni,
      .periph_req_i(core_periph_req_i[k]), .periph_rdata_o(core_periph_rdata_o[k]),
      .core_tcdm_req_i(core_tcdm_req_i[k]), .core_tcdm_rsp_o(core_tcdm_rsp_o[k]),
      .dma_sbus_req_o(mreq[1 + 2 * k]), .dma_sbus_rsp_i(mrsp[1 + 2 * k]),
      .evt_o(evt_o[k]), .busy_o(busy_o[k]), .l1_conflicts_o(l1_conflicts_o[k]),
      .hwpe_stall_o(hwpe_stall_o[k])
    );
  end
endmodule

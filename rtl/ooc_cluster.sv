// ooc_cluster: one accelerator-rich cluster of the device subsystem.
//
// Contents: the L1 TCDM with its low-latency interconnect (l1_tcdm), the DMA (cluster_dma) and
// three HWPE accelerators arranged as in the scenario-aware merge strategy: wrapper 0 holds the
// merged FIR + Gaussian-convolution datapath, wrapper 1 the CNN datapath, wrapper 2 the Canny
// datapath, so CNN and Canny can run in parallel. The proxy core is outside this module: its data
// port (TCDM) and its peripheral register bus come in as ports.
// L1 master ports: 0-1 DMA, 2 proxy core, 3-4 FIR+Conv (in, out), 5-7 CNN (act, wgt, out),
// 8-10 Canny (img, thr, out).
// Peripheral register bus decode on addr[11:8]: 0 DMA, 1 HWPE0, 2 HWPE1, 3 HWPE2,
// 4 event status (read: bit0 DMA done, bits 1-3 HWPE0-2 done, sticky; any write clears them).
// evt_o pulses per block: bit0 DMA, bits 1-3 HWPE0-2. Composition follows the document; port
// order, decode and the event register are this design's choices.
module ooc_cluster
  import ooc_pkg::*;
#(
  parameter int unsigned L1_BANKS      = 8,
  parameter int unsigned L1_BANK_WORDS = 4096,
  parameter int unsigned FIR_TAPS      = 128,
  parameter int unsigned IMG_W         = 1440
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  reg_req_t     periph_req_i,
  output logic [31:0]  periph_rdata_o,
  input  tcdm_req_t    core_tcdm_req_i,
  output tcdm_rsp_t    core_tcdm_rsp_o,
  output sbus_req_t    dma_sbus_req_o,
  input  sbus_rsp_t    dma_sbus_rsp_i,
  output logic [3:0]   evt_o,
  output logic [3:0]   busy_o,
  output logic [7:0]   l1_conflicts_o,
  output logic [2:0]   hwpe_stall_o
);
  localparam int unsigned NM = 11;

  tcdm_req_t [NM-1:0] treq;
  tcdm_rsp_t [NM-1:0] trsp;
  reg_req_t  [4:0]    sreq;
  logic [4:0][31:0]   srdata;
  logic [3:0]         evt_sticky_q;

  // peripheral decode
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      sreq[i]      = periph_req_i;
      sreq[i].req  = periph_req_i.req && (periph_req_i.addr[11:8] == 4'(i));
      sreq[i].addr = {4'd0, periph_req_i.addr[7:0]};
    end
    periph_rdata_o = (periph_req_i.addr[11:8] < 4'd5) ? srdata[periph_req_i.addr[10:8]] : '0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) evt_sticky_q <= '0;
    else if (sreq[4].req && sreq[4].we) evt_sticky_q <= evt_o;
    else evt_sticky_q <= evt_sticky_q | evt_o;
  end
  assign srdata[4] = {28'd0, evt_sticky_q};

  l1_tcdm #(.NB_MASTERS(NM), .NB_BANKS(L1_BANKS), .BANK_WORDS(L1_BANK_WORDS)) u_l1 (
    .clk_i, .rst_ni, .req_i(treq), .rsp_o(trsp), .conflicts_o(l1_conflicts_o)
  );

  cluster_dma u_dma (
    .clk_i, .rst_ni, .reg_req_i(sreq[0]), .reg_rdata_o(srdata[0]),
    .sbus_req_o(dma_sbus_req_o), .sbus_rsp_i(dma_sbus_rsp_i),
    .tcdm_req_o(treq[1:0]), .tcdm_rsp_i(trsp[1:0]), .busy_o(busy_o[0]), .evt_o(evt_o[0])
  );

  assign treq[2]         = core_tcdm_req_i;
  assign core_tcdm_rsp_o = trsp[2];

  hwpe_wrapper #(.ENGINE(ENG_FIR_CONV), .MAX_TAPS(FIR_TAPS), .MAX_W(IMG_W)) u_hwpe0 (
    .clk_i, .rst_ni, .reg_req_i(sreq[1]), .reg_rdata_o(srdata[1]),
    .tcdm_req_o(treq[4:3]), .tcdm_rsp_i(trsp[4:3]),
    .busy_o(busy_o[1]), .evt_o(evt_o[1]), .stall_o(hwpe_stall_o[0])
  );
  hwpe_wrapper #(.ENGINE(ENG_CNN), .MAX_W(IMG_W)) u_hwpe1 (
    .clk_i, .rst_ni, .reg_req_i(sreq[2]), .reg_rdata_o(srdata[2]),
    .tcdm_req_o(treq[7:5]), .tcdm_rsp_i(trsp[7:5]),
    .busy_o(busy_o[2]), .evt_o(evt_o[2]), .stall_o(hwpe_stall_o[1])
  );
  hwpe_wrapper #(.ENGINE(ENG_CANNY), .MAX_W(IMG_W)) u_hwpe2 (
    .clk_i, .rst_ni, .reg_req_i(sreq[3]), .reg_rdata_o(srdata[3]),
    .tcdm_req_o(treq[10:8]), .tcdm_rsp_i(trsp[10:8]),
    .busy_o(busy_o[3]), .evt_o(evt_o[3]), .stall_o(hwpe_stall_o[2])
  );
endmodule

// l1_tcdm: cluster L1 memory, a multi-banked tightly-coupled data memory (TCDM) behind the
// cluster low-latency interconnect (LIC).
//
// NB_BANKS single-port banks of BANK_WORDS 32-bit words, word-interleaved: byte address bits
// [1:0] select the byte, the next log2(NB_BANKS) bits the bank, the rest the row. Every master
// port can reach every bank. Each bank has a round-robin arbiter: requests to different banks
// are all granted in the same cycle; when several masters hit one bank, one is granted and the
// others see gnt low and must hold their request (a bank conflict stall). Reads and write
// acknowledges return on rvalid exactly one cycle after the grant. Byte enables apply to writes.
// conflicts_o pulses with the number of masters stalled by a conflict in that cycle, for
// monitoring. Banking and word interleaving follow the document's multi-banked L1; the bank
// count, size and single-cycle latency are this design's choices.
module l1_tcdm
  import ooc_pkg::*;
#(
  parameter int unsigned NB_MASTERS = 4,
  parameter int unsigned NB_BANKS   = 8,
  parameter int unsigned BANK_WORDS = 4096
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  tcdm_req_t [NB_MASTERS-1:0]  req_i,
  output tcdm_rsp_t [NB_MASTERS-1:0]  rsp_o,
  output logic [7:0]                  conflicts_o
);
  localparam int unsigned BW = $clog2(NB_BANKS);
  localparam int unsigned RW = $clog2(BANK_WORDS);
  localparam int unsigned MW = $clog2(NB_MASTERS > 1 ? NB_MASTERS : 2);

  logic [NB_BANKS-1:0][NB_MASTERS-1:0] breq, bgnt;
  logic [NB_BANKS-1:0][MW-1:0]         bidx;
  logic [NB_BANKS-1:0][31:0]           brdata;
  logic [NB_MASTERS-1:0]               gnt;
  logic [NB_MASTERS-1:0]               rvalid_q;
  logic [NB_MASTERS-1:0][BW-1:0]       rbank_q;

  function automatic logic [BW-1:0] bank_of(input logic [31:0] a);
    return a[2 +: BW];
  endfunction

  always_comb begin
    for (int b = 0; b < NB_BANKS; b++)
      for (int m = 0; m < NB_MASTERS; m++)
        breq[b][m] = req_i[m].req && (bank_of(req_i[m].addr) == BW'(b));
  end

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    logic [31:0] mem [BANK_WORDS];
    tcdm_req_t   r;

    rr_arbiter #(.N(NB_MASTERS)) u_arb (
      .clk_i, .rst_ni, .req_i(breq[b]), .adv_i(1'b1), .gnt_o(bgnt[b]), .idx_o(bidx[b])
    );

    assign r = req_i[bidx[b]];

    always_ff @(posedge clk_i) begin
      if (|breq[b]) begin
        if (r.we) begin
          for (int k = 0; k < 4; k++)
            if (r.be[k]) mem[r.addr[2+BW +: RW]][8*k +: 8] <= r.wdata[8*k +: 8];
        end else begin
          brdata[b] <= mem[r.addr[2+BW +: RW]];
        end
      end
    end
  end

  always_comb begin
    gnt = '0;
    for (int b = 0; b < NB_BANKS; b++) gnt |= bgnt[b];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_q <= '0;
      rbank_q  <= '0;
    end else begin
      rvalid_q <= gnt;
      for (int m = 0; m < NB_MASTERS; m++) rbank_q[m] <= bank_of(req_i[m].addr);
    end
  end

  always_comb begin
    conflicts_o = '0;
    for (int m = 0; m < NB_MASTERS; m++) begin
      rsp_o[m].gnt    = gnt[m];
      rsp_o[m].rvalid = rvalid_q[m];
      rsp_o[m].rdata  = brdata[rbank_q[m]];
      if (req_i[m].req && !gnt[m]) conflicts_o = conflicts_o + 8'd1;
    end
  end
endmodule

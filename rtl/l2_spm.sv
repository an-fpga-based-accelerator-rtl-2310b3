// l2_spm: multi-banked, software-managed L2 scratchpad memory of the device subsystem.
//
// NB_BANKS single-port banks of BANK_WORDS 64-bit words, interleaved on 64-bit words (address
// bits [2:0] byte, next log2(NB_BANKS) bits bank, then row). N_PORTS system-bus slave ports,
// one per cluster in a multi-cluster overlay; requests from different ports to different banks
// are served in the same cycle, a bank conflict is resolved round-robin and the loser sees
// ready low. Read data / write acknowledge return on rvalid one cycle after ready.
// Byte enables apply to writes. Only the low address bits are decoded (the crossbar removes the
// base). The document specifies a multi-banked L2 with one port per cluster (N_L2P = N_Cl); bank
// count and size are this design's choices.
module l2_spm
  import ooc_pkg::*;
#(
  parameter int unsigned N_PORTS    = 1,
  parameter int unsigned NB_BANKS   = 4,
  parameter int unsigned BANK_WORDS = 8192
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  sbus_req_t [N_PORTS-1:0]  req_i,
  output sbus_rsp_t [N_PORTS-1:0]  rsp_o
);
  localparam int unsigned BW = $clog2(NB_BANKS);
  localparam int unsigned RW = $clog2(BANK_WORDS);
  localparam int unsigned PW = $clog2(N_PORTS > 1 ? N_PORTS : 2);

  logic [NB_BANKS-1:0][N_PORTS-1:0] breq, bgnt;
  logic [NB_BANKS-1:0][PW-1:0]      bidx;
  logic [NB_BANKS-1:0][63:0]        brdata;
  logic [N_PORTS-1:0]               gnt, rvalid_q;
  logic [N_PORTS-1:0][BW-1:0]       rbank_q;

  function automatic logic [BW-1:0] bank_of(input logic [31:0] a);
    return a[3 +: BW];
  endfunction

  always_comb begin
    for (int b = 0; b < NB_BANKS; b++)
      for (int p = 0; p < N_PORTS; p++)
        breq[b][p] = req_i[p].valid && (bank_of(req_i[p].addr) == BW'(b));
  end

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    logic [63:0] mem [BANK_WORDS];
    sbus_req_t   r;

    rr_arbiter #(.N(N_PORTS)) u_arb (
      .clk_i, .rst_ni, .req_i(breq[b]), .adv_i(1'b1), .gnt_o(bgnt[b]), .idx_o(bidx[b])
    );
    assign r = req_i[bidx[b]];

    always_ff @(posedge clk_i) begin
      if (|breq[b]) begin
        if (r.we) begin
          for (int k = 0; k < 8; k++)
            if (r.be[k]) mem[r.addr[3+BW +: RW]][8*k +: 8] <= r.wdata[8*k +: 8];
        end else begin
          brdata[b] <= mem[r.addr[3+BW +: RW]];
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
      for (int p = 0; p < N_PORTS; p++) rbank_q[p] <= bank_of(req_i[p].addr);
    end
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      rsp_o[p].ready  = gnt[p];
      rsp_o[p].rvalid = rvalid_q[p];
      rsp_o[p].rdata  = brdata[rbank_q[p]];
    end
  end
endmodule

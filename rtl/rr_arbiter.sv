// rr_arbiter: round-robin arbiter. gnt_o is one-hot among req_i (or zero when no request);
// the priority pointer moves just past the granted requester when adv_i is high, so every
// requester is served within N grants. Combinational grant, one pointer register.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic [N-1:0] req_i,
  input  logic         adv_i,
  output logic [N-1:0] gnt_o,
  output logic [$clog2(N > 1 ? N : 2)-1:0] idx_o
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] ptr_q;

  always_comb begin
    gnt_o = '0;
    idx_o = '0;
    for (int i = N - 1; i >= 0; i--) begin
      // scan from ptr upwards with wrap-around; the last hit in this loop order wins
      int j;
      j = (int'(ptr_q) + i) % N;
      if (req_i[j]) begin
        gnt_o = '0;
        gnt_o[j] = 1'b1;
        idx_o = IW'(j);
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) ptr_q <= '0;
    else if (adv_i && |req_i) ptr_q <= (int'(idx_o) == N - 1) ? '0 : idx_o + IW'(1);
  end
endmodule

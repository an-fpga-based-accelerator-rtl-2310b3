// hwpe_streamer: I/O data interface between an accelerator engine and the cluster L1 memory.
//
// N_SRC source units and one sink unit, each with its own TCDM port and FIFO. A source walks
// the addresses base, base+stride, ... for count words, issues one TCDM read per cycle while its
// FIFO has room for every outstanding word, and pushes the returned words into the FIFO that
// feeds the engine input. The sink takes engine results through its FIFO and writes them to
// base, base+stride, ... ; done_o pulses when the last of its count writes has been
// acknowledged. start_i (one cycle) latches the stream descriptors and clears the FIFOs.
// Decoupling the engine from memory through FIFOs follows the document's HWPE streamer; the
// descriptor format (base, count, stride in bytes) and FIFO depth are this design's choices.
module hwpe_streamer
  import ooc_pkg::*;
#(
  parameter int unsigned N_SRC = 1,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic                     start_i,
  input  logic [N_SRC:0][31:0]     base_i,    // sources 0..N_SRC-1, sink N_SRC
  input  logic [N_SRC:0][31:0]     count_i,
  input  logic [N_SRC:0][31:0]     stride_i,
  output tcdm_req_t [N_SRC:0]      tcdm_req_o,
  input  tcdm_rsp_t [N_SRC:0]      tcdm_rsp_i,
  output logic [N_SRC-1:0]         src_valid_o,
  input  logic [N_SRC-1:0]         src_ready_i,
  output logic [N_SRC-1:0][31:0]   src_data_o,
  input  logic                     sink_valid_i,
  output logic                     sink_ready_o,
  input  logic [31:0]              sink_data_i,
  output logic                     done_o,
  output logic                     stall_o    // a source FIFO is full or a TCDM request waits
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [N_SRC:0][31:0] addr_q, left_q;
  logic [N_SRC-1:0][CW-1:0] outst_q, fcnt;
  logic [N_SRC-1:0] f_in_ready;
  logic [N_SRC-1:0] src_stall;

  // ---------------- sources ----------------
  for (genvar s = 0; s < N_SRC; s++) begin : g_src
    logic issue;
    assign issue = (left_q[s] != 0) && (32'(outst_q[s]) + 32'(fcnt[s]) < DEPTH);
    assign tcdm_req_o[s] = '{req: issue, we: 1'b0, be: 4'hF, addr: addr_q[s], wdata: '0};
    assign src_stall[s]  = (left_q[s] != 0) && (!issue || !tcdm_rsp_i[s].gnt);

    stream_fifo #(.W(32), .DEPTH(DEPTH)) u_fifo (
      .clk_i, .rst_ni, .clear_i(start_i),
      .in_valid_i(tcdm_rsp_i[s].rvalid), .in_ready_o(f_in_ready[s]), .in_data_i(tcdm_rsp_i[s].rdata),
      .out_valid_o(src_valid_o[s]), .out_ready_i(src_ready_i[s]), .out_data_o(src_data_o[s]),
      .count_o(fcnt[s])
    );

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        addr_q[s] <= '0; left_q[s] <= '0; outst_q[s] <= '0;
      end else if (start_i) begin
        addr_q[s] <= base_i[s]; left_q[s] <= count_i[s]; outst_q[s] <= '0;
      end else begin
        if (issue && tcdm_rsp_i[s].gnt) begin
          addr_q[s] <= addr_q[s] + stride_i[s];
          left_q[s] <= left_q[s] - 1;
        end
        outst_q[s] <= outst_q[s] + CW'(issue && tcdm_rsp_i[s].gnt) - CW'(tcdm_rsp_i[s].rvalid);
      end
    end
  end

  // ---------------- sink ----------------
  logic        k_valid;
  logic [31:0] k_data;
  logic [31:0] acks_q;
  logic        k_issue;
  logic        active_q;

  stream_fifo #(.W(32), .DEPTH(DEPTH)) u_sink_fifo (
    .clk_i, .rst_ni, .clear_i(start_i),
    .in_valid_i(sink_valid_i), .in_ready_o(sink_ready_o), .in_data_i(sink_data_i),
    .out_valid_o(k_valid), .out_ready_i(k_issue && tcdm_rsp_i[N_SRC].gnt), .out_data_o(k_data),
    .count_o()
  );

  assign k_issue = k_valid && (left_q[N_SRC] != 0);
  assign tcdm_req_o[N_SRC] = '{req: k_issue, we: 1'b1, be: 4'hF, addr: addr_q[N_SRC], wdata: k_data};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q[N_SRC] <= '0; left_q[N_SRC] <= '0; acks_q <= '0; active_q <= 1'b0; done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        addr_q[N_SRC] <= base_i[N_SRC]; left_q[N_SRC] <= count_i[N_SRC];
        acks_q <= '0; active_q <= 1'b1;
      end else begin
        if (k_issue && tcdm_rsp_i[N_SRC].gnt) begin
          addr_q[N_SRC] <= addr_q[N_SRC] + stride_i[N_SRC];
          left_q[N_SRC] <= left_q[N_SRC] - 1;
        end
        if (tcdm_rsp_i[N_SRC].rvalid) acks_q <= acks_q + 1;
        if (active_q && (acks_q + 32'(tcdm_rsp_i[N_SRC].rvalid) == count_i[N_SRC])) begin
          active_q <= 1'b0;
          done_o   <= 1'b1;
        end
      end
    end
  end

  assign stall_o = |src_stall || (k_issue && !tcdm_rsp_i[N_SRC].gnt);

  // every word read from L1 must find room in its FIFO (guaranteed by the credit count)
  for (genvar s = 0; s < N_SRC; s++) begin : g_chk
    assert property (@(posedge clk_i) disable iff (!rst_ni) tcdm_rsp_i[s].rvalid |-> f_in_ready[s]);
  end
endmodule

// cluster_dma: software-programmed DMA engine moving data between L2 (system bus) and the
// cluster L1 memory in 64-bit beats.
//
// Registers (register bus, map in ooc_pkg): SRC, DST, LEN (bytes, multiple of 8), DIR
// (0: L2 -> L1, 1: L1 -> L2), CMD, STATUS {queue full, done, busy}. SRC..DIR are staging
// registers that may be written at any time; a CMD write copies them as one job into a job queue
// of JOBQ entries (a CMD while the queue is full is dropped; STATUS bit 2 tells). Jobs run in
// order; busy stays high while a job runs or waits, done is set when the last queued job ends
// and cleared by the next CMD. One beat of 64 bits moves
// per step: for L2 -> L1 one system-bus read, then the two 32-bit halves are written to L1 through
// two TCDM ports in parallel (low word at the even address); for L1 -> L2 the two halves are read
// in parallel and written with one system-bus write. A bank conflict simply delays a half until it
// is granted. evt_o pulses when the last beat has completed. Beats are not overlapped: one beat
// takes 4 cycles without contention. 64-bit bidirectional transfers and a job queue of
// configurable size follow the document; the register map, the queue depth of 4, the single
// outstanding beat and the timing are this design's choices.
module cluster_dma
  import ooc_pkg::*;
#(
  parameter int unsigned JOBQ = 4
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  reg_req_t             reg_req_i,
  output logic [31:0]          reg_rdata_o,
  output sbus_req_t            sbus_req_o,
  input  sbus_rsp_t            sbus_rsp_i,
  output tcdm_req_t [1:0]      tcdm_req_o,
  input  tcdm_rsp_t [1:0]      tcdm_rsp_i,
  output logic                 busy_o,
  output logic                 evt_o
);
  typedef enum logic [2:0] { S_IDLE, S_L2_RD, S_L2_WAIT, S_L1_WR, S_L1_RD, S_L2_WR, S_L2_ACK, S_DONE }
    state_e;
  state_e state_q;

  logic [31:0] src_q, dst_q, len_q, cur_src_q, cur_dst_q, left_q;
  logic        dir_q, job_dir_q, done_q;
  logic [63:0] buf_q;
  logic [1:0]  half_done_q;   // L1 halves already granted (write) / returned (read)
  logic [1:0]  half_gnt_q;    // L1 read halves granted, data arriving next cycle
  logic        wr;

  typedef struct packed {
    logic [31:0] src;
    logic [31:0] dst;
    logic [31:0] len;
    logic        dir;
  } job_t;
  job_t jq_in, jq_out;
  logic jq_push, jq_ready, jq_valid, jq_pop;

  assign wr      = reg_req_i.req && reg_req_i.we;
  assign jq_in   = '{src: src_q, dst: dst_q, len: len_q, dir: job_dir_q};
  assign jq_push = wr && (reg_req_i.addr == DMA_CMD);
  assign jq_pop  = (state_q == S_IDLE) && jq_valid;

  stream_fifo #(.W($bits(job_t)), .DEPTH(JOBQ)) u_jobq (
    .clk_i, .rst_ni, .clear_i(1'b0),
    .in_valid_i(jq_push), .in_ready_o(jq_ready), .in_data_i(jq_in),
    .out_valid_o(jq_valid), .out_ready_i(jq_pop), .out_data_o(jq_out), .count_o()
  );

  always_comb begin
    reg_rdata_o = '0;
    unique case (reg_req_i.addr)
      DMA_SRC:    reg_rdata_o = src_q;
      DMA_DST:    reg_rdata_o = dst_q;
      DMA_LEN:    reg_rdata_o = len_q;
      DMA_DIR:    reg_rdata_o = {31'd0, job_dir_q};
      DMA_STATUS: reg_rdata_o = {29'd0, !jq_ready, done_q, busy_o};
      default:    reg_rdata_o = '0;
    endcase
  end

  // system bus side: source/destination is SRC for L2 -> L1 and DST for L1 -> L2
  always_comb begin
    sbus_req_o       = '0;
    sbus_req_o.be    = 8'hFF;
    sbus_req_o.valid = (state_q == S_L2_RD) || (state_q == S_L2_WR);
    sbus_req_o.we    = (state_q == S_L2_WR);
    sbus_req_o.addr  = dir_q ? cur_dst_q : cur_src_q;
    sbus_req_o.wdata = buf_q;
  end

  // L1 side: two halves, low word on port 0
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      tcdm_req_o[h].req   = ((state_q == S_L1_WR) || (state_q == S_L1_RD)) && !half_done_q[h]
                            && !half_gnt_q[h];
      tcdm_req_o[h].we    = (state_q == S_L1_WR);
      tcdm_req_o[h].be    = 4'hF;
      tcdm_req_o[h].addr  = (dir_q ? cur_src_q : cur_dst_q) + 32'(4 * h);
      tcdm_req_o[h].wdata = buf_q[32*h +: 32];
    end
  end

  // staging registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      src_q <= '0; dst_q <= '0; len_q <= '0; job_dir_q <= 1'b0;
    end else if (wr) begin
      unique case (reg_req_i.addr)
        DMA_SRC: src_q     <= reg_req_i.wdata;
        DMA_DST: dst_q     <= reg_req_i.wdata;
        DMA_LEN: len_q     <= reg_req_i.wdata;
        DMA_DIR: job_dir_q <= reg_req_i.wdata[0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE; dir_q <= 1'b0; done_q <= 1'b0;
      cur_src_q <= '0; cur_dst_q <= '0; left_q <= '0; buf_q <= '0;
      half_done_q <= '0; half_gnt_q <= '0;
    end else begin
      if (jq_push) done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (jq_valid) begin
            cur_src_q   <= jq_out.src;
            cur_dst_q   <= jq_out.dst;
            left_q      <= jq_out.len;
            dir_q       <= jq_out.dir;
            half_done_q <= '0;
            half_gnt_q  <= '0;
            state_q     <= (jq_out.len == 0) ? S_DONE : (jq_out.dir ? S_L1_RD : S_L2_RD);
          end
        end
        S_L2_RD:   if (sbus_rsp_i.ready) state_q <= S_L2_WAIT;
        S_L2_WAIT: if (sbus_rsp_i.rvalid) begin
                     buf_q   <= sbus_rsp_i.rdata;
                     state_q <= S_L1_WR;
                   end
        S_L1_WR: begin
          for (int h = 0; h < 2; h++) if (tcdm_rsp_i[h].gnt) half_done_q[h] <= 1'b1;
          if ((half_done_q | {tcdm_rsp_i[1].gnt, tcdm_rsp_i[0].gnt}) == 2'b11) begin
            half_done_q <= '0;
            state_q     <= (left_q == 32'd8) ? S_DONE : S_L2_RD;
            left_q      <= left_q - 32'd8;
            cur_src_q   <= cur_src_q + 32'd8;
            cur_dst_q   <= cur_dst_q + 32'd8;
          end
        end
        S_L1_RD: begin
          for (int h = 0; h < 2; h++) begin
            if (tcdm_req_o[h].req && tcdm_rsp_i[h].gnt) half_gnt_q[h] <= 1'b1;
            if (tcdm_rsp_i[h].rvalid && half_gnt_q[h]) begin
              buf_q[32*h +: 32] <= tcdm_rsp_i[h].rdata;
              half_done_q[h]    <= 1'b1;
              half_gnt_q[h]     <= 1'b0;
            end
          end
          if ((half_done_q | (half_gnt_q & {tcdm_rsp_i[1].rvalid, tcdm_rsp_i[0].rvalid})) == 2'b11)
            state_q <= S_L2_WR;
        end
        S_L2_WR:  if (sbus_rsp_i.ready) state_q <= S_L2_ACK;
        S_L2_ACK: if (sbus_rsp_i.rvalid) begin
                    half_done_q <= '0;
                    state_q     <= (left_q == 32'd8) ? S_DONE : S_L1_RD;
                    left_q      <= left_q - 32'd8;
                    cur_src_q   <= cur_src_q + 32'd8;
                    cur_dst_q   <= cur_dst_q + 32'd8;
                  end
        S_DONE: begin
          if (!jq_valid && !jq_push) done_q <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE) || jq_valid;
  assign evt_o  = (state_q == S_DONE);
endmodule

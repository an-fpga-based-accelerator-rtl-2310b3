// hwpe_ctrl: controller of an HWPE accelerator: register file plus control FSM.
//
// The proxy core programs the job through the register bus (single-cycle write, combinational
// read, map in ooc_pkg): kernel select, up to HWPE_MAXSTR stream descriptors (base, count,
// stride) and HWPE_NPARAM engine parameters. Writing TRIGGER while idle starts the job:
//   IDLE --trigger--> START (one cycle: start_o clears engine and streamer, latches descriptors)
//        --> RUN --stream_done_i--> DONE (one cycle: evt_o pulses, sticky done bit set) --> IDLE.
// A trigger while busy is ignored. STATUS reads {done, busy}; reading it does not clear done,
// the next trigger does. Because the kernel select is a plain register, switching the function
// of a merged datapath costs one write, effective on the next cycle. The register-file/FSM split
// follows the document; the register map, FSM states and status coding are this design's.
module hwpe_ctrl
  import ooc_pkg::*;
(
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  reg_req_t                      reg_req_i,
  output logic [31:0]                   reg_rdata_o,
  output logic                          start_o,
  output logic                          busy_o,
  output logic                          evt_o,
  input  logic                          stream_done_i,
  output logic [1:0]                    sel_o,
  output logic [HWPE_MAXSTR-1:0][31:0]  base_o,
  output logic [HWPE_MAXSTR-1:0][31:0]  count_o,
  output logic [HWPE_MAXSTR-1:0][31:0]  stride_o,
  output logic [HWPE_NPARAM-1:0][31:0]  param_o
);
  typedef enum logic [1:0] { S_IDLE, S_START, S_RUN, S_DONE } state_e;
  state_e state_q;
  logic   done_q;
  logic   wr;

  assign wr = reg_req_i.req && reg_req_i.we;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sel_o <= '0; base_o <= '0; count_o <= '0; stride_o <= '0; param_o <= '0;
    end else if (wr && state_q == S_IDLE) begin
      if (reg_req_i.addr == HWPE_SEL) sel_o <= reg_req_i.wdata[1:0];
      for (int i = 0; i < HWPE_MAXSTR; i++) begin
        if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i))     base_o[i]   <= reg_req_i.wdata;
        if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i + 4)) count_o[i]  <= reg_req_i.wdata;
        if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i + 8)) stride_o[i] <= reg_req_i.wdata;
      end
      for (int i = 0; i < HWPE_NPARAM; i++)
        if (reg_req_i.addr == HWPE_PARAM0 + 12'(4*i)) param_o[i] <= reg_req_i.wdata;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      done_q  <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (wr && reg_req_i.addr == HWPE_TRIGGER) begin
                   state_q <= S_START;
                   done_q  <= 1'b0;
                 end
        S_START: state_q <= S_RUN;
        S_RUN:   if (stream_done_i) state_q <= S_DONE;
        S_DONE:  begin
                   state_q <= S_IDLE;
                   done_q  <= 1'b1;
                 end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign start_o = (state_q == S_START);
  assign busy_o  = (state_q != S_IDLE);
  assign evt_o   = (state_q == S_DONE);

  always_comb begin
    reg_rdata_o = '0;
    if (reg_req_i.addr == HWPE_STATUS) reg_rdata_o = {30'd0, done_q, busy_o};
    else if (reg_req_i.addr == HWPE_SEL) reg_rdata_o = {30'd0, sel_o};
    for (int i = 0; i < HWPE_MAXSTR; i++) begin
      if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i))     reg_rdata_o = base_o[i];
      if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i + 4)) reg_rdata_o = count_o[i];
      if (reg_req_i.addr == HWPE_STREAM0 + 12'(16*i + 8)) reg_rdata_o = stride_o[i];
    end
    for (int i = 0; i < HWPE_NPARAM; i++)
      if (reg_req_i.addr == HWPE_PARAM0 + 12'(4*i)) reg_rdata_o = param_o[i];
  end
endmodule

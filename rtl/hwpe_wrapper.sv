// hwpe_wrapper: a Hardware Processing Engine (HWPE) accelerator: streamer, engine and
// controller around one coarse-grain reconfigurable datapath.
//
// ENGINE selects the datapath: ENG_FIR_CONV (the merged FIR + Gaussian convolution datapath,
// one input stream), ENG_CNN (two inputs: activations, weights) or ENG_CANNY (two inputs: image,
// thresholds); each has one output stream. The streamer gives the engine one TCDM port per
// input plus one for the output (N_IN + 1 ports, inputs first). The controller is programmed
// over the register bus; evt_o pulses when a job has written its last result to L1.
// Engine parameters used per datapath (param index: meaning):
//   FIR+Conv: 0 taps mode / coefficient load, 1 FIR shift, 2 image width; select in SEL.
//   CNN:      0 dot-product length, 1 shift, 2 ReLU enable.
//   Canny:    2 image width.
// Streamer / controller / engine partition follows the document; port counts follow its
// per-kernel input/output counts; the rest is this design's choice.
module hwpe_wrapper
  import ooc_pkg::*;
#(
  parameter engine_e     ENGINE   = ENG_FIR_CONV,
  parameter int unsigned MAX_TAPS = 128,
  parameter int unsigned MAX_W    = 1440,
  parameter int unsigned N_IN     = (ENGINE == ENG_FIR_CONV) ? 1 : 2
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  reg_req_t            reg_req_i,
  output logic [31:0]         reg_rdata_o,
  output tcdm_req_t [N_IN:0]  tcdm_req_o,
  input  tcdm_rsp_t [N_IN:0]  tcdm_rsp_i,
  output logic                busy_o,
  output logic                evt_o,
  output logic                stall_o
);
  logic start, sdone;
  logic [1:0] sel;
  logic [HWPE_MAXSTR-1:0][31:0] base, count, stride;
  logic [HWPE_NPARAM-1:0][31:0] param;

  logic [N_IN-1:0]       s_valid, s_ready;
  logic [N_IN-1:0][31:0] s_data;
  logic                  o_valid, o_ready;
  logic [31:0]           o_data;

  hwpe_ctrl u_ctrl (
    .clk_i, .rst_ni, .reg_req_i, .reg_rdata_o,
    .start_o(start), .busy_o, .evt_o, .stream_done_i(sdone),
    .sel_o(sel), .base_o(base), .count_o(count), .stride_o(stride), .param_o(param)
  );

  hwpe_streamer #(.N_SRC(N_IN), .DEPTH(4)) u_streamer (
    .clk_i, .rst_ni, .start_i(start),
    .base_i(base[N_IN:0]), .count_i(count[N_IN:0]), .stride_i(stride[N_IN:0]),
    .tcdm_req_o, .tcdm_rsp_i,
    .src_valid_o(s_valid), .src_ready_i(s_ready), .src_data_o(s_data),
    .sink_valid_i(o_valid), .sink_ready_o(o_ready), .sink_data_i(o_data),
    .done_o(sdone), .stall_o
  );

  if (ENGINE == ENG_FIR_CONV) begin : g_fir_conv
    fir_conv_dp #(.MAX_TAPS(MAX_TAPS), .MAX_W(MAX_W)) u_engine (
      .clk_i, .rst_ni, .clear_i(start), .sel_i(sel), .param_i(param),
      .in_valid_i(s_valid[0]), .in_ready_o(s_ready[0]), .in_data_i(s_data[0]),
      .out_valid_o(o_valid), .out_ready_i(o_ready), .out_data_o(o_data)
    );
  end else if (ENGINE == ENG_CNN) begin : g_cnn
    cnn_engine u_engine (
      .clk_i, .rst_ni, .clear_i(start),
      .n_i(param[0][15:0]), .shift_i(param[1][4:0]), .relu_i(param[2][0]),
      .act_valid_i(s_valid[0]), .act_ready_o(s_ready[0]), .act_data_i(s_data[0]),
      .wgt_valid_i(s_valid[1]), .wgt_ready_o(s_ready[1]), .wgt_data_i(s_data[1]),
      .out_valid_o(o_valid), .out_ready_i(o_ready), .out_data_o(o_data)
    );
  end else begin : g_canny
    canny_engine #(.MAX_W(MAX_W)) u_engine (
      .clk_i, .rst_ni, .clear_i(start), .width_i(param[2][15:0]),
      .pix_valid_i(s_valid[0]), .pix_ready_o(s_ready[0]), .pix_data_i(s_data[0]),
      .thr_valid_i(s_valid[1]), .thr_ready_o(s_ready[1]), .thr_data_i(s_data[1]),
      .out_valid_o(o_valid), .out_ready_i(o_ready), .out_data_o(o_data)
    );
  end
endmodule

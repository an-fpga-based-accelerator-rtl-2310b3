// fir_conv_dp: merged coarse-grain reconfigurable datapath running either the FIR low-pass
// filter or the Gaussian convolution (the two single-input kernels of the pre-processing stage).
//
// The two dataflow networks share the input and output ports of the datapath. An input switching
// box (SB_0) steers the stream to the selected actor and an output switching box (SB_1) picks
// the matching result; a configuration table, indexed by the kernel selected in the wrapper's
// register, drives both boxes. A new selection takes effect in the cycle after it is written, so
// switching between the kernels costs one clock cycle; the two kernels never run at once.
// Engine parameters (from the HWPE register file):
//   param[0] bit0: FIR taps mode (0: 64, 1: 128); bit1: FIR coefficient load
//   param[1] [4:0]: FIR output shift
//   param[2] [15:0]: image width for the convolution
// Merging with switching boxes and a configuration table follows the document; the table
// contents, the parameter layout and the register stage on the selection are this design's.
module fir_conv_dp
  import ooc_pkg::*;
#(
  parameter int unsigned MAX_TAPS = 128,
  parameter int unsigned MAX_W    = 1440
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        clear_i,
  input  logic [1:0]  sel_i,
  input  logic [HWPE_NPARAM-1:0][31:0] param_i,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  logic [31:0] in_data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic [31:0] out_data_o
);
  // configuration table: one row per kernel, one column per switching box
  typedef struct packed { logic sb0; logic sb1; } ctab_row_t;
  localparam ctab_row_t CTAB [2] = '{ '{sb0: 1'b0, sb1: 1'b0},    // FIR
                                      '{sb0: 1'b1, sb1: 1'b1} };  // Conv
  ctab_row_t cfg_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) cfg_q <= CTAB[0];
    else         cfg_q <= CTAB[sel_i[0]];
  end

  logic [1:0] a_valid, a_ready, r_valid, r_ready;
  logic [31:0] a_data;
  logic [1:0][31:0] r_data;

  sbox_1x2 #(.W(32)) u_sb0 (
    .sel_i(cfg_q.sb0), .in_valid_i, .in_ready_o, .in_data_i,
    .out_valid_o(a_valid), .out_ready_i(a_ready), .out_data_o(a_data)
  );

  fir_systolic #(.MAX_TAPS(MAX_TAPS)) u_fir (
    .clk_i, .rst_ni, .clear_i,
    .taps_mode_i(param_i[0][0]), .load_i(param_i[0][1]), .shift_i(param_i[1][4:0]),
    .in_valid_i(a_valid[0]), .in_ready_o(a_ready[0]), .in_data_i(a_data),
    .out_valid_o(r_valid[0]), .out_ready_i(r_ready[0]), .out_data_o(r_data[0])
  );

  gauss_conv #(.MAX_W(MAX_W)) u_conv (
    .clk_i, .rst_ni, .clear_i, .width_i(param_i[2][15:0]),
    .in_valid_i(a_valid[1]), .in_ready_o(a_ready[1]), .in_data_i(a_data),
    .out_valid_o(r_valid[1]), .out_ready_i(r_ready[1]), .out_data_o(r_data[1])
  );

  sbox_2x1 #(.W(32)) u_sb1 (
    .sel_i(cfg_q.sb1), .in_valid_i(r_valid), .in_ready_o(r_ready), .in_data_i(r_data),
    .out_valid_o, .out_ready_i, .out_data_o
  );
endmodule

// gauss_conv: Gaussian denoising of a grey-scale image stream (the "Conv" kernel).
//
// A 3x3 window (line_window3) slides over the raster-order input; every full window is
// filtered with the binomial kernel [1 2 1; 2 4 2; 1 2 1] / 16, rounded to nearest. Pixels are
// 8-bit, carried in bits [7:0] of 32-bit stream words; an image of W x H pixels gives
// (W-2) x (H-2) output pixels (valid region only). One pixel is accepted per cycle when the
// output side is ready; the result appears one cycle after the pixel that completes the window.
// The document names a pipelined Gaussian convolution and a 1440x900 image; the 3x3 kernel,
// the border handling and the rounding are this design's choices.
module gauss_conv #(
  parameter int unsigned MAX_W = 1440
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        clear_i,
  input  logic [15:0] width_i,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  logic [31:0] in_data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic [31:0] out_data_o
);
  logic [2:0][2:0][7:0] win;
  logic [11:0] acc;

  line_window3 #(.PW(8), .MAX_W(MAX_W)) u_win (
    .clk_i, .rst_ni, .clear_i, .width_i,
    .in_valid_i, .in_ready_o, .in_data_i(in_data_i[7:0]),
    .out_valid_o, .out_ready_i, .win_o(win)
  );

  always_comb begin
    acc = 12'(win[0][0]) + 12'(win[0][2]) + 12'(win[2][0]) + 12'(win[2][2])
        + (12'(win[0][1]) << 1) + (12'(win[1][0]) << 1) + (12'(win[1][2]) << 1)
        + (12'(win[2][1]) << 1) + (12'(win[1][1]) << 2) + 12'd8;
    out_data_o = {24'd0, acc[11:4]};
  end
endmodule

// canny_engine: Canny-style edge detector built on a Sobel operator (the "Canny" kernel).
//
// Input port 0 carries the grey-scale image (8-bit pixels in bits [7:0], raster order); input
// port 1 carries one word per job with the hysteresis thresholds (low in [15:0], high in
// [31:16]), consumed before the first pixel. Three 3x3 window stages follow each other:
//  1. Sobel: gx, gy over the pixel window; magnitude |gx|+|gy| (11 bits) and the gradient
//     direction quantised to 0 (horizontal), 1 (down-right diagonal), 2 (vertical),
//     3 (down-left diagonal) using tan(22.5 deg) ~ 106/256.
//  2. Non-maximum suppression over the magnitude window along the gradient direction, then the
//     double threshold: strong edge (mag >= high), weak edge (low <= mag < high) or none.
//  3. Hysteresis over the class window: a strong pixel is an edge, a weak pixel is an edge when
//     one of its 8 neighbours is strong, everything else is not. Output 255 (edge) or 0.
// A W x H image gives (W-6) x (H-6) output pixels. One pixel per cycle when not stalled; the
// latency is about two image rows per stage.
// The document names a Sobel-based Canny detector with two inputs and one output; the
// threshold input, the direction quantisation and the output coding are this design's choices.
// The hysteresis is a single pass over the 8-neighbourhood: a weak pixel connected to a strong
// one only through other weak pixels is not promoted, as full Canny tracking would do.
module canny_engine #(
  parameter int unsigned MAX_W = 1440
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        clear_i,
  input  logic [15:0] width_i,
  input  logic        pix_valid_i,
  output logic        pix_ready_o,
  input  logic [31:0] pix_data_i,
  input  logic        thr_valid_i,
  output logic        thr_ready_o,
  input  logic [31:0] thr_data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic [31:0] out_data_o
);
  logic        thr_ok_q;
  logic [15:0] lo_q, hi_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      thr_ok_q <= 1'b0; lo_q <= '0; hi_q <= '0;
    end else if (clear_i) begin
      thr_ok_q <= 1'b0;
    end else if (thr_valid_i && !thr_ok_q) begin
      thr_ok_q <= 1'b1;
      lo_q     <= thr_data_i[15:0];
      hi_q     <= thr_data_i[31:16];
    end
  end
  assign thr_ready_o = !thr_ok_q;

  // ---------------- stage 1: Sobel ----------------
  logic s1_in_ready, s1_valid, s1_ready;
  logic [2:0][2:0][7:0] pw;

  line_window3 #(.PW(8), .MAX_W(MAX_W)) u_w1 (
    .clk_i, .rst_ni, .clear_i, .width_i,
    .in_valid_i(pix_valid_i && thr_ok_q), .in_ready_o(s1_in_ready), .in_data_i(pix_data_i[7:0]),
    .out_valid_o(s1_valid), .out_ready_i(s1_ready), .win_o(pw)
  );
  assign pix_ready_o = s1_in_ready && thr_ok_q;

  logic signed [11:0] gx, gy;
  logic [10:0] ax, ay, mag;
  logic [1:0]  dir;
  always_comb begin
    gx = (12'(pw[0][2]) + (12'(pw[1][2]) << 1) + 12'(pw[2][2]))
       - (12'(pw[0][0]) + (12'(pw[1][0]) << 1) + 12'(pw[2][0]));
    gy = (12'(pw[2][0]) + (12'(pw[2][1]) << 1) + 12'(pw[2][2]))
       - (12'(pw[0][0]) + (12'(pw[0][1]) << 1) + 12'(pw[0][2]));
    ax  = gx[11] ? 11'(-gx) : 11'(gx);
    ay  = gy[11] ? 11'(-gy) : 11'(gy);
    mag = ax + ay;
    if (20'(ay) * 20'd256 <= 20'(ax) * 20'd106)      dir = 2'd0;
    else if (20'(ax) * 20'd256 <= 20'(ay) * 20'd106) dir = 2'd2;
    else if (gx[11] == gy[11])                       dir = 2'd1;
    else                                             dir = 2'd3;
  end

  // ---------------- stage 2: non-maximum suppression + thresholds ----------------
  localparam logic [1:0] C_NONE = 2'd0, C_WEAK = 2'd1, C_STRONG = 2'd2;
  logic [2:0][2:0][12:0] mw;
  logic [15:0] width2, width4;
  logic s2_valid, s2_ready;
  assign width2 = width_i - 16'd2;
  assign width4 = width_i - 16'd4;

  line_window3 #(.PW(13), .MAX_W(MAX_W)) u_w2 (
    .clk_i, .rst_ni, .clear_i, .width_i(width2),
    .in_valid_i(s1_valid), .in_ready_o(s1_ready), .in_data_i({dir, mag}),
    .out_valid_o(s2_valid), .out_ready_i(s2_ready), .win_o(mw)
  );

  logic [10:0] c, n1, n2;
  logic [1:0]  cls;
  always_comb begin
    c = mw[1][1][10:0];
    unique case (mw[1][1][12:11])
      2'd0:    begin n1 = mw[1][0][10:0]; n2 = mw[1][2][10:0]; end
      2'd1:    begin n1 = mw[0][0][10:0]; n2 = mw[2][2][10:0]; end
      2'd2:    begin n1 = mw[0][1][10:0]; n2 = mw[2][1][10:0]; end
      default: begin n1 = mw[0][2][10:0]; n2 = mw[2][0][10:0]; end
    endcase
    if (c < n1 || c < n2)        cls = C_NONE;
    else if (16'(c) >= hi_q)     cls = C_STRONG;
    else if (16'(c) >= lo_q)     cls = C_WEAK;
    else                         cls = C_NONE;
  end

  // ---------------- stage 3: hysteresis over the 8-neighbourhood ----------------
  logic [2:0][2:0][1:0] cw;
  line_window3 #(.PW(2), .MAX_W(MAX_W)) u_w3 (
    .clk_i, .rst_ni, .clear_i, .width_i(width4),
    .in_valid_i(s2_valid), .in_ready_o(s2_ready), .in_data_i(cls),
    .out_valid_o, .out_ready_i, .win_o(cw)
  );

  logic strong_nb;
  always_comb begin
    strong_nb = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++)
        if (!(r == 1 && k == 1) && cw[r][k] == C_STRONG) strong_nb = 1'b1;
    if (cw[1][1] == C_STRONG || (cw[1][1] == C_WEAK && strong_nb)) out_data_o = 32'd255;
    else                                                            out_data_o = 32'd0;
  end
endmodule

// line_window3: 3x3 sliding window over a raster-order pixel stream.
//
// Two line buffers of MAX_W entries hold the previous two image rows. Each accepted pixel at
// (row, col) shifts the window one column to the right and, when row >= 2 and col >= 2, presents
// the full window (rows row-2..row, cols col-2..col) on win with out_valid. Border pixels are
// consumed without an output, so an image of W x H pixels yields (W-2) x (H-2) windows.
// Handshake: valid/ready on both sides, one output register, in_ready = !out_valid | out_ready.
// clear resets the row/column position (start of a new image); width is the image width in
// pixels (3..MAX_W) and must stay constant while an image streams. win[r][c] is row r (0 = oldest)
// and column c (0 = leftmost). The structure is this design's own choice.
module line_window3 #(
  parameter int unsigned PW    = 8,
  parameter int unsigned MAX_W = 1440
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 clear_i,
  input  logic [15:0]          width_i,
  input  logic                 in_valid_i,
  output logic                 in_ready_o,
  input  logic [PW-1:0]        in_data_i,
  output logic                 out_valid_o,
  input  logic                 out_ready_i,
  output logic [2:0][2:0][PW-1:0] win_o
);
  localparam int unsigned CW = $clog2(MAX_W);

  logic [PW-1:0] lb0 [MAX_W];  // row r-1
  logic [PW-1:0] lb1 [MAX_W];  // row r-2
  logic [CW-1:0] col_q;
  logic [15:0]   row_q;
  logic          fire;

  assign in_ready_o = !out_valid_o || out_ready_i;
  assign fire       = in_valid_i && in_ready_o;

  always_ff @(posedge clk_i) begin
    if (fire) begin
      lb0[col_q] <= in_data_i;
      lb1[col_q] <= lb0[col_q];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      col_q       <= '0;
      row_q       <= '0;
      out_valid_o <= 1'b0;
      win_o       <= '0;
    end else if (clear_i) begin
      col_q       <= '0;
      row_q       <= '0;
      out_valid_o <= 1'b0;
    end else begin
      if (out_valid_o && out_ready_i) out_valid_o <= 1'b0;
      if (fire) begin
        for (int r = 0; r < 3; r++) begin
          win_o[r][0] <= win_o[r][1];
          win_o[r][1] <= win_o[r][2];
        end
        win_o[0][2] <= lb1[col_q];
        win_o[1][2] <= lb0[col_q];
        win_o[2][2] <= in_data_i;
        out_valid_o <= (row_q >= 16'd2) && (col_q >= CW'(2));
        if (32'(col_q) == 32'(width_i) - 1) begin
          col_q <= '0;
          row_q <= row_q + 16'd1;
        end else begin
          col_q <= col_q + CW'(1);
        end
      end
    end
  end
endmodule

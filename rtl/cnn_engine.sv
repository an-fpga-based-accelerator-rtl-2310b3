// cnn_engine: multiply-accumulate datapath for convolutional-network layers (the "CNN" kernel).
//
// Two input streams: activations (port 0) and weights (port 1), signed 16-bit values in bits
// [15:0]. Each output is the dot product of the next n_i activation/weight pairs,
// arithmetically shifted right by shift_i,
// optionally rectified (relu_i), and saturated to signed 32 bits. Setting n_i = Kh*Kw*Cin makes
// one output one pixel of one output channel, so the same datapath serves different layer shapes
// (1x1, 3x3, 5x5 kernels, any channel count). Throughput: one pair per cycle, one output every
// n_i cycles, registered. The document gives only the kernel's function (a configurable CNN
// accelerator with two inputs and one output); this MAC structure is this design's.
module cnn_engine (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        clear_i,
  input  logic [15:0] n_i,
  input  logic [4:0]  shift_i,
  input  logic        relu_i,
  input  logic        act_valid_i,
  output logic        act_ready_o,
  input  logic [31:0] act_data_i,
  input  logic        wgt_valid_i,
  output logic        wgt_ready_o,
  input  logic [31:0] wgt_data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic [31:0] out_data_o
);
  logic signed [47:0] acc_q, acc_nxt, shifted;
  logic [15:0] cnt_q;
  logic fire, last;

  assign fire        = act_valid_i && wgt_valid_i && (!out_valid_o || out_ready_i);
  assign act_ready_o = fire;
  assign wgt_ready_o = fire;
  assign last        = (cnt_q == n_i - 16'd1);
  assign acc_nxt     = acc_q + 48'(signed'(act_data_i[15:0])) * 48'(signed'(wgt_data_i[15:0]));
  assign shifted     = acc_nxt >>> shift_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_q <= '0; cnt_q <= '0; out_valid_o <= 1'b0; out_data_o <= '0;
    end else if (clear_i) begin
      acc_q <= '0; cnt_q <= '0; out_valid_o <= 1'b0;
    end else begin
      if (out_valid_o && out_ready_i) out_valid_o <= 1'b0;
      if (fire) begin
        if (last) begin
          acc_q       <= '0;
          cnt_q       <= '0;
          out_valid_o <= 1'b1;
          if (relu_i && shifted < 0)              out_data_o <= '0;
          else if (shifted > 48'sh7FFF_FFFF)      out_data_o <= 32'h7FFF_FFFF;
          else if (shifted < -48'sh8000_0000)     out_data_o <= 32'h8000_0000;
          else                                    out_data_o <= 32'(shifted);
        end else begin
          acc_q <= acc_nxt;
          cnt_q <= cnt_q + 16'd1;
        end
      end
    end
  end
endmodule

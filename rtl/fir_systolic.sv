// fir_systolic: fully parallel systolic FIR low-pass filter (the "FIR" kernel).
//
// Transposed-form systolic array of MAX_TAPS multiply-accumulate cells: every accepted sample x
// is multiplied by all coefficients at once and cell k holds the partial sum
// acc[k] <- acc[k+1] + h[k]*x, so y[n] = sum_k h[k] x[n-k] leaves cell 0 one cycle after x[n]
// is accepted. The document gives a fully parallel systolic filter configurable with 64 or 128
// coefficients: taps_mode_i = 0 selects 64 taps (upper cells forced to zero), 1 selects 128.
// Coefficient loading is this design's choice: when load_i is set at clear_i, the first
// NTAPS stream words (h[0] first) are taken as coefficients instead of samples.
// Samples and coefficients are signed 16-bit in bits [15:0]; the output is the 48-bit sum
// arithmetically shifted right by shift_i and truncated to 32 bits. One sample per cycle.
module fir_systolic #(
  parameter int unsigned MAX_TAPS = 128
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        clear_i,
  input  logic        taps_mode_i,   // 0: 64 taps, 1: 128 taps
  input  logic        load_i,        // load coefficients from the stream after clear
  input  logic [4:0]  shift_i,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  logic [31:0] in_data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic [31:0] out_data_o
);
  localparam int unsigned HALF = MAX_TAPS / 2;

  logic signed [15:0] coef_q [MAX_TAPS];
  logic signed [47:0] acc_q  [MAX_TAPS];
  logic [$clog2(MAX_TAPS+1)-1:0] load_cnt_q;
  logic loading_q;
  logic fire;
  logic signed [15:0] x;
  logic [$clog2(MAX_TAPS+1)-1:0] ntaps;

  assign ntaps      = taps_mode_i ? ($clog2(MAX_TAPS+1))'(MAX_TAPS) : ($clog2(MAX_TAPS+1))'(HALF);
  assign x          = in_data_i[15:0];
  assign in_ready_o = loading_q || !out_valid_o || out_ready_i;
  assign fire       = in_valid_i && in_ready_o;

  // product of cell k, with the upper half of the cells disabled in 64-tap mode
  function automatic logic signed [47:0] prod(input int k, input logic signed [15:0] c,
                                              input logic mode, input logic signed [15:0] xs);
    logic signed [47:0] a, b;
    a = (k >= HALF && !mode) ? 48'sd0 : 48'(c);
    b = 48'(xs);
    return a * b;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int k = 0; k < MAX_TAPS; k++) begin
        coef_q[k] <= '0;
        acc_q[k]  <= '0;
      end
      load_cnt_q  <= '0;
      loading_q   <= 1'b0;
      out_valid_o <= 1'b0;
      out_data_o  <= '0;
    end else if (clear_i) begin
      for (int k = 0; k < MAX_TAPS; k++) acc_q[k] <= '0;
      load_cnt_q  <= '0;
      loading_q   <= load_i;
      out_valid_o <= 1'b0;
    end else begin
      if (out_valid_o && out_ready_i) out_valid_o <= 1'b0;
      if (fire) begin
        if (loading_q) begin
          coef_q[load_cnt_q[$clog2(MAX_TAPS)-1:0]] <= x;
          load_cnt_q <= load_cnt_q + 1'b1;
          if (load_cnt_q == ntaps - 1'b1) loading_q <= 1'b0;
        end else begin
          for (int k = 0; k < MAX_TAPS - 1; k++)
            acc_q[k] <= acc_q[k+1] + prod(k, coef_q[k], taps_mode_i, x);
          acc_q[MAX_TAPS-1] <= prod(MAX_TAPS-1, coef_q[MAX_TAPS-1], taps_mode_i, x);
          out_data_o  <= 32'((acc_q[1] + prod(0, coef_q[0], taps_mode_i, x)) >>> shift_i);
          out_valid_o <= 1'b1;
        end
      end
    end
  end
endmodule

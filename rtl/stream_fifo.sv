// stream_fifo: synchronous FIFO with valid/ready on both sides. DEPTH entries of W bits,
// first-word fall-through (out_data_o is the head entry whenever out_valid_o is high).
// clear_i empties it. count_o is the current occupancy.
module stream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         clear_i,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [W-1:0] in_data_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [W-1:0] out_data_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic push, pop;

  assign in_ready_o  = (32'(count_o) < DEPTH);
  assign out_valid_o = (count_o != '0);
  assign out_data_o  = mem[rd_q];
  assign push = in_valid_i && in_ready_o;
  assign pop  = out_valid_o && out_ready_i;

  always_ff @(posedge clk_i) if (push) mem[wr_q] <= in_data_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q <= '0; wr_q <= '0; count_o <= '0;
    end else if (clear_i) begin
      rd_q <= '0; wr_q <= '0; count_o <= '0;
    end else begin
      if (push) wr_q <= (32'(wr_q) == DEPTH - 1) ? '0 : wr_q + AW'(1);
      if (pop)  rd_q <= (32'(rd_q) == DEPTH - 1) ? '0 : rd_q + AW'(1);
      count_o <= count_o + ($bits(count_o))'(push) - ($bits(count_o))'(pop);
    end
  end
endmodule

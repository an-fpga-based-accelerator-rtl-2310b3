// sbox_2x1: switching box that merges one of two valid/ready streams onto one output.
// sel_i chooses the input that is forwarded; the other input is held (ready low).
// Purely combinational. Used inside merged (multi-dataflow) datapaths.
module sbox_2x1 #(
  parameter int unsigned W = 32
) (
  input  logic         sel_i,
  input  logic [1:0]   in_valid_i,
  output logic [1:0]   in_ready_o,
  input  logic [1:0][W-1:0] in_data_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [W-1:0] out_data_o
);
  assign out_valid_o   = in_valid_i[sel_i];
  assign out_data_o    = in_data_i[sel_i];
  assign in_ready_o[0] = out_ready_i && !sel_i;
  assign in_ready_o[1] = out_ready_i &&  sel_i;
endmodule

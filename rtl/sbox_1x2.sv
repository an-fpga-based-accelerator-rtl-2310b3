// sbox_1x2: switching box that steers one valid/ready stream to one of two outputs.
// sel_i = 0 routes to output 0, 1 to output 1; the unselected output sees no valid and does not
// stall the input. Purely combinational. Used inside merged (multi-dataflow) datapaths, where a
// configuration table drives sel_i.
module sbox_1x2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel_i,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [W-1:0] in_data_i,
  output logic [1:0]   out_valid_o,
  input  logic [1:0]   out_ready_i,
  output logic [W-1:0] out_data_o
);
  assign out_data_o     = in_data_i;
  assign out_valid_o[0] = in_valid_i && !sel_i;
  assign out_valid_o[1] = in_valid_i &&  sel_i;
  assign in_ready_o     = sel_i ? out_ready_i[1] : out_ready_i[0];
endmodule

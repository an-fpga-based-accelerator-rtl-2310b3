// hw_mailbox: hardware mailbox synchronising the host processor and the device subsystem.
//
// Two message FIFOs of DEPTH 32-bit words: host-to-device and device-to-host.
// Host side (system-bus slave, offsets): 0x0 write pushes a message to the device, read pops
// the oldest device message (0 if empty); 0x8 read gives status {d2h count [15:8], h2d count
// [7:0]}. Writes to a full FIFO are dropped. Answers rvalid one cycle after ready (always ready).
// Device side (register bus, used by the proxy core): 0x0 read pops a host message (combinational
// data, pop at the access), write pushes a message to the host; 0x4 read gives the same status.
// irq_dev_o is high while host messages wait, irq_host_o while device messages wait.
// The mailbox as the host-device synchronisation device follows the document; its depth,
// register layout and interrupt rule are this design's choices.
module hw_mailbox
  import ooc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  sbus_req_t   host_req_i,
  output sbus_rsp_t   host_rsp_o,
  input  reg_req_t    dev_req_i,
  output logic [31:0] dev_rdata_o,
  output logic        irq_dev_o,
  output logic        irq_host_o
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic h2d_push, h2d_pop, d2h_push, d2h_pop, h2d_ready, d2h_ready, h2d_valid, d2h_valid;
  logic [31:0] h2d_head, d2h_head;
  logic [CW-1:0] h2d_cnt, d2h_cnt;
  logic [15:0] status;
  logic host_rd;

  assign status   = {8'(d2h_cnt), 8'(h2d_cnt)};
  assign host_rd  = host_req_i.valid && !host_req_i.we;
  assign h2d_push = host_req_i.valid && host_req_i.we && host_req_i.addr[3:0] == 4'h0;
  assign d2h_pop  = host_rd && host_req_i.addr[3:0] == 4'h0;
  assign h2d_pop  = dev_req_i.req && !dev_req_i.we && dev_req_i.addr == 12'h000;
  assign d2h_push = dev_req_i.req &&  dev_req_i.we && dev_req_i.addr == 12'h000;

  stream_fifo #(.W(32), .DEPTH(DEPTH)) u_h2d (
    .clk_i, .rst_ni, .clear_i(1'b0),
    .in_valid_i(h2d_push), .in_ready_o(h2d_ready), .in_data_i(host_req_i.wdata[31:0]),
    .out_valid_o(h2d_valid), .out_ready_i(h2d_pop), .out_data_o(h2d_head), .count_o(h2d_cnt)
  );
  stream_fifo #(.W(32), .DEPTH(DEPTH)) u_d2h (
    .clk_i, .rst_ni, .clear_i(1'b0),
    .in_valid_i(d2h_push), .in_ready_o(d2h_ready), .in_data_i(dev_req_i.wdata),
    .out_valid_o(d2h_valid), .out_ready_i(d2h_pop), .out_data_o(d2h_head), .count_o(d2h_cnt)
  );

  always_comb begin
    dev_rdata_o = '0;
    if (dev_req_i.addr == 12'h000)      dev_rdata_o = h2d_valid ? h2d_head : '0;
    else if (dev_req_i.addr == 12'h004) dev_rdata_o = {16'd0, status};
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      host_rsp_o.rvalid <= 1'b0;
      host_rsp_o.rdata  <= '0;
    end else begin
      host_rsp_o.rvalid <= host_req_i.valid;
      host_rsp_o.rdata  <= '0;
      if (host_rd && host_req_i.addr[3:0] == 4'h0) host_rsp_o.rdata <= {32'd0, d2h_valid ? d2h_head : 32'd0};
      if (host_rd && host_req_i.addr[3:0] == 4'h8) host_rsp_o.rdata <= {48'd0, status};
    end
  end
  assign host_rsp_o.ready = 1'b1;

  assign irq_dev_o  = h2d_valid;
  assign irq_host_o = d2h_valid;
endmodule

// tb_hw_mailbox: host messages (written on the system-bus side) are read back in order by the
// device side and device messages the other way round. Checks the interrupt lines, the status
// counts, that reading an empty FIFO returns 0, that writes beyond DEPTH are dropped, and that
// both directions work while interleaved.
module tb_hw_mailbox;
  import ooc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  sbus_req_t hreq;
  sbus_rsp_t hrsp;
  reg_req_t  dreq;
  logic [31:0] drdata;
  logic irq_dev, irq_host;
  int checks = 0, failures = 0;
  int h2d[$], d2h[$];
  always #5 clk = ~clk;

  hw_mailbox #(.DEPTH(DEPTH)) dut (.clk_i(clk), .rst_ni(rst_n), .host_req_i(hreq),
    .host_rsp_o(hrsp), .dev_req_i(dreq), .dev_rdata_o(drdata), .irq_dev_o(irq_dev),
    .irq_host_o(irq_host));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic host_wr(input logic [31:0] v);
    @(negedge clk);
    hreq = '{valid: 1'b1, we: 1'b1, be: 8'hFF, addr: 32'h0, wdata: {32'd0, v}};
    @(negedge clk);
    hreq.valid = 1'b0;
  endtask
  task automatic host_rd(input logic [31:0] a, output logic [31:0] v);
    @(negedge clk);
    hreq = '{valid: 1'b1, we: 1'b0, be: 8'hFF, addr: a, wdata: '0};
    @(negedge clk);
    hreq.valid = 1'b0;
    check(hrsp.rvalid, "host read rvalid");
    v = hrsp.rdata[31:0];
  endtask
  task automatic dev_wr(input logic [31:0] v);
    @(negedge clk);
    dreq = '{req: 1'b1, we: 1'b1, addr: 12'h0, wdata: v};
    @(negedge clk);
    dreq.req = 1'b0;
  endtask
  task automatic dev_rd(input logic [11:0] a, output logic [31:0] v);
    @(negedge clk);
    dreq = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1;
    v = drdata;
    @(negedge clk);
    dreq.req = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    hreq = '0; dreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!irq_dev && !irq_host, "no interrupt after reset");
    dev_rd(12'h0, v);
    check(v == 0, "empty device read is 0");
    // host -> device, overfilling by two
    for (int i = 0; i < DEPTH + 2; i++) begin
      v = $urandom();
      host_wr(v);
      if (i < DEPTH) h2d.push_back(v);
    end
    #1;
    check(irq_dev, "device interrupt with pending host messages");
    dev_rd(12'h4, v);
    check(v[7:0] == 8'(DEPTH) && v[15:8] == 0, "status counts after host writes");
    while (h2d.size() > 0) begin
      dev_rd(12'h0, v);
      check(v == h2d.pop_front(), "host message order and data");
    end
    #1;
    check(!irq_dev, "device interrupt cleared when empty");
    // device -> host
    for (int i = 0; i < 5; i++) begin v = $urandom(); dev_wr(v); d2h.push_back(v); end
    #1;
    check(irq_host, "host interrupt with pending device messages");
    host_rd(32'h8, v);
    check(v[15:8] == 8'd5, "host status count");
    while (d2h.size() > 0) begin
      host_rd(32'h0, v);
      check(v == d2h.pop_front(), "device message order and data");
    end
    host_rd(32'h0, v);
    check(v == 0, "empty host read is 0");
    check(!irq_host, "host interrupt cleared");
    // interleaved traffic
    for (int i = 0; i < 20; i++) begin
      logic [31:0] a, b;
      a = $urandom(); b = $urandom();
      host_wr(a); dev_wr(b);
      dev_rd(12'h0, v); check(v == a, "interleaved h2d");
      host_rd(32'h0, v); check(v == b, "interleaved d2h");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ooc_cluster: one cluster with a behavioural system-bus memory standing in for L2 (random
// ready, answer one cycle later) and the testbench acting as the proxy core on the peripheral
// bus and the core TCDM port. Flow: DMA an image L2 -> L1, run the Gaussian convolution on the
// merged wrapper and Canny in parallel, DMA both results L1 -> L2 and compare with the reference
// models. Checks the peripheral decode (distinct DMA and HWPE registers), the sticky event
// register and its clearing, and that the proxy core's own L1 accesses work next to the
// accelerators.
module tb_ooc_cluster;
  import ooc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 24, H = 8;
  logic clk = 0, rst_n = 0;
  reg_req_t preq;
  logic [31:0] prdata;
  tcdm_req_t creq;
  tcdm_rsp_t crsp;
  sbus_req_t dreq;
  sbus_rsp_t drsp;
  logic [3:0] evt, busy;
  logic [7:0] conflicts;
  logic [2:0] stall;
  logic [63:0] l2 [4096];
  logic l2_ready;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ooc_cluster #(.L1_BANKS(4), .L1_BANK_WORDS(1024), .FIR_TAPS(128), .IMG_W(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .periph_req_i(preq), .periph_rdata_o(prdata),
    .core_tcdm_req_i(creq), .core_tcdm_rsp_o(crsp), .dma_sbus_req_o(dreq), .dma_sbus_rsp_i(drsp),
    .evt_o(evt), .busy_o(busy), .l1_conflicts_o(conflicts), .hwpe_stall_o(stall));

  // behavioural L2
  always @(negedge clk) l2_ready = ($urandom_range(0, 2) != 0);
  assign drsp.ready = l2_ready;
  always @(posedge clk) begin
    drsp.rvalid <= dreq.valid && l2_ready;
    if (dreq.valid && l2_ready) begin
      if (dreq.we) l2[dreq.addr[14:3]] <= dreq.wdata;
      else         drsp.rdata <= l2[dreq.addr[14:3]];
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk); #1;
    preq = '{req: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge clk); #1;
    preq.req = 1'b0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] v);
    @(negedge clk); #1;
    preq = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 v = prdata;
    @(negedge clk); #1;
    preq.req = 1'b0;
  endtask
  task automatic dma(input logic [31:0] src, input logic [31:0] dst, input int len, input bit dir);
    logic [31:0] v;
    wr(12'h000 | DMA_SRC, src); wr(12'h000 | DMA_DST, dst); wr(12'h000 | DMA_LEN, 32'(len));
    wr(12'h000 | DMA_DIR, 32'(dir)); wr(12'h000 | DMA_CMD, 1);
    do rd(12'h000 | DMA_STATUS, v); while (v[0]);
  endtask
  task automatic stream(input int hw, input int i, input int base, input int cnt);
    logic [11:0] b = 12'(hw * 256);
    wr(b | (HWPE_STREAM0 + 12'(16 * i)),     L1_BASE + 32'(base));
    wr(b | (HWPE_STREAM0 + 12'(16 * i + 4)), 32'(cnt));
    wr(b | (HWPE_STREAM0 + 12'(16 * i + 8)), 32'd4);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[], yc[], ye[];
    logic [31:0] v;
    preq = '0; creq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_image(W, H, 4, img);
    for (int i = 0; i < W * H; i += 2) l2[32'h100 + i / 2] = {32'(img[i + 1]), 32'(img[i])};
    l2[32'h200] = {32'd0, 16'd200, 16'd30};     // Canny thresholds
    // decode: same offset, different blocks
    wr(12'h000 | DMA_LEN, 32'h55);
    wr(12'h100 | HWPE_PARAM0, 32'h66);
    rd(12'h000 | DMA_LEN, v);      check(v == 32'h55, "DMA register readback");
    rd(12'h100 | HWPE_PARAM0, v);  check(v == 32'h66, "HWPE0 register readback");
    rd(12'h200 | HWPE_PARAM0, v);  check(v == 32'h0,  "HWPE1 register untouched");
    // move image and thresholds to L1
    dma(32'h800, L1_BASE + 32'h0, W * H * 4, 0);
    dma(32'h1000, L1_BASE + 32'h1000, 8, 0);
    rd(12'h400, v); check(v[0] == 1'b1, "DMA done event recorded");
    wr(12'h400, 0);
    rd(12'h400, v); check(v == 0, "event register cleared");
    // proxy core touches L1 directly: read back one pixel
    @(negedge clk); #1;
    creq = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: L1_BASE + 32'h8, wdata: '0};
    #1; while (!crsp.gnt) begin @(negedge clk); #2; end
    @(negedge clk); #1; creq.req = 1'b0;
    check(crsp.rdata == 32'(img[2]), "proxy core L1 read");
    // Conv on HWPE0, Canny on HWPE2, in parallel
    wr(12'h100 | HWPE_SEL, KSEL_CONV);
    wr(12'h100 | (HWPE_PARAM0 + 8), W);
    stream(1, 0, 32'h0, W * H); stream(1, 1, 32'h2000, (W - 2) * (H - 2));
    wr(12'h300 | (HWPE_PARAM0 + 8), W);
    stream(3, 0, 32'h0, W * H); stream(3, 1, 32'h1000, 1); stream(3, 2, 32'h3000, (W - 6) * (H - 6));
    wr(12'h100 | HWPE_TRIGGER, 0);
    wr(12'h300 | HWPE_TRIGGER, 0);
    do rd(12'h400, v); while (v[1] == 0 || v[3] == 0);
    check(v[2] == 1'b0, "CNN did not run");
    // results back to L2
    dma(L1_BASE + 32'h2000, 32'h4000, (W - 2) * (H - 2) * 4, 1);
    dma(L1_BASE + 32'h3000, 32'h6000, (W - 6) * (H - 6) * 4, 1);
    gauss(img, W, H, yc);
    canny(img, W, H, 30, 200, ye);
    foreach (yc[i]) check(int'(l2[32'h800 + i / 2][32 * (i % 2) +: 32]) == yc[i], $sformatf("conv %0d", i));
    foreach (ye[i]) check(int'(l2[32'hC00 + i / 2][32 * (i % 2) +: 32]) == ye[i], $sformatf("canny %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

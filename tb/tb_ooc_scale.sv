// tb_ooc_scale: multi-cluster build of the device subsystem (N_CL = 4 clusters, hence 4 L2
// ports and 4 mailboxes), with a narrow image (64 pixels) to keep the run short.
// The host writes one 64x8 image tile per cluster into L2 and posts a message to each cluster's
// mailbox. Four proxy-core models run concurrently: each waits for its mailbox interrupt, checks
// the message, moves its tile to its own L1 by DMA, runs the Gaussian blur on its merged
// FIR/Conv accelerator, moves the result back to its own L2 area and answers through its
// mailbox. The host then checks every message and every blurred tile against the reference model.
// Counted and required at least once: cycles with two or more cluster DMAs busy at the same time
// (the clusters use their own L2 ports in parallel) and crossbar contention.
module tb_ooc_scale;
  import ooc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCL = 4, W = 64, H = 8, CW = W - 2, CH = H - 2;
  localparam int L2_REG = 32'h4000;      // L2 area of cluster k: k * L2_REG
  localparam int L2_OUT = 32'h1000;      // result offset inside that area

  logic clk = 0, rst_n = 0;
  sbus_req_t host_req;
  sbus_rsp_t host_rsp;
  sbus_req_t [NCL-1:0] if_req;
  sbus_rsp_t [NCL-1:0] if_rsp;
  tcdm_req_t [NCL-1:0] core_treq;
  tcdm_rsp_t [NCL-1:0] core_trsp;
  reg_req_t  [NCL-1:0] preq, mreq;
  logic [NCL-1:0][31:0] prdata, mrdata;
  logic [NCL-1:0] irq_host, irq_core;
  logic [NCL-1:0][3:0] evt, busy;
  logic [NCL-1:0][7:0] l1c;
  logic [7:0] xc;
  logic [NCL-1:0][2:0] stall;
  always #5 clk = ~clk;

  ooc_top #(.N_CL(NCL), .IMG_W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_req_i(host_req), .host_rsp_o(host_rsp), .irq_host_o(irq_host),
    .core_ifetch_req_i(if_req), .core_ifetch_rsp_o(if_rsp),
    .core_tcdm_req_i(core_treq), .core_tcdm_rsp_o(core_trsp),
    .core_periph_req_i(preq), .core_periph_rdata_o(prdata),
    .core_mbox_req_i(mreq), .core_mbox_rdata_o(mrdata), .irq_core_o(irq_core),
    .evt_o(evt), .busy_o(busy), .l1_conflicts_o(l1c), .xbar_contention_o(xc),
    .hwpe_stall_o(stall));

  int checks = 0, failures = 0, n_par_dma = 0, n_xc = 0;
  int img[NCL][], conv_y[NCL][];

  always @(negedge clk) begin
    int nb;
    #2;
    nb = 0;
    for (int k = 0; k < NCL; k++) nb += int'(busy[k][0]);
    if (nb >= 2) n_par_dma++;
    n_xc += int'(xc);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic host_access(input bit we, input logic [31:0] a, input logic [63:0] wd,
                             output logic [63:0] rd);
    @(negedge clk); #1;
    host_req = '{valid: 1'b1, we: we, be: 8'hFF, addr: a, wdata: wd};
    #1;
    while (!host_rsp.ready) begin @(negedge clk); #2; end
    @(negedge clk); #1;
    host_req.valid = 1'b0;
    rd = host_rsp.rdata;
  endtask

  task automatic wr(input int k, input logic [11:0] a, input logic [31:0] v);
    @(negedge clk); #1;
    preq[k] = '{req: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge clk); #1;
    preq[k].req = 1'b0;
  endtask
  task automatic rd(input int k, input logic [11:0] a, output logic [31:0] v);
    @(negedge clk); #1;
    preq[k] = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 v = prdata[k];
    @(negedge clk); #1;
    preq[k].req = 1'b0;
  endtask
  task automatic dma(input int k, input logic [31:0] src, input logic [31:0] dst, input int len,
                     input bit to_l2);
    logic [31:0] v;
    wr(k, DMA_SRC, src); wr(k, DMA_DST, dst); wr(k, DMA_LEN, 32'(len));
    wr(k, DMA_DIR, 32'(to_l2)); wr(k, DMA_CMD, 1);
    do rd(k, DMA_STATUS, v); while (v[0]);
  endtask

  task automatic proxy_core(input int k);
    logic [31:0] v;
    logic [31:0] area = L2_BASE + 32'(k * L2_REG);
    while (!irq_core[k]) @(negedge clk);
    @(negedge clk); #1;
    mreq[k] = '{req: 1'b1, we: 1'b0, addr: 12'h000, wdata: '0};
    #1 v = mrdata[k];
    @(negedge clk); #1;
    mreq[k].req = 1'b0;
    check(v == 32'hC4D0_0100 + 32'(k), $sformatf("cluster %0d offload message", k));
    dma(k, area, L1_BASE, W * H * 4, 0);
    wr(k, 12'h100 | HWPE_SEL, 32'(KSEL_CONV));
    wr(k, 12'h100 | (HWPE_PARAM0 + 12'd8), 32'(W));
    wr(k, 12'h100 | HWPE_STREAM0, L1_BASE);
    wr(k, 12'h100 | (HWPE_STREAM0 + 12'd4), 32'(W * H));
    wr(k, 12'h100 | (HWPE_STREAM0 + 12'd8), 32'd4);
    wr(k, 12'h100 | (HWPE_STREAM0 + 12'd16), L1_BASE + 32'h2000);
    wr(k, 12'h100 | (HWPE_STREAM0 + 12'd20), 32'(CW * CH));
    wr(k, 12'h100 | (HWPE_STREAM0 + 12'd24), 32'd4);
    wr(k, 12'h400, 0);
    wr(k, 12'h100 | HWPE_TRIGGER, 0);
    do rd(k, 12'h400, v); while (!v[1]);
    dma(k, L1_BASE + 32'h2000, area + L2_OUT, CW * CH * 4, 1);
    @(negedge clk); #1;
    mreq[k] = '{req: 1'b1, we: 1'b1, addr: 12'h000, wdata: 32'hC4D0_0200 + 32'(k)};
    @(negedge clk); #1;
    mreq[k].req = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    host_req = '0; if_req = '0; core_treq = '0; preq = '0; mreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NCL; k++) begin
      make_image(W, H, 100 + k, img[k]);
      gauss(img[k], W, H, conv_y[k]);
    end
    fork
      begin
        for (int k = 0; k < NCL; k++) begin
          for (int i = 0; i < W * H; i += 2)
            host_access(1, L2_BASE + 32'(k * L2_REG + 4 * i), {32'(img[k][i + 1]), 32'(img[k][i])}, d);
          host_access(1, MBOX_BASE + 32'h1000 * 32'(k), 64'hC4D0_0100 + 64'(k), d);
        end
        while (irq_host != '1) @(negedge clk);
        for (int k = 0; k < NCL; k++) begin
          host_access(0, MBOX_BASE + 32'h1000 * 32'(k), 0, d);
          check(d[31:0] == 32'hC4D0_0200 + 32'(k), $sformatf("cluster %0d completion message", k));
          for (int i = 0; i < CW * CH; i += 2) begin
            host_access(0, L2_BASE + 32'(k * L2_REG + L2_OUT + 4 * i), 0, d);
            check(int'(d[31:0]) == conv_y[k][i], $sformatf("cluster %0d pixel %0d", k, i));
            check(int'(d[63:32]) == conv_y[k][i + 1], $sformatf("cluster %0d pixel %0d", k, i + 1));
          end
        end
      end
      for (int k = 0; k < NCL; k++) begin
        fork
          automatic int kk = k;
          proxy_core(kk);
        join_none
      end
    join
    wait fork;
    check(n_par_dma > 0, "mechanism: DMAs of two or more clusters active together");
    check(n_xc > 0,      "mechanism: crossbar contention");
    $display("parallel DMA cycles=%0d xbar contention=%0d", n_par_dma, n_xc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ooc_top: end-to-end run of the device subsystem at its default sizes (1440-pixel image
// rows, 128-tap FIR, 128 KiB L1, 256 KiB L2), following the pre-processing and main stages of
// the crop-monitoring application:
//   host: writes a 10-row image tile, IMU/GPS samples with 128 FIR coefficients, CNN weights,
//         Canny thresholds and a block of proxy-core code into L2, then posts a mailbox message;
//   proxy core (modelled here): woken by the mailbox interrupt, moves the inputs to L1 by DMA,
//         runs Gaussian denoising on the merged FIR+Conv accelerator, then switches that
//         accelerator to the FIR while CNN and Canny (both reading the denoised tile in L1) run
//         in parallel, moves the results back to L2 by DMA and answers through the mailbox;
//   host: woken by its interrupt, reads the results from L2 and compares them with the
//         reference models.
// Meanwhile the proxy core's instruction cache refills read the code block through the
// crossbar. The run counts how often each mechanism happened (mailbox in both directions, DMA in
// both directions, kernel switch, CNN/Canny overlap, L1 bank conflicts, crossbar contention,
// streamer stalls) and counts a failure for any that never did.
module tb_ooc_top;
  import ooc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 1440, H = 10, TAPS = 128, NS = 256, CNN_N = 9, CNN_O = 32;
  localparam int CW = W - 2, CH = H - 2;           // denoised tile
  localparam int EW = CW - 6, EH = CH - 6;         // edge map
  // L2 offsets
  localparam int L2_IMG = 32'h00000, L2_FIR = 32'h10000, L2_WGT = 32'h11000, L2_THR = 32'h12000,
                 L2_CODE = 32'h13000, L2_CONV_O = 32'h20000, L2_EDGE_O = 32'h30000,
                 L2_FIR_O = 32'h34000, L2_CNN_O = 32'h35000;
  // L1 offsets
  localparam int L1_IMG = 32'h00000, L1_CONV_O = 32'h0E400, L1_EDGE_O = 32'h19C00,
                 L1_FIR = 32'h1CC00, L1_FIR_O = 32'h1D400, L1_WGT = 32'h1D800,
                 L1_CNN_O = 32'h1DD00, L1_THR = 32'h1DE00;

  logic clk = 0, rst_n = 0;
  sbus_req_t host_req, if_req;
  sbus_rsp_t host_rsp, if_rsp;
  tcdm_req_t core_treq;
  tcdm_rsp_t core_trsp;
  reg_req_t  preq, mreq;
  logic [31:0] prdata, mrdata;
  logic irq_host, irq_core;
  logic [3:0] evt, busy;
  logic [7:0] l1c, xc;
  logic [2:0] stall;
  always #5 clk = ~clk;

  ooc_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_req_i(host_req), .host_rsp_o(host_rsp), .irq_host_o(irq_host),
    .core_ifetch_req_i(if_req), .core_ifetch_rsp_o(if_rsp),
    .core_tcdm_req_i(core_treq), .core_tcdm_rsp_o(core_trsp),
    .core_periph_req_i(preq), .core_periph_rdata_o(prdata),
    .core_mbox_req_i(mreq), .core_mbox_rdata_o(mrdata), .irq_core_o(irq_core),
    .evt_o(evt), .busy_o(busy), .l1_conflicts_o(l1c), .xbar_contention_o(xc),
    .hwpe_stall_o(stall));

  int checks = 0, failures = 0;
  int n_h2d = 0, n_d2h = 0, n_dma_in = 0, n_dma_out = 0, n_switch = 0, n_overlap = 0;
  int n_l1c = 0, n_xc = 0, n_stall = 0, n_ifetch = 0, n_edge = 0;
  bit done = 0;
  int img[], conv_y[], edge_y[], h[], x[], fir_y[], wgt[], cnn_y[];
  logic [63:0] code [64];

  always @(negedge clk) begin
    #2;
    n_l1c   += int'(l1c);
    n_xc    += int'(xc);
    n_stall += int'(|stall);
    if (busy[2] && busy[3]) n_overlap++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- host side ----------------
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
  task automatic host_put(input int off, input int v[]);   // 32-bit words, two per beat
    logic [63:0] d;
    for (int i = 0; i < v.size(); i += 2)
      host_access(1, L2_BASE + 32'(off + 4 * i),
                  {(i + 1 < v.size()) ? 32'(v[i + 1]) : 32'd0, 32'(v[i])}, d);
  endtask
  task automatic host_check(input string what, input int off, input int exp[]);
    logic [63:0] d;
    for (int i = 0; i < exp.size(); i += 2) begin
      host_access(0, L2_BASE + 32'(off + 4 * i), 0, d);
      check(int'(d[31:0]) == exp[i], $sformatf("%s word %0d", what, i));
      if (i + 1 < exp.size()) check(int'(d[63:32]) == exp[i + 1], $sformatf("%s word %0d", what, i + 1));
    end
  endtask

  // ---------------- proxy-core side ----------------
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
  task automatic dma(input int l2off, input int l1off, input int len, input bit to_l2);
    logic [31:0] v;
    wr(DMA_SRC, to_l2 ? L1_BASE + 32'(l1off) : L2_BASE + 32'(l2off));
    wr(DMA_DST, to_l2 ? L2_BASE + 32'(l2off) : L1_BASE + 32'(l1off));
    wr(DMA_LEN, 32'(len));
    wr(DMA_DIR, 32'(to_l2));
    wr(DMA_CMD, 1);
    do rd(DMA_STATUS, v); while (v[0]);
    if (to_l2) n_dma_out++; else n_dma_in++;
  endtask
  task automatic stream(input int hw, input int i, input int base, input int cnt);
    logic [11:0] b = 12'(256 * (hw + 1));
    wr(b | (HWPE_STREAM0 + 12'(16 * i)),     L1_BASE + 32'(base));
    wr(b | (HWPE_STREAM0 + 12'(16 * i + 4)), 32'(cnt));
    wr(b | (HWPE_STREAM0 + 12'(16 * i + 8)), 32'd4);
  endtask
  task automatic param(input int hw, input int i, input logic [31:0] v);
    wr(12'(256 * (hw + 1)) | (HWPE_PARAM0 + 12'(4 * i)), v);
  endtask
  task automatic wait_evt(input logic [3:0] mask);
    logic [31:0] v;
    do rd(12'h400, v); while ((v[3:0] & mask) != mask);
  endtask

  task automatic proxy_core();
    logic [31:0] v;
    while (!irq_core) @(negedge clk);
    @(negedge clk); #1;
    mreq = '{req: 1'b1, we: 1'b0, addr: 12'h000, wdata: '0};
    #1 v = mrdata;
    @(negedge clk); #1;
    mreq.req = 1'b0;
    check(v == 32'hC4D0_0001, "offload message received by the proxy core");
    n_h2d++;
    // inputs to L1
    dma(L2_IMG, L1_IMG, W * H * 4, 0);
    dma(L2_FIR, L1_FIR, (TAPS + NS) * 4, 0);
    dma(L2_WGT, L1_WGT, CNN_N * CNN_O * 4, 0);
    dma(L2_THR, L1_THR, 8, 0);
    // task 0, first step: Gaussian denoising on the merged accelerator
    wr(12'h400, 0);
    wr(12'h100 | HWPE_SEL, 32'(KSEL_CONV));
    param(0, 2, W);
    stream(0, 0, L1_IMG, W * H);
    stream(0, 1, L1_CONV_O, CW * CH);
    wr(12'h100 | HWPE_TRIGGER, 0);
    wait_evt(4'b0010);
    // second step: FIR on the same accelerator, CNN and Canny in parallel on the denoised tile
    wr(12'h400, 0);
    wr(12'h100 | HWPE_SEL, 32'(KSEL_FIR));
    n_switch++;
    param(0, 0, 32'h3);            // 128 taps, load coefficients
    param(0, 1, 32'd4);
    stream(0, 0, L1_FIR, TAPS + NS);
    stream(0, 1, L1_FIR_O, NS);
    param(1, 0, CNN_N); param(1, 1, 32'd3); param(1, 2, 32'd1);
    stream(1, 0, L1_CONV_O, CNN_N * CNN_O);
    stream(1, 1, L1_WGT, CNN_N * CNN_O);
    stream(1, 2, L1_CNN_O, CNN_O);
    param(2, 2, CW);
    stream(2, 0, L1_CONV_O, CW * CH);
    stream(2, 1, L1_THR, 1);
    stream(2, 2, L1_EDGE_O, EW * EH);
    wr(12'h200 | HWPE_TRIGGER, 0);
    wr(12'h300 | HWPE_TRIGGER, 0);
    wr(12'h100 | HWPE_TRIGGER, 0);
    wait_evt(4'b1110);
    // results to L2
    dma(L2_CONV_O, L1_CONV_O, CW * CH * 4, 1);
    dma(L2_EDGE_O, L1_EDGE_O, EW * EH * 4, 1);
    dma(L2_FIR_O, L1_FIR_O, NS * 4, 1);
    dma(L2_CNN_O, L1_CNN_O, CNN_O * 4, 1);
    @(negedge clk); #1;
    mreq = '{req: 1'b1, we: 1'b1, addr: 12'h000, wdata: 32'hC4D0_0002};
    @(negedge clk); #1;
    mreq.req = 1'b0;
  endtask

  // instruction-cache refills of the proxy core: random reads of the code block
  task automatic ifetch();
    while (!done) begin
      int i = $urandom_range(0, 63);
      @(negedge clk); #1;
      if_req = '{valid: 1'b1, we: 1'b0, be: 8'hFF, addr: L2_BASE + 32'(L2_CODE + 8 * i), wdata: '0};
      #1;
      while (!if_rsp.ready) begin @(negedge clk); #2; end
      @(negedge clk); #1;
      if_req.valid = 1'b0;
      check(if_rsp.rdata == code[i], "instruction fetch data");
      n_ifetch++;
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    int tmp[], thr[];
    host_req = '0; if_req = '0; core_treq = '0; preq = '0; mreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- host prepares the inputs ----
    make_image(W, H, 11, img);
    h = new[TAPS]; x = new[NS]; wgt = new[CNN_N * CNN_O];
    foreach (h[i]) h[i] = $urandom_range(0, 2047);
    foreach (x[i]) x[i] = $urandom_range(0, 65535);
    foreach (wgt[i]) wgt[i] = $urandom_range(0, 65535);
    foreach (code[i]) code[i] = {$urandom(), $urandom()};
    for (int i = 0; i < 64; i++) host_access(1, L2_BASE + 32'(L2_CODE + 8 * i), code[i], d);
    fork
      ifetch();
      begin
        host_put(L2_IMG, img);
        tmp = new[TAPS + NS];
        foreach (h[i]) tmp[i] = h[i];
        foreach (x[i]) tmp[TAPS + i] = x[i];
        host_put(L2_FIR, tmp);
        host_put(L2_WGT, wgt);
        thr = new[1];
        thr[0] = {16'd300, 16'd60};
        host_put(L2_THR, thr);
        host_access(1, MBOX_BASE, 64'hC4D0_0001, d);
        // ---- wait for the device ----
        while (!irq_host) @(negedge clk);
        host_access(0, MBOX_BASE, 0, d);
        check(d[31:0] == 32'hC4D0_0002, "completion message received by the host");
        n_d2h++;
        // ---- check results ----
        gauss(img, W, H, conv_y);
        canny(conv_y, CW, CH, 60, 300, edge_y);
        fir(h, TAPS, x, 4, fir_y);
        cnn_y = new[CNN_O];
        foreach (cnn_y[o]) cnn_y[o] = mac(conv_y, wgt, CNN_N * o, CNN_N, 3, 1);
        host_check("conv", L2_CONV_O, conv_y);
        host_check("edges", L2_EDGE_O, edge_y);
        foreach (edge_y[i]) n_edge += int'(edge_y[i] == 255);
        host_check("fir", L2_FIR_O, fir_y);
        host_check("cnn", L2_CNN_O, cnn_y);
        done = 1;
      end
      proxy_core();
    join
    check(n_h2d > 0,     "mechanism: host-to-device mailbox message");
    check(n_d2h > 0,     "mechanism: device-to-host mailbox message");
    check(n_dma_in > 0,  "mechanism: DMA L2 to L1");
    check(n_dma_out > 0, "mechanism: DMA L1 to L2");
    check(n_switch > 0,  "mechanism: kernel switch of the merged accelerator");
    check(n_overlap > 0, "mechanism: CNN and Canny running in parallel");
    check(n_l1c > 0,     "mechanism: L1 bank conflict");
    check(n_xc > 0,      "mechanism: crossbar contention");
    check(n_stall > 0,   "mechanism: streamer stall");
    check(n_ifetch > 0,  "mechanism: instruction fetch through the crossbar");
    check(n_edge > 0,    "edge pixels present in the checked edge map");
    $display("mailbox h2d=%0d d2h=%0d dma in=%0d out=%0d switch=%0d overlap=%0d",
             n_h2d, n_d2h, n_dma_in, n_dma_out, n_switch, n_overlap);
    $display("l1 conflicts=%0d xbar contention=%0d stall cycles=%0d ifetch=%0d edges=%0d cycles=%0t",
             n_l1c, n_xc, n_stall, n_ifetch, n_edge, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hwpe_wrapper: the three HWPE accelerators (merged FIR+Conv, CNN, Canny) on one shared L1.
// The testbench writes inputs into L1 through its own port, programs each controller over its
// register bus and compares the results written back to L1 with the reference models. Sequence:
// FIR job (coefficients streamed from L1), kernel switch and Conv job on the same wrapper,
// then CNN and Canny started together and running in parallel. Also checks the status register
// (busy, sticky done), one done event per job, that a trigger while busy is ignored, and that
// the streamers stalled at least once (bank conflicts between the concurrent accelerators).
module tb_hwpe_wrapper;
  import ooc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NM = 9;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [NM-1:0] treq;
  tcdm_rsp_t [NM-1:0] trsp;
  logic [7:0] conflicts;
  reg_req_t [2:0] rreq;
  logic [2:0][31:0] rrdata;
  logic [2:0] busy, evt, stall;
  int checks = 0, failures = 0, n_stall = 0, n_par = 0;
  int n_evt [3] = '{0, 0, 0};
  always #5 clk = ~clk;

  l1_tcdm #(.NB_MASTERS(NM), .NB_BANKS(4), .BANK_WORDS(1024)) u_l1 (.clk_i(clk), .rst_ni(rst_n),
    .req_i(treq), .rsp_o(trsp), .conflicts_o(conflicts));
  hwpe_wrapper #(.ENGINE(ENG_FIR_CONV), .MAX_TAPS(128), .MAX_W(64)) u_h0 (.clk_i(clk),
    .rst_ni(rst_n), .reg_req_i(rreq[0]), .reg_rdata_o(rrdata[0]), .tcdm_req_o(treq[1:0]),
    .tcdm_rsp_i(trsp[1:0]), .busy_o(busy[0]), .evt_o(evt[0]), .stall_o(stall[0]));
  hwpe_wrapper #(.ENGINE(ENG_CNN), .MAX_W(64)) u_h1 (.clk_i(clk), .rst_ni(rst_n),
    .reg_req_i(rreq[1]), .reg_rdata_o(rrdata[1]), .tcdm_req_o(treq[4:2]), .tcdm_rsp_i(trsp[4:2]),
    .busy_o(busy[1]), .evt_o(evt[1]), .stall_o(stall[1]));
  hwpe_wrapper #(.ENGINE(ENG_CANNY), .MAX_W(64)) u_h2 (.clk_i(clk), .rst_ni(rst_n),
    .reg_req_i(rreq[2]), .reg_rdata_o(rrdata[2]), .tcdm_req_o(treq[7:5]), .tcdm_rsp_i(trsp[7:5]),
    .busy_o(busy[2]), .evt_o(evt[2]), .stall_o(stall[2]));

  always @(negedge clk) begin
    #2;
    n_stall += int'(|stall);
    if (busy[1] && busy[2]) n_par++;
    for (int i = 0; i < 3; i++) if (evt[i]) n_evt[i]++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(input int h, input logic [11:0] a, input logic [31:0] v);
    @(negedge clk); #1;
    rreq[h] = '{req: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge clk); #1;
    rreq[h].req = 1'b0;
  endtask
  task automatic reg_rd(input int h, input logic [11:0] a, output logic [31:0] v);
    @(negedge clk); #1;
    rreq[h] = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 v = rrdata[h];
    @(negedge clk); #1;
    rreq[h].req = 1'b0;
  endtask
  task automatic stream(input int h, input int i, input int base, input int cnt);
    reg_wr(h, HWPE_STREAM0 + 12'(16 * i),     L1_BASE + 32'(base));
    reg_wr(h, HWPE_STREAM0 + 12'(16 * i + 4), 32'(cnt));
    reg_wr(h, HWPE_STREAM0 + 12'(16 * i + 8), 32'd4);
  endtask
  task automatic l1_wr(input int off, input int v);
    @(negedge clk); #1;
    treq[8] = '{req: 1'b1, we: 1'b1, be: 4'hF, addr: L1_BASE + 32'(off), wdata: 32'(v)};
    #1;
    while (!trsp[8].gnt) begin @(negedge clk); #2; end
    @(negedge clk); #1;
    treq[8].req = 1'b0;
  endtask
  task automatic l1_rd(input int off, output int v);
    @(negedge clk); #1;
    treq[8] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: L1_BASE + 32'(off), wdata: '0};
    #1;
    while (!trsp[8].gnt) begin @(negedge clk); #2; end
    @(negedge clk); #1;
    treq[8].req = 1'b0;
    v = int'(trsp[8].rdata);
  endtask
  task automatic compare(input string what, input int off, input int exp[]);
    int v;
    foreach (exp[i]) begin
      l1_rd(off + 4 * i, v);
      checks++;
      if (v != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s idx %0d got %0d exp %0d", what, i, v, exp[i]);
      end
    end
  endtask
  task automatic wait_done(input int h);
    logic [31:0] v;
    int t = 0;
    do begin reg_rd(h, HWPE_STATUS, v); t++; end while (v[0] && t < 20000);
    check(v == 32'd2, $sformatf("HWPE%0d status done and idle", h));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h[], x[], y[], img[], img2[], act[], wgt[], cnn_y[], canny_y[];
    logic [31:0] v;
    rreq = '0; treq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- FIR: 128 coefficients streamed from L1, then 100 samples ----
    h = new[128]; x = new[100];
    foreach (h[i]) begin h[i] = $urandom_range(0, 65535); l1_wr(4 * i, h[i]); end
    foreach (x[i]) begin x[i] = $urandom_range(0, 65535); l1_wr(512 + 4 * i, x[i]); end
    reg_wr(0, HWPE_SEL, KSEL_FIR);
    reg_wr(0, HWPE_PARAM0, 32'h3);         // 128 taps, load coefficients
    reg_wr(0, HWPE_PARAM0 + 4, 32'd1);     // shift
    stream(0, 0, 0, 228);
    stream(0, 1, 32'h1000, 100);
    reg_wr(0, HWPE_TRIGGER, 0);
    reg_rd(0, HWPE_STATUS, v);
    check(v[0], "FIR busy after trigger");
    reg_wr(0, HWPE_TRIGGER, 0);            // ignored while busy
    wait_done(0);
    fir(h, 128, x, 1, y);
    compare("fir", 32'h1000, y);

    // ---- switch the merged wrapper to Conv ----
    make_image(16, 10, 3, img);
    foreach (img[i]) l1_wr(32'h1400 + 4 * i, img[i]);
    reg_wr(0, HWPE_SEL, KSEL_CONV);
    reg_wr(0, HWPE_PARAM0 + 8, 32'd16);
    stream(0, 0, 32'h1400, 160);
    stream(0, 1, 32'h1800, 14 * 8);
    reg_wr(0, HWPE_TRIGGER, 0);
    wait_done(0);
    gauss(img, 16, 10, y);
    compare("conv", 32'h1800, y);

    // ---- CNN and Canny in parallel ----
    act = new[9 * 16]; wgt = new[9 * 16];
    foreach (act[i]) begin
      act[i] = $urandom_range(0, 255);
      wgt[i] = $urandom_range(0, 65535);
      l1_wr(32'h2000 + 4 * i, act[i]);
      l1_wr(32'h2400 + 4 * i, wgt[i]);
    end
    reg_wr(1, HWPE_PARAM0, 9); reg_wr(1, HWPE_PARAM0 + 4, 2); reg_wr(1, HWPE_PARAM0 + 8, 1);
    stream(1, 0, 32'h2000, 144); stream(1, 1, 32'h2400, 144); stream(1, 2, 32'h2800, 16);
    make_image(20, 12, 9, img2);
    foreach (img2[i]) l1_wr(32'h3000 + 4 * i, img2[i]);
    l1_wr(32'h3400, {16'd250, 16'd40});
    reg_wr(2, HWPE_PARAM0 + 8, 20);
    stream(2, 0, 32'h3000, 240); stream(2, 1, 32'h3400, 1); stream(2, 2, 32'h3800, 14 * 6);
    fork
      reg_wr(1, HWPE_TRIGGER, 0);
      reg_wr(2, HWPE_TRIGGER, 0);
    join
    wait_done(1);
    wait_done(2);
    cnn_y = new[16];
    foreach (cnn_y[o]) cnn_y[o] = mac(act, wgt, 9 * o, 9, 2, 1);
    compare("cnn", 32'h2800, cnn_y);
    canny(img2, 20, 12, 40, 250, canny_y);
    compare("canny", 32'h3800, canny_y);

    check(n_evt[0] == 2 && n_evt[1] == 1 && n_evt[2] == 1, "one done event per job");
    check(n_par > 0, "CNN and Canny ran in parallel");
    check(n_stall > 0, "streamers stalled on memory at least once");
    $display("parallel cycles=%0d stall cycles=%0d", n_par, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cluster_dma: the DMA between a 2-port L2 scratchpad and a 3-port L1. The testbench fills
// L2 through the spare L2 port, moves a block L2 -> L1, reads L1 back through the spare L1 port,
// moves it L1 -> L2 to another region (while the testbench keeps hitting the same L1 banks to
// force conflicts) and compares. Also checks the status register, the done event, that every
// system-bus beat carries 64 bits (beats = bytes / 8) and the cycle count of an uncontended
// transfer (4 cycles per beat). Finally queues six jobs back to back: five run in order, one
// finding the job queue full is refused, and the status and events are checked.
module tb_cluster_dma;
  import ooc_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_req_t rreq;
  logic [31:0] rrdata;
  sbus_req_t [1:0] l2req;
  sbus_rsp_t [1:0] l2rsp;
  tcdm_req_t [2:0] l1req;
  tcdm_rsp_t [2:0] l1rsp;
  logic [7:0] conflicts;
  logic busy, evt;
  int checks = 0, failures = 0, beats = 0, n_conf = 0, n_evt = 0;
  bit hammer = 0;
  always #5 clk = ~clk;

  cluster_dma dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(rreq), .reg_rdata_o(rrdata),
    .sbus_req_o(l2req[0]), .sbus_rsp_i(l2rsp[0]), .tcdm_req_o(l1req[1:0]), .tcdm_rsp_i(l1rsp[1:0]),
    .busy_o(busy), .evt_o(evt));
  l2_spm #(.N_PORTS(2), .NB_BANKS(4), .BANK_WORDS(256)) u_l2 (.clk_i(clk), .rst_ni(rst_n),
    .req_i(l2req), .rsp_o(l2rsp));
  l1_tcdm #(.NB_MASTERS(3), .NB_BANKS(4), .BANK_WORDS(256)) u_l1 (.clk_i(clk), .rst_ni(rst_n),
    .req_i(l1req), .rsp_o(l1rsp), .conflicts_o(conflicts));

  always @(negedge clk) begin
    #2;
    if (l2req[0].valid && l2rsp[0].ready) beats++;
    n_conf += int'(conflicts);
    if (evt) n_evt++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk); #1;
    rreq = '{req: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge clk); #1;
    rreq.req = 1'b0;
  endtask
  task automatic reg_rd(input logic [11:0] a, output logic [31:0] v);
    @(negedge clk); #1;
    rreq = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 v = rrdata;
    @(negedge clk); #1;
    rreq.req = 1'b0;
  endtask
  task automatic l2_access(input bit we, input logic [31:0] a, input logic [63:0] wd,
                           output logic [63:0] rd);
    @(negedge clk); #1;
    l2req[1] = '{valid: 1'b1, we: we, be: 8'hFF, addr: a, wdata: wd};
    #1;
    while (!l2rsp[1].ready) begin @(negedge clk); #2; end
    @(negedge clk); #1;
    l2req[1].valid = 1'b0;
    rd = l2rsp[1].rdata;
  endtask
  task automatic l1_access(input bit we, input logic [31:0] a, input logic [31:0] wd,
                           output logic [31:0] rd);
    l1req[2] = '{req: 1'b1, we: we, be: 4'hF, addr: a, wdata: wd};
    #1;
    while (!l1rsp[2].gnt) begin @(negedge clk); #2; end
    @(negedge clk); #1;
    l1req[2].req = 1'b0;
    rd = l1rsp[2].rdata;
  endtask

  task automatic run_dma(input logic [31:0] src, input logic [31:0] dst, input int len,
                         input bit dir, output int cycles);
    logic [31:0] v;
    int b0;
    reg_wr(DMA_SRC, src); reg_wr(DMA_DST, dst); reg_wr(DMA_LEN, 32'(len)); reg_wr(DMA_DIR, 32'(dir));
    b0 = beats;
    reg_wr(DMA_CMD, 1);
    cycles = 0;
    reg_rd(DMA_STATUS, v);
    check(v[0] == 1'b1, "busy while transferring");
    while (busy) begin @(negedge clk); cycles++; end
    reg_rd(DMA_STATUS, v);
    check(v == 32'd2, "done and idle after transfer");
    check(beats - b0 == len / 8, "one 64-bit system-bus beat per 8 bytes");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d64, pattern [64];
    logic [31:0] d32;
    int cyc;
    rreq = '0; l2req = '0; l1req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (pattern[i]) begin
      pattern[i] = {$urandom(), $urandom()};
      l2_access(1, 32'h100 + 32'(8 * i), pattern[i], d64);
    end
    // L2 -> L1, uncontended
    run_dma(32'h100, L1_BASE + 32'h40, 512, 0, cyc);
    check(cyc <= 4 * 64 + 4, $sformatf("L2->L1 took %0d cycles for 64 beats", cyc));
    @(negedge clk); #1;
    for (int i = 0; i < 128; i++) begin
      l1_access(0, L1_BASE + 32'h40 + 32'(4 * i), 0, d32);
      check(d32 == pattern[i / 2][32 * (i % 2) +: 32], "L1 word after L2->L1");
    end
    // L1 -> L2 while the testbench reads the same banks
    fork
      run_dma(L1_BASE + 32'h40, 32'h1000, 512, 1, cyc);
      begin
        @(negedge clk); #1;
        while (!busy) begin @(negedge clk); #1; end
        while (busy) l1_access(0, L1_BASE + 32'h40 + 32'(4 * $urandom_range(0, 7)), 0, d32);
      end
    join
    foreach (pattern[i]) begin
      l2_access(0, 32'h1000 + 32'(8 * i), 0, d64);
      check(d64 == pattern[i], "L2 word after L1->L2");
    end
    check(n_conf > 0, "bank conflicts occurred during the transfer");
    check(n_evt == 2, "one done event per transfer");
    // job queue: six jobs of 256 bytes queued back to back; the first starts at once, the
    // next four fill the queue and the sixth is refused
    for (int i = 0; i < 64; i++) l1_access(1, L1_BASE + 32'h900 + 32'(4 * i), 0, d32);
    for (int j = 0; j < 6; j++) begin
      reg_wr(DMA_SRC, 32'h100); reg_wr(DMA_DST, L1_BASE + 32'h400 + 32'(256 * j));
      reg_wr(DMA_LEN, 32'd256); reg_wr(DMA_DIR, 32'd0);
      reg_wr(DMA_CMD, 1);
    end
    reg_rd(DMA_STATUS, d32);
    check(d32[2] && d32[0], "queue full and busy after six back-to-back jobs");
    while (busy) @(negedge clk);
    reg_rd(DMA_STATUS, d32);
    check(d32 == 32'd2, "done, idle and queue empty after the queued jobs");
    check(n_evt == 7, "one done event per queued job");
    @(negedge clk); #1;
    for (int j = 0; j < 6; j++)
      for (int i = 0; i < 64; i++) begin
        l1_access(0, L1_BASE + 32'h400 + 32'(256 * j + 4 * i), 0, d32);
        check(d32 == ((j < 5) ? pattern[i / 2][32 * (i % 2) +: 32] : 32'd0),
              $sformatf("queued job %0d word %0d", j, i));
      end
    $display("conflicts=%0d", n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_l1_tcdm: four masters issue random reads and byte-masked writes to a small 4-bank L1.
// Each master owns every fourth row but touches all banks, so bank conflicts are frequent.
// Checks: read data against a shadow memory, rvalid exactly one cycle after each grant, every
// request eventually granted (round-robin fairness bound), conflicts observed, and a directed
// cycle where four masters hit four different banks and are all granted at once.
module tb_l1_tcdm;
  import ooc_pkg::*;
  localparam int NM = 4, NB = 4, WORDS = 64;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [NM-1:0] req;
  tcdm_rsp_t [NM-1:0] rsp;
  logic [7:0] conflicts;
  int checks = 0, failures = 0, n_conflicts = 0;
  logic [31:0] shadow [NB*WORDS];
  always #5 clk = ~clk;

  l1_tcdm #(.NB_MASTERS(NM), .NB_BANKS(NB), .BANK_WORDS(WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .conflicts_o(conflicts));

  always @(negedge clk) begin
    #2;
    n_conflicts += int'(conflicts);
  end

  task automatic access(input int m, input bit we, input int widx, input logic [3:0] be,
                        input logic [31:0] wd);
    int waited = 0;
    // requests change 1 time unit after the falling edge, grants are sampled 1 unit later,
    // once every master has placed its request
    req[m] = '{req: 1'b1, we: we, be: be, addr: L1_BASE + 32'(widx * 4), wdata: wd};
    #1;
    while (!rsp[m].gnt) begin @(negedge clk); #2; waited++; end
    checks++;
    if (waited > NM) begin failures++; $display("FAIL master %0d waited %0d cycles", m, waited); end
    @(negedge clk);
    #1;
    req[m].req = 1'b0;
    checks++;
    if (!rsp[m].rvalid) begin failures++; $display("FAIL no rvalid one cycle after grant"); end
    if (we) begin
      for (int k = 0; k < 4; k++) if (be[k]) shadow[widx][8*k +: 8] = wd[8*k +: 8];
    end else begin
      checks++;
      if (rsp[m].rdata !== shadow[widx]) begin
        failures++;
        $display("FAIL m%0d read word %0d got %h exp %h", m, widx, rsp[m].rdata, shadow[widx]);
      end
    end
  endtask

  task automatic master(input int m);
    for (int i = 0; i < 400; i++) begin
      int row = ($urandom_range(0, WORDS / NM - 1)) * NM + m;
      int widx = row * NB + $urandom_range(0, NB - 1);
      bit we = $urandom_range(0, 1);
      access(m, we, widx, we ? 4'($urandom_range(1, 15)) : 4'hF, $urandom());
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); #1; end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // initialise the memory through master 0
    for (int w = 0; w < NB * WORDS; w++) begin
      access(0, 1, w, 4'hF, 32'(w * 3 + 1));
    end
    // four masters, four different banks, same cycle: all granted at once
    @(negedge clk);
    for (int m = 0; m < NM; m++)
      req[m] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: L1_BASE + 32'((m * NB + (3 - m)) * 4), wdata: '0};
    #1;
    checks++;
    if (rsp[0].gnt !== 1'b1 || rsp[1].gnt !== 1'b1 || rsp[2].gnt !== 1'b1 || rsp[3].gnt !== 1'b1) begin
      failures++; $display("FAIL parallel access to distinct banks not granted together");
    end
    @(negedge clk);
    req = '0;
    #1;
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (rsp[m].rdata !== shadow[m * NB + (3 - m)]) begin failures++; $display("FAIL parallel read %0d", m); end
    end
    @(negedge clk);
    fork
      master(0); master(1); master(2); master(3);
    join
    checks++;
    if (n_conflicts == 0) begin failures++; $display("FAIL no bank conflict occurred"); end
    $display("bank conflicts: %0d", n_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_l2_spm: two system-bus ports issue random 64-bit reads and byte-masked writes to a small
// 4-bank L2. Port p owns every other row but touches all banks, so bank conflicts occur.
// Checks read data against a shadow memory, rvalid exactly one cycle after ready, bounded
// waiting under conflicts, conflicts observed, and two ports served in the same cycle when
// they address different banks.
module tb_l2_spm;
  import ooc_pkg::*;
  localparam int NP = 2, NB = 4, WORDS = 32;
  logic clk = 0, rst_n = 0;
  sbus_req_t [NP-1:0] req;
  sbus_rsp_t [NP-1:0] rsp;
  int checks = 0, failures = 0, n_wait = 0;
  logic [63:0] shadow [NB*WORDS];
  always #5 clk = ~clk;

  l2_spm #(.N_PORTS(NP), .NB_BANKS(NB), .BANK_WORDS(WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  task automatic access(input int p, input bit we, input int widx, input logic [7:0] be,
                        input logic [63:0] wd);
    int waited = 0;
    req[p] = '{valid: 1'b1, we: we, be: be, addr: 32'(widx * 8), wdata: wd};
    #1;
    while (!rsp[p].ready) begin @(negedge clk); #2; waited++; n_wait++; end
    checks++;
    if (waited > NP) begin failures++; $display("FAIL port %0d waited %0d", p, waited); end
    @(negedge clk);
    #1;
    req[p].valid = 1'b0;
    checks++;
    if (!rsp[p].rvalid) begin failures++; $display("FAIL no rvalid one cycle after ready"); end
    if (we) begin
      for (int k = 0; k < 8; k++) if (be[k]) shadow[widx][8*k +: 8] = wd[8*k +: 8];
    end else begin
      checks++;
      if (rsp[p].rdata !== shadow[widx]) begin
        failures++; $display("FAIL p%0d word %0d got %h exp %h", p, widx, rsp[p].rdata, shadow[widx]);
      end
    end
  endtask

  task automatic port(input int p);
    for (int i = 0; i < 500; i++) begin
      int row = $urandom_range(0, WORDS / NP - 1) * NP + p;
      int widx = row * NB + $urandom_range(0, NB - 1);
      bit we = $urandom_range(0, 1);
      access(p, we, widx, we ? 8'($urandom_range(1, 255)) : 8'hFF, {$urandom(), $urandom()});
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
    for (int w = 0; w < NB * WORDS; w++) access(0, 1, w, 8'hFF, {32'(w), 32'(~w)});
    // different banks: both ports ready in the same cycle
    @(negedge clk); #1;
    req[0] = '{valid: 1'b1, we: 1'b0, be: 8'hFF, addr: 32'(5 * 8), wdata: '0};
    req[1] = '{valid: 1'b1, we: 1'b0, be: 8'hFF, addr: 32'(6 * 8), wdata: '0};
    #1;
    checks++;
    if (!(rsp[0].ready && rsp[1].ready)) begin failures++; $display("FAIL no parallel service"); end
    @(negedge clk); #1;
    req = '0;
    checks += 2;
    if (rsp[0].rdata !== shadow[5]) failures++;
    if (rsp[1].rdata !== shadow[6]) failures++;
    fork port(0); port(1); join
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL no bank conflict occurred"); end
    $display("conflict wait cycles: %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

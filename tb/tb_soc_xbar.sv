// tb_soc_xbar: three masters send random reads and writes to two slave windows (a 64-bit
// memory model at L2_BASE with random ready, and one at MBOX_BASE) and to an unmapped address.
// The slave models check that they see the offset within their window; the masters check
// read data against shadow memories, that responses come back to the right master, that the
// unmapped access returns all ones, and that arbitration contention and parallel service of
// different slaves both occur.
module tb_soc_xbar;
  import ooc_pkg::*;
  localparam int NM = 3, NS = 2, WORDS = 64;
  logic clk = 0, rst_n = 0;
  sbus_req_t [NM-1:0] mreq;
  sbus_rsp_t [NM-1:0] mrsp;
  sbus_req_t [NS-1:0] sreq;
  sbus_rsp_t [NS-1:0] srsp;
  logic [7:0] contention;
  int checks = 0, failures = 0, n_cont = 0, n_par = 0;
  logic [63:0] smem [NS][WORDS];
  logic [63:0] shadow [NS][WORDS];
  logic [NS-1:0] sready;
  always #5 clk = ~clk;

  soc_xbar #(.NM(NM), .NS(NS)) dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(mreq), .m_rsp_o(mrsp),
    .s_req_o(sreq), .s_rsp_i(srsp), .contention_o(contention));

  // slave models: random ready, answer one cycle after ready
  for (genvar s = 0; s < NS; s++) begin : g_s
    always @(negedge clk) sready[s] = ($urandom_range(0, 3) != 0);
    assign srsp[s].ready = sready[s];
    always @(posedge clk) begin
      srsp[s].rvalid <= sreq[s].valid && sready[s];
      if (sreq[s].valid && sready[s]) begin
        if (sreq[s].addr >= 32'(WORDS * 8)) begin
          failures++; $display("FAIL slave %0d saw address %h outside its window", s, sreq[s].addr);
        end
        if (sreq[s].we) smem[s][sreq[s].addr[3 +: 6]] <= sreq[s].wdata;
        else            srsp[s].rdata <= smem[s][sreq[s].addr[3 +: 6]];
      end
    end
  end

  always @(negedge clk) begin
    #2;
    n_cont += int'(contention);
    if (sreq[0].valid && sreq[1].valid && sready == 2'b11) n_par++;
  end

  task automatic access(input int m, input int s, input bit we, input int widx,
                        input logic [63:0] wd);
    logic [31:0] base;
    base = (s == 0) ? L2_BASE : (s == 1) ? MBOX_BASE : 32'h0000_1000;
    mreq[m] = '{valid: 1'b1, we: we, be: 8'hFF, addr: base + 32'(widx * 8), wdata: wd};
    #1;
    while (!mrsp[m].ready) begin @(negedge clk); #2; end
    @(negedge clk);
    #1;
    mreq[m].valid = 1'b0;
    checks++;
    if (!mrsp[m].rvalid) begin failures++; $display("FAIL m%0d no response", m); end
    if (s == 2) begin
      checks++;
      if (mrsp[m].rdata !== '1) begin failures++; $display("FAIL unmapped access data"); end
    end else if (we) begin
      shadow[s][widx] = wd;
    end else begin
      checks++;
      if (mrsp[m].rdata !== shadow[s][widx]) begin
        failures++; $display("FAIL m%0d s%0d w%0d got %h exp %h", m, s, widx, mrsp[m].rdata, shadow[s][widx]);
      end
    end
  endtask

  // master m owns words m, m+3, ... of each slave, so shadow state stays consistent
  task automatic master(input int m);
    for (int i = 0; i < 300; i++) begin
      int s = ($urandom_range(0, 20) == 0) ? 2 : $urandom_range(0, 1);
      int widx = $urandom_range(0, WORDS / NM - 1) * NM + m;
      access(m, s, $urandom_range(0, 1), widx, {$urandom(), $urandom()});
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mreq = '0;
    srsp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < WORDS; w++) access(0, s, 1, w, {32'(s), 32'(w)});
    @(negedge clk); #1;
    fork master(0); master(1); master(2); join
    checks += 2;
    if (n_cont == 0) begin failures++; $display("FAIL no contention seen"); end
    if (n_par == 0)  begin failures++; $display("FAIL slaves never served in parallel"); end
    $display("contention=%0d parallel=%0d", n_cont, n_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

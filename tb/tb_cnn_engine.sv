// tb_cnn_engine: feeds random activation and weight streams (independent random gaps on both
// inputs, random output back-pressure) for several dot-product lengths, shifts and ReLU
// settings, and compares each output with the reference multiply-accumulate. Also checks the
// throughput of one pair per cycle without gaps and saturation of large sums.
module tb_cnn_engine;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, relu = 0;
  logic [15:0] n = 9;
  logic [4:0] shift = 0;
  logic a_valid = 0, a_ready, w_valid = 0, w_ready, out_valid, out_ready = 1;
  logic [31:0] a_data = 0, w_data = 0, out_data;
  int checks = 0, failures = 0;
  int act[], wgt[];
  int got[$];
  bit gaps = 1;
  always #5 clk = ~clk;

  cnn_engine dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .n_i(n), .shift_i(shift),
    .relu_i(relu), .act_valid_i(a_valid), .act_ready_o(a_ready), .act_data_i(a_data),
    .wgt_valid_i(w_valid), .wgt_ready_o(w_ready), .wgt_data_i(w_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data));

  always @(negedge clk) begin
    out_ready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  task automatic feed_act();
    foreach (act[i]) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
      a_valid = 1; a_data = 32'(act[i]);
      #1;
      while (!a_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1; a_valid = 0;
    end
  endtask
  task automatic feed_wgt();
    foreach (wgt[i]) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
      w_valid = 1; w_data = 32'(wgt[i]);
      #1;
      while (!w_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1; w_valid = 0;
    end
  endtask

  task automatic run(input int len, input int nout, input int sh, input bit rl, input bit big);
    int t0;
    n = 16'(len); shift = 5'(sh); relu = rl;
    act = new[len * nout]; wgt = new[len * nout];
    foreach (act[i]) begin
      act[i] = big ? 32'h7FFF : $urandom_range(0, 65535);
      wgt[i] = big ? 32'h7FFF : $urandom_range(0, 65535);
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    t0 = $time;
    fork feed_act(); feed_wgt(); join
    repeat (4) @(negedge clk);
    checks++;
    if (got.size() != nout) begin failures++; $display("FAIL count %0d != %0d", got.size(), nout); end
    for (int o = 0; o < nout && o < got.size(); o++) begin
      int e = mac(act, wgt, o * len, len, sh, rl);
      checks++;
      if (got[o] != e) begin
        failures++;
        if (failures < 10) $display("FAIL len %0d out %0d got %0d exp %0d", len, o, got[o], e);
      end
    end
    if (!gaps) begin
      checks++;
      if (($time - t0) / 10 > len * nout + 6) begin
        failures++; $display("FAIL rate %0d cycles for %0d pairs", ($time - t0) / 10, len * nout);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(9, 20, 0, 0, 0);
    run(9, 20, 4, 1, 0);
    run(1, 30, 0, 1, 0);
    run(25, 8, 2, 0, 0);
    run(200, 3, 0, 0, 1);    // 200 * 0x7FFF^2 exceeds 2^31: saturates
    gaps = 0;
    run(9, 16, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

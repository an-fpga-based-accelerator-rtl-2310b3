// tb_fir_systolic: checks the systolic FIR in 128-tap and 64-tap modes against a direct-form
// reference. Coefficients are loaded through the stream; samples are sent with random gaps and
// random output back-pressure. A second pass with no gaps checks the rate (one sample per cycle)
// and the latency (result one cycle after the sample is accepted).
module tb_fir_systolic;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, mode = 1, load = 0;
  logic [4:0] shift = 3;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int h[], x[], y[];
  int got[$];
  bit gaps = 1;
  always #5 clk = ~clk;

  fir_systolic dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .taps_mode_i(mode),
    .load_i(load), .shift_i(shift), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_data_i(in_data), .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data));

  // all stimulus changes and all sampling happen around the falling edge, so the values seen
  // here are the ones the rising edge uses
  always @(negedge clk) begin
    out_ready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  task automatic send(input int v);
    @(negedge clk);
    in_valid = 1; in_data = 32'(v);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    in_valid = 0;
    if (gaps && $urandom_range(0, 2) == 0) @(negedge clk);
  endtask

  task automatic run(input int ntaps, input int nsamp);
    h = new[ntaps];
    x = new[nsamp];
    foreach (h[i]) h[i] = $urandom_range(0, 65535);
    foreach (x[i]) x[i] = $urandom_range(0, 65535);
    mode = (ntaps == 128); load = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    foreach (h[i]) send(h[i]);
    foreach (x[i]) send(x[i]);
    repeat (10) @(negedge clk);
    fir(h, ntaps, x, shift, y);
    checks++;
    if (got.size() != nsamp) begin
      failures++; $display("FAIL count %0d != %0d", got.size(), nsamp);
    end
    for (int i = 0; i < nsamp && i < got.size(); i++) begin
      checks++;
      if (got[i] != y[i]) begin
        failures++;
        if (failures < 10) $display("FAIL taps=%0d n=%0d got %h exp %h", ntaps, i, got[i], y[i]);
      end
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128, 400);
    run(64, 300);
    shift = 0;
    run(128, 200);
    // rate and latency without gaps: a result every cycle, one cycle after each sample
    gaps = 0;
    begin
      int t_in, t_out, n;
      h = new[64]; foreach (h[i]) h[i] = i + 1;
      mode = 0; load = 1;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      foreach (h[i]) send(h[i]);
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        in_valid = 1; in_data = 32'(i);
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready at full rate"); end
        if (i > 0) begin
          checks++;
          if (!out_valid) begin failures++; $display("FAIL no output one cycle after sample"); end
        end
      end
      @(negedge clk); in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gauss_conv: streams test images through the Gaussian convolution with random input gaps
// and output back-pressure and compares every output pixel with the reference blur. Two image
// sizes are run back to back (clear between them); a third run without gaps checks the rate of
// one pixel per cycle.
module tb_gauss_conv;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [15:0] width = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int img[], y[];
  int got[$];
  bit gaps = 1;
  always #5 clk = ~clk;

  gauss_conv #(.MAX_W(64)) dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .width_i(width),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data));

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

  task automatic run(input int w, input int h, input int seed);
    int t0, stalls;
    make_image(w, h, seed, img);
    width = 16'(w);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    t0 = $time;
    foreach (img[i]) send(img[i]);
    repeat (5) @(negedge clk);
    gauss(img, w, h, y);
    checks++;
    if (got.size() != y.size()) begin
      failures++; $display("FAIL count %0d != %0d", got.size(), y.size());
    end
    for (int i = 0; i < y.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != y[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %0dx%0d idx %0d got %0d exp %0d", w, h, i, got[i], y[i]);
      end
    end
    if (!gaps) begin
      // w*h pixels, one per cycle, plus the 5 drain cycles
      checks++;
      if (($time - t0) / 10 > w * h + 8) begin
        failures++; $display("FAIL rate: %0d cycles for %0d pixels", ($time - t0) / 10, w * h);
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
    run(16, 10, 1);
    run(9, 7, 5);
    gaps = 0;
    run(20, 6, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

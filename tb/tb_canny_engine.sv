// tb_canny_engine: sends the threshold word and a test image (a bright square on a noisy
// gradient) through the edge detector with random gaps and back-pressure and compares the
// output map with the reference Sobel / non-maximum-suppression / double-threshold /
// hysteresis model. Checks that strong edges occur and that weak edges are both promoted (next
// to a strong one) and dropped (isolated), and a gap-free run checks one pixel per cycle.
module tb_canny_engine;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [15:0] width = 0;
  logic p_valid = 0, p_ready, t_valid = 0, t_ready, out_valid, out_ready = 1;
  logic [31:0] p_data = 0, t_data = 0, out_data;
  int checks = 0, failures = 0;
  int img[], y[], cl[];
  int cls;
  int got[$];
  int n_strong = 0, n_promoted = 0, n_dropped = 0;
  bit gaps = 1;
  always #5 clk = ~clk;

  canny_engine #(.MAX_W(64)) dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .width_i(width),
    .pix_valid_i(p_valid), .pix_ready_o(p_ready), .pix_data_i(p_data),
    .thr_valid_i(t_valid), .thr_ready_o(t_ready), .thr_data_i(t_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data));

  always @(negedge clk) begin
    out_ready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  task automatic run(input int w, input int h, input int seed, input int lo, input int hi);
    int t0;
    make_image(w, h, seed, img);
    width = 16'(w);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    t0 = $time;
    fork
      begin
        @(negedge clk);
        t_valid = 1; t_data = {16'(hi), 16'(lo)};
        #1;
        while (!t_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1; t_valid = 0;
      end
      foreach (img[i]) begin
        @(negedge clk);
        if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
        p_valid = 1; p_data = 32'(img[i]);
        #1;
        while (!p_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1; p_valid = 0;
      end
    join
    repeat (5) @(negedge clk);
    canny(img, w, h, lo, hi, y);
    canny_nms(img, w, h, lo, hi, cl);
    checks++;
    if (got.size() != y.size()) begin failures++; $display("FAIL count %0d != %0d", got.size(), y.size()); end
    for (int i = 0; i < y.size() && i < got.size(); i++) begin
      checks++;
      cls = cl[(i / (w - 6) + 1) * (w - 4) + i % (w - 6) + 1];
      if (cls == 2) n_strong++;
      if (cls == 1 && got[i] == 255) n_promoted++;
      if (cls == 1 && got[i] == 0) n_dropped++;
      if (got[i] != y[i]) begin
        failures++;
        if (failures < 10) $display("FAIL idx %0d got %0d exp %0d", i, got[i], y[i]);
      end
    end
    if (!gaps) begin
      checks++;
      if (($time - t0) / 10 > w * h + 10) begin
        failures++; $display("FAIL rate %0d cycles for %0d pixels", ($time - t0) / 10, w * h);
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
    run(24, 16, 1, 40, 300);
    run(13, 11, 7, 20, 120);
    gaps = 0;
    run(30, 12, 2, 60, 400);
    checks += 3;
    if (n_strong == 0)   begin failures++; $display("FAIL no strong edge seen"); end
    if (n_promoted == 0) begin failures++; $display("FAIL no weak edge promoted"); end
    if (n_dropped == 0)  begin failures++; $display("FAIL no weak edge dropped"); end
    $display("strong=%0d promoted=%0d dropped=%0d", n_strong, n_promoted, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

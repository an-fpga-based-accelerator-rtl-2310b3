// tb_fir_conv_dp: runs the merged FIR + Gaussian-convolution datapath through a sequence of
// kernel switches: FIR (128 taps, coefficients loaded), Conv, FIR again reusing the stored
// coefficients, Conv on another image size, FIR in 64-tap mode. Each switch writes the select
// and the very next cycle starts streaming the other kernel's data, which only gives the right
// results if switching takes a single cycle. Outputs are compared with the reference models.
module tb_fir_conv_dp;
  import tb_ref_pkg::*;
  import ooc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [1:0] sel = 0;
  logic [HWPE_NPARAM-1:0][31:0] param = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0] in_data = 0, out_data;
  int checks = 0, failures = 0, switches = 0;
  int h[], x[], y[], img[];
  int got[$];
  always #5 clk = ~clk;

  fir_conv_dp #(.MAX_TAPS(128), .MAX_W(64)) dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear),
    .sel_i(sel), .param_i(param), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_data_i(in_data), .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data));

  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    #1;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  task automatic send(input int v);
    in_valid = 1; in_data = 32'(v);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    in_valid = 0;
    @(negedge clk);
  endtask

  // select a kernel and clear the engine in the same cycle, then stream from the next cycle on
  task automatic switch_to(input int k);
    @(negedge clk);
    sel = 2'(k); clear = 1;
    @(negedge clk);
    clear = 0;
    switches++;
  endtask

  task automatic compare(input string what);
    checks++;
    if (got.size() != y.size()) begin failures++; $display("FAIL %s count %0d != %0d", what, got.size(), y.size()); end
    for (int i = 0; i < y.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != y[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s idx %0d got %0d exp %0d", what, i, got[i], y[i]);
      end
    end
  endtask

  task automatic run_fir(input int ntaps, input bit load);
    param[0] = {30'd0, load, ntaps == 128};
    param[1] = 32'd2;
    if (load) begin h = new[ntaps]; foreach (h[i]) h[i] = $urandom_range(0, 65535); end
    x = new[150]; foreach (x[i]) x[i] = $urandom_range(0, 65535);
    switch_to(KSEL_FIR);
    got.delete();
    if (load) foreach (h[i]) send(h[i]);
    foreach (x[i]) send(x[i]);
    repeat (6) @(negedge clk);
    fir(h, ntaps, x, 2, y);
    compare("fir");
  endtask

  task automatic run_conv(input int w, input int ht);
    param[2] = 32'(w);
    make_image(w, ht, w, img);
    switch_to(KSEL_CONV);
    got.delete();
    foreach (img[i]) send(img[i]);
    repeat (6) @(negedge clk);
    gauss(img, w, ht, y);
    compare("conv");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_fir(128, 1);
    run_conv(12, 9);
    run_fir(128, 0);
    run_conv(20, 5);
    run_fir(64, 1);
    checks++;
    if (switches != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_linear_conv_sizes: the linear convolution at sizes other than the
// default, with unequal sequence lengths (L = 5, M = 3), 6-bit samples and
// 15-bit outputs that are wide enough for every sum, so no output wraps.
//
// Random and full-scale sequences are compared with the direct double sum
// over k + m = n. Outputs are sampled one time unit after the inputs change; a
// watchdog fails the run after 50000 clock cycles.
module tb_linear_conv_sizes;

  localparam int unsigned SW = 6;
  localparam int unsigned L  = 5;
  localparam int unsigned M  = 3;
  localparam int unsigned YW = 15;
  localparam int unsigned NY = L + M - 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [SW-1:0] x [L];
  logic [SW-1:0] h [M];
  logic [YW-1:0] y [NY];

  linear_conv #(.SAMPLE_W(SW), .L(L), .M(M), .Y_W(YW)) dut (.x(x), .h(h), .y(y));

  task automatic apply_and_check();
    int exact [NY];
    foreach (exact[n]) exact[n] = 0;
    for (int k = 0; k < int'(L); k++)
      for (int m = 0; m < int'(M); m++)
        exact[k+m] += int'(x[k]) * int'(h[m]);
    #1;
    for (int n = 0; n < int'(NY); n++) begin
      checks++;
      if (int'(y[n]) != exact[n]) begin
        failures++;
        if (failures <= 10) $display("FAIL y[%0d]=%0d expected %0d", n, y[n], exact[n]);
      end
    end
  endtask

  initial begin
    foreach (x[k]) x[k] = '1;
    foreach (h[m]) h[m] = '1;
    apply_and_check();
    for (int t = 0; t < 3000; t++) begin
      foreach (x[k]) x[k] = SW'($urandom);
      foreach (h[m]) h[m] = SW'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

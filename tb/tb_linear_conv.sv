// tb_linear_conv: end-to-end test of the linear convolution at its default
// size (4-sample input and impulse response, 4-bit samples, 8-bit outputs).
//
// It applies the worked example x = {1,2,3,4}, h = {2,3,4,5}, whose output
// must be y = {2,7,16,30,34,31,20}, then a unit impulse (y must reproduce h),
// all-maximum sequences and random sequences. The reference is the direct
// double sum over k and m with k + m = n, reduced modulo 2**8 like the 8-bit
// outputs. Besides the values it counts how often an output sum exceeded
// 8 bits and wrapped, and how often every product was nonzero; a case that
// never occurred counts as a failure. Outputs are sampled one time unit after the
// inputs change; a watchdog fails the run after 50000 clock cycles.
module tb_linear_conv;

  localparam int unsigned L  = 4;
  localparam int unsigned M  = 4;
  localparam int unsigned NY = L + M - 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_wrap   = 0;   // output samples whose exact sum did not fit in 8 bits
  int n_exact  = 0;   // output samples that fitted
  int n_full   = 0;   // vectors in which every sample was nonzero

  logic [3:0] x [L];
  logic [3:0] h [M];
  logic [7:0] y [NY];

  linear_conv dut (.x(x), .h(h), .y(y));

  task automatic apply_and_check(input string what);
    int  exact [NY];
    bit  all_nz;
    foreach (exact[n]) exact[n] = 0;
    all_nz = 1'b1;
    for (int k = 0; k < int'(L); k++) begin
      if (x[k] == 0) all_nz = 1'b0;
      for (int m = 0; m < int'(M); m++) begin
        exact[k+m] += int'(x[k]) * int'(h[m]);
      end
    end
    for (int m = 0; m < int'(M); m++) if (h[m] == 0) all_nz = 1'b0;
    if (all_nz) n_full++;
    #1;
    for (int n = 0; n < int'(NY); n++) begin
      checks++;
      if (exact[n] > 255) n_wrap++; else n_exact++;
      if (int'(y[n]) != exact[n] % 256) begin
        failures++;
        if (failures <= 10)
          $display("FAIL %s: y[%0d]=%0d expected %0d", what, n, y[n], exact[n] % 256);
      end
    end
  endtask

  initial begin
    // Worked example, checked against the listed output values as well.
    x = '{4'd1, 4'd2, 4'd3, 4'd4};
    h = '{4'd2, 4'd3, 4'd4, 4'd5};
    apply_and_check("worked example");
    begin
      automatic int ex [NY] = '{2, 7, 16, 30, 34, 31, 20};
      for (int n = 0; n < int'(NY); n++) begin
        checks++;
        if (int'(y[n]) != ex[n]) begin
          failures++;
          $display("FAIL worked example y[%0d]=%0d listed %0d", n, y[n], ex[n]);
        end
      end
    end

    // Unit impulse: the output is the impulse response followed by zeros.
    x = '{4'd1, 4'd0, 4'd0, 4'd0};
    h = '{4'd9, 4'd5, 4'd12, 4'd13};
    apply_and_check("unit impulse");
    for (int n = 0; n < int'(NY); n++) begin
      checks++;
      if (y[n] != ((n < int'(M)) ? 8'(h[n]) : 8'd0)) begin
        failures++;
        $display("FAIL unit impulse y[%0d]=%0d", n, y[n]);
      end
    end

    // Full-scale sequences: the middle sums overflow 8 bits.
    x = '{4'hF, 4'hF, 4'hF, 4'hF};
    h = '{4'hF, 4'hF, 4'hF, 4'hF};
    apply_and_check("all ones");

    for (int t = 0; t < 5000; t++) begin
      foreach (x[k]) x[k] = 4'($urandom);
      foreach (h[m]) h[m] = 4'($urandom);
      apply_and_check("random");
    end

    $display("events: wrapped outputs=%0d exact outputs=%0d all-nonzero vectors=%0d",
             n_wrap, n_exact, n_full);
    checks++;
    if (n_wrap == 0 || n_exact == 0 || n_full == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
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

// tb_conv_adder: self-checking test of the convolution output adder.
//
// Random product matrices are applied to the default adder (4 x 4 products of
// 8 bits, seven 8-bit outputs) and to a 3 x 5 instance with 12-bit outputs, so
// that the unequal-length index ranges are covered. The expected y[n] is the
// sum of prod[k][m] over k + m = n, computed by looping over the whole matrix
// and keeping the low output bits. Outputs are sampled one time unit after the inputs
// change; a watchdog fails the run after 20000 clock cycles.
module tb_conv_adder;

  localparam int unsigned L2 = 3;
  localparam int unsigned M2 = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  prod  [4][4];
  logic [7:0]  y     [7];
  conv_adder dut (.prod(prod), .y(y));

  logic [7:0]  prod2 [L2][M2];
  logic [11:0] y2    [L2+M2-1];
  conv_adder #(.L(L2), .M(M2), .P_W(8), .Y_W(12)) dut2 (.prod(prod2), .y(y2));

  int exp1 [7];
  int exp2 [L2+M2-1];

  initial begin
    for (int t = 0; t < 1000; t++) begin
      foreach (exp1[n]) exp1[n] = 0;
      foreach (exp2[n]) exp2[n] = 0;
      for (int k = 0; k < 4; k++)
        for (int m = 0; m < 4; m++) begin
          prod[k][m] = 8'($urandom);
          exp1[k+m] += int'(prod[k][m]);
        end
      for (int k = 0; k < int'(L2); k++)
        for (int m = 0; m < int'(M2); m++) begin
          prod2[k][m] = 8'($urandom);
          exp2[k+m] += int'(prod2[k][m]);
        end
      #1;
      for (int n = 0; n < 7; n++) begin
        checks++;
        if (int'(y[n]) != (exp1[n] % 256)) begin
          failures++;
          if (failures <= 10) $display("FAIL 4x4 y[%0d]=%0d expected %0d", n, y[n], exp1[n] % 256);
        end
      end
      for (int n = 0; n < int'(L2 + M2 - 1); n++) begin
        checks++;
        if (int'(y2[n]) != (exp2[n] % 4096)) begin
          failures++;
          if (failures <= 10) $display("FAIL 3x5 y[%0d]=%0d expected %0d", n, y2[n], exp2[n] % 4096);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

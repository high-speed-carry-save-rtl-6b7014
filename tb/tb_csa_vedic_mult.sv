// tb_csa_vedic_mult: self-checking test of the carry save multiplier.
//
// The default 4 x 4 multiplier is checked for every pair of operands against
// the integer product, including the two operand pairs of the reference
// simulation (9 * 5 = 0x2D and 12 * 13 = 0x9C). A 12 x 12 instance is run on
// the worked decimal example 1234 * 2116 = 2611144, on all-ones operands and
// on random operands. Outputs are sampled one time unit after the inputs change. A
// watchdog on a free-running clock of 10 time units fails the run after 20000 cycles.
module tb_csa_vedic_mult;

  localparam int unsigned NB = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] p4;
  csa_vedic_mult dut4 (.a(a4), .b(b4), .p(p4));

  logic [NB-1:0]   ab, bb;
  logic [2*NB-1:0] pb;
  csa_vedic_mult #(.N(NB)) dutb (.a(ab), .b(bb), .p(pb));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run4(input int i, input int j);
    a4 = 4'(i); b4 = 4'(j);
    #1;
    check(longint'(p4), longint'(i * j), $sformatf("4x4 %0d*%0d", i, j));
  endtask

  task automatic runb(input longint i, input longint j);
    ab = NB'(i); bb = NB'(j);
    #1;
    check(longint'(pb), i * j, $sformatf("%0dx%0d %0d*%0d", NB, NB, i, j));
  endtask

  initial begin
    // Operand pairs of the reference simulation.
    a4 = 4'h9; b4 = 4'h5; #1;
    check(longint'(p4), 64'h2D, "9*5 = 8'h2D");
    a4 = 4'hC; b4 = 4'hD; #1;
    check(longint'(p4), 64'h9C, "12*13 = 8'h9C");
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        run4(i, j);

    // Worked decimal example, carried out in binary.
    runb(1234, 2116);
    check(longint'(pb), 2611144, "1234*2116 = 2611144");
    runb(4095, 4095);
    runb(0, 4095);
    runb(4095, 1);
    for (int t = 0; t < 3000; t++)
      runb(longint'($urandom_range(4095)), longint'($urandom_range(4095)));

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

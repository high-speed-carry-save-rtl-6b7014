// tb_vm_adder: self-checking test of the vector merging adder.
//
// The default 4-bit adder is checked exhaustively (every a, b and cin) and a
// 12-bit instance with random operands; the expected {cout, sum} is the
// integer sum a + b + cin. The combinational outputs are sampled one time unit after
// the inputs change. A watchdog on a free-running clock of 10 time units ends the run
// with a failure if the test has not finished after 20000 cycles.
module tb_vm_adder;

  localparam int unsigned WB = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Default size.
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  vm_adder dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  // Wider instance.
  logic [WB-1:0] ab, bb, sb;
  logic          cib, cob;
  vm_adder #(.W(WB)) dutb (.a(ab), .b(bb), .cin(cib), .sum(sb), .cout(cob));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = 1'(c);
          #1;
          check(int'({co4, s4}), i + j + c, $sformatf("W=4 %0d+%0d+%0d", i, j, c));
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      ab  = WB'($urandom);
      bb  = WB'($urandom);
      cib = 1'($urandom);
      #1;
      check(int'({cob, sb}), int'(ab) + int'(bb) + int'(cib),
            $sformatf("W=%0d %0d+%0d+%0d", WB, ab, bb, cib));
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

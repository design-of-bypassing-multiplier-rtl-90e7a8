// Self-checking testbench of the 4-bit carry lookahead block: all 512
// combinations of a, b and c0. The sum and c4 are compared with integer
// addition; pg must be 1 exactly when a + b = 15 (every bit propagates) and
// gg exactly when a + b > 15 (the block makes a carry by itself).
module tb_cla4_block;
  int checks = 0;
  int failures = 0;
  logic [3:0] a, b, sum;
  logic c0, c4, pg, gg;
  logic clk;

  cla4_block u_dut (.a(a), .b(b), .c0(c0), .sum(sum), .c4(c4), .pg(pg), .gg(gg));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int v = 0; v < 512; v++) begin
      {c0, a, b} = 9'(v);
      #1;
      checks++;
      if ({c4, sum} !== 5'(a + b + c0)) failures++;
      checks++;
      if (pg !== ((a ^ b) == 4'hF)) failures++;
      checks++;
      if (gg !== (5'(a) + 5'(b) > 5'd15)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

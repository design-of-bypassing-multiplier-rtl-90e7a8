// Self-checking testbench of the final-adder wrapper. The 7-bit adder of
// the 8x8 array is built with each of the three adder kinds and checked
// exhaustively over both operands and the carry in; 3-bit (4x4 array) and
// 15-bit (16x16 array) ripple carry, carry lookahead and carry select
// versions are checked too, the 15-bit ones on random operands.
module tb_final_adder;
  import bm_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0]  a7, b7;
  logic        c7;
  logic [6:0]  s7  [3];
  logic        co7 [3];
  logic [2:0]  a3, b3;
  logic        c3;
  logic [2:0]  s3  [3];
  logic        co3 [3];
  logic [14:0] a15, b15;
  logic        c15;
  logic [14:0] s15 [3];
  logic        co15[3];

  localparam adder_e KIND [3] = '{ADDER_RCA, ADDER_CLA, ADDER_CSLA};

  for (genvar k = 0; k < 3; k++) begin : g_k
    final_adder #(.W(7),  .ADDER(KIND[k])) u7  (.a(a7),  .b(b7),  .cin(c7),  .sum(s7[k]),  .cout(co7[k]));
    final_adder #(.W(3),  .ADDER(KIND[k])) u3  (.a(a3),  .b(b3),  .cin(c3),  .sum(s3[k]),  .cout(co3[k]));
    final_adder #(.W(15), .ADDER(KIND[k])) u15 (.a(a15), .b(b15), .cin(c15), .sum(s15[k]), .cout(co15[k]));
  end

  initial begin : stim
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(x); b7 = 7'(y); c7 = 1'(c);
          a3 = 3'(x); b3 = 3'(y); c3 = 1'(c);
          a15 = 15'($urandom); b15 = 15'($urandom); c15 = 1'($urandom);
          #1;
          for (int k = 0; k < 3; k++) begin
            checks++;
            if ({co7[k], s7[k]} !== 8'(a7 + b7 + c7)) failures++;
            checks++;
            if ({co3[k], s3[k]} !== 4'(a3 + b3 + c3)) failures++;
            checks++;
            if ({co15[k], s15[k]} !== 16'(a15 + b15 + c15)) failures++;
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

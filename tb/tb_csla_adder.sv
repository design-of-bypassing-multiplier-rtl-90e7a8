// Self-checking testbench of the W-bit carry select adder.
//
// Widths 3, 4, 7 and 8 are checked exhaustively over both operands and the
// carry in (widths that are not a multiple of 4 exercise the padding); the
// default 16-bit width is checked on corner cases and random operands. The
// reference is the testbench's own integer addition.
module tb_csla_adder;
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

  logic [2:0] a0, b0, s0;
  logic ci0, co0;
  csla_adder #(.W(3)) u0 (.a(a0), .b(b0), .cin(ci0), .sum(s0), .cout(co0));

  logic [3:0] a1, b1, s1;
  logic ci1, co1;
  csla_adder #(.W(4)) u1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));

  logic [6:0] a2, b2, s2;
  logic ci2, co2;
  csla_adder #(.W(7)) u2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  logic [7:0] a3, b3, s3;
  logic ci3, co3;
  csla_adder #(.W(8)) u3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));

  logic [15:0] a4, b4, s4;
  logic ci4, co4;
  csla_adder #(.W(16)) u4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  task automatic score(int w, logic [31:0] a, logic [31:0] b, logic c, logic [32:0] got);
    logic [32:0] expv;
    expv = 33'(a) + 33'(b) + 33'(c);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("W=%0d: %0d+%0d+%0d gave %0d", w, a, b, c, got);
    end
  endtask

  initial begin : stim
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int c = 0; c < 2; c++) begin
          a0 = 3'(x); b0 = 3'(y); ci0 = 1'(c);
          #1;
          score(3, 32'(a0), 32'(b0), ci0, 33'({co0, s0}));
        end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a1 = 4'(x); b1 = 4'(y); ci1 = 1'(c);
          #1;
          score(4, 32'(a1), 32'(b1), ci1, 33'({co1, s1}));
        end
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int c = 0; c < 2; c++) begin
          a2 = 7'(x); b2 = 7'(y); ci2 = 1'(c);
          #1;
          score(7, 32'(a2), 32'(b2), ci2, 33'({co2, s2}));
        end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a3 = 8'(x); b3 = 8'(y); ci3 = 1'(c);
          #1;
          score(8, 32'(a3), 32'(b3), ci3, 33'({co3, s3}));
        end
    for (int t = 0; t < 5000; t++) begin
      case (t)
        0: begin a4 = '1; b4 = '0; ci4 = 1'b1; end
        1: begin a4 = '1; b4 = '1; ci4 = 1'b1; end
        2: begin a4 = 16'h0FFF; b4 = 16'h0001; ci4 = 1'b0; end
        default: begin
          a4 = 16'($urandom); b4 = 16'($urandom); ci4 = 1'($urandom);
        end
      endcase
      #1;
      score(16, 32'(a4), 32'(b4), ci4, 33'({co4, s4}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

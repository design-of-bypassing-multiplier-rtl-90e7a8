// Self-checking testbench of the two-dimensional bypassing adding cell, built
// both with and without bypass logic. All 64 input combinations are applied
// with pp = a_bit & b_bit as in the array. Expected behaviour:
//   row bit 0                 : bypassed, s_out = s_in, c_out = c_byp;
//   row 1, column 1           : adds pp + s_in + c_in;
//   row 1, column 0, carry 0  : bypassed, s_out = s_in, c_out = 0;
//   row 1, column 0, carry 1  : with bypass logic the cell adds (s_in + 1),
//                               without it the cell stays bypassed.
module tb_bypass_2d_cell;
  int checks = 0;
  int failures = 0;
  logic a_bit, b_bit, s_in, c_in, c_byp;
  logic s0, c0, act0, s1, c1, act1;
  logic clk;

  bypass_2d_cell #(.HAS_BL(1'b0)) u_nobl (
    .pp(a_bit & b_bit), .a_bit(a_bit), .b_bit(b_bit), .s_in(s_in), .c_in(c_in),
    .c_byp(c_byp), .s_out(s0), .c_out(c0), .active(act0));
  bypass_2d_cell #(.HAS_BL(1'b1)) u_bl (
    .pp(a_bit & b_bit), .a_bit(a_bit), .b_bit(b_bit), .s_in(s_in), .c_in(c_in),
    .c_byp(c_byp), .s_out(s1), .c_out(c1), .active(act1));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [2:0] e0, e1;  // {active, carry, sum}
    for (int v = 0; v < 32; v++) begin
      {a_bit, b_bit, s_in, c_in, c_byp} = 5'(v);
      #1;
      if (!b_bit) begin
        e0 = {1'b0, c_byp, s_in};
        e1 = e0;
      end else if (a_bit) begin
        e0 = {1'b1, 2'(1 + s_in + c_in)};
        e1 = e0;
      end else begin
        e0 = {1'b0, 1'b0, s_in};
        e1 = c_in ? {1'b1, 2'(s_in + 1)} : e0;
      end
      checks++;
      if ({act0, c0, s0} !== e0) begin
        failures++;
        $display("no BL, input %b: got %b expected %b", 5'(v), {act0, c0, s0}, e0);
      end
      checks++;
      if ({act1, c1, s1} !== e1) begin
        failures++;
        $display("BL, input %b: got %b expected %b", 5'(v), {act1, c1, s1}, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the column-bypassing modified full adder. All
// 16 input combinations: with the column bit set the outputs are the
// full-adder sum and carry of (pp, s_in, c_in). With it clear the sum must be
// s_in whenever the incoming carry is 0 (the case the column theorem
// guarantees) and the carry must be 0.
module tb_col_bypass_cell;
  int checks = 0;
  int failures = 0;
  logic pp, a_bit, s_in, c_in, s_out, c_out;
  logic clk;

  col_bypass_cell u_dut (.pp(pp), .a_bit(a_bit), .s_in(s_in), .c_in(c_in),
                         .s_out(s_out), .c_out(c_out));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int v = 0; v < 16; v++) begin
      {pp, a_bit, s_in, c_in} = 4'(v);
      #1;
      if (a_bit) begin
        checks++;
        if ({c_out, s_out} !== 2'(pp + s_in + c_in)) failures++;
      end else begin
        checks++;
        if (c_out !== 1'b0) failures++;
        if (!c_in) begin
          checks++;
          if (s_out !== s_in) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

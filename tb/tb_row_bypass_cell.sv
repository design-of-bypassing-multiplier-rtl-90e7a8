// Self-checking testbench of the row-bypassing modified full adder. All 32
// input combinations: with the row bit set the outputs must be the full-adder
// sum and carry of (pp, s_in, c_fa); with it clear they must be s_in and
// c_byp.
module tb_row_bypass_cell;
  int checks = 0;
  int failures = 0;
  logic pp, x_bit, s_in, c_fa, c_byp, s_out, c_out;
  logic clk;

  row_bypass_cell u_dut (.pp(pp), .x_bit(x_bit), .s_in(s_in), .c_fa(c_fa), .c_byp(c_byp),
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
    logic [1:0] expv;
    for (int v = 0; v < 32; v++) begin
      {pp, x_bit, s_in, c_fa, c_byp} = 5'(v);
      #1;
      expv = x_bit ? 2'(pp + s_in + c_fa) : {c_byp, s_in};
      checks++;
      if ({c_out, s_out} !== expv) begin
        failures++;
        $display("input %b: got %b%b expected %b", 5'(v), c_out, s_out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the one-bit full adder: all eight input
// combinations are applied and {cout, s} is compared with a + b + cin.
module tb_full_adder;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, s, cout;
  logic clk;

  full_adder u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} !== 2'(a + b + cin)) begin
        failures++;
        $display("%b+%b+%b gave %b%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

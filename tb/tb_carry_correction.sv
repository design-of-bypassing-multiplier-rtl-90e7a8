// Self-checking testbench of the right-edge carry correction chain. For
// N = 4 and N = 8 every combination of edge sums s_edge[r] and dropped
// carries k_edge[r] (r = 2..N-1) is applied; the weighted value of the
// outputs, sum of p_low[r] 2^r plus c_out 2^N, must equal the
// weighted sum of all inputs, sum of (s_edge[r] + k_edge[r]) 2^r.
module tb_carry_correction;
  int checks = 0;
  int failures = 0;
  logic clk;

  logic [3:2] s4;
  logic [3:2] k4;
  logic [3:2] p4;
  logic       c4;
  logic [7:2] s8;
  logic [7:2] k8;
  logic [7:2] p8;
  logic       c8;

  carry_correction #(.N(4)) u4 (.s_edge(s4), .k_edge(k4), .p_low(p4), .c_out(c4));
  carry_correction #(.N(8)) u8 (.s_edge(s8), .k_edge(k8), .p_low(p8), .c_out(c8));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int v = 0; v < (1 << 4); v++) begin
      {s4, k4} = 4'(v);
      #1;
      checks++;
      if ({c4, p4} !== (3'(s4) + 3'(k4))) failures++;
    end
    for (int v = 0; v < (1 << 12); v++) begin
      {s8, k8} = 12'(v);
      #1;
      checks++;
      if ({c8, p8} !== (7'(s8) + 7'(k8))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// W-bit ripple carry adder.
//
// W full adders in a chain: the carry out of bit i is the carry in of bit
// i+1, so the worst-case delay grows linearly with W (from the least
// significant inputs to the top sum bit).
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module rca_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule

// Correction chain for carries dropped at the right edge of a bypassing array.
//
// When a row of the array is bypassed, each cell passes on the carry of its
// left neighbour, so the carry that entered the rightmost cell (column 0) of
// row r has nowhere to go. That carry has the weight 2^r of product bit r.
// This chain adds it back: for every r in 2..N-1 a full adder adds the sum
// leaving column 0 of row r, the dropped carry of row r and the carry of the
// adder for r-1, and delivers product bit r. Its last carry (weight 2^N) feeds
// the carry input of the array's final adder. Row 1 never drops a carry (its
// carry inputs are 0), so product bit 1 is the row-1 edge sum itself and is
// taken straight from the array, not from this chain.
//
// Interface: s_edge[r] and k_edge[r] for r = 2..N-1 in; p_low[r] = product
// bit r for r = 2..N-1 and c_out out. N >= 3.
// Combinational, a ripple of N-2 full adders.
module carry_correction #(
  parameter int N = 8
) (
  input  logic [N-1:2] s_edge,
  input  logic [N-1:2] k_edge,
  output logic [N-1:2] p_low,
  output logic         c_out
);
  logic [N:2] cc;  // cc[r]: carry into the adder of weight r

  assign cc[2] = 1'b0;

  for (genvar r = 2; r < N; r++) begin : g_fix
    full_adder u_fa (
      .a   (s_edge[r]),
      .b   (k_edge[r]),
      .cin (cc[r]),
      .s   (p_low[r]),
      .cout(cc[r+1])
    );
  end

  assign c_out = cc[N];
endmodule

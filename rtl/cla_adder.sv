// W-bit carry lookahead adder.
//
// The operands are cut into 4-bit lookahead blocks (cla4_block). A second
// lookahead level takes each block's group propagate P_k and generate G_k and
// predicts every block carry-in at once from cin, using
// c_{k+1} = G_k | P_k c_k expanded into sum-of-products form, so no carry
// ripples from block to block. For 16 bits this predicts c4, c8 and c12.
// A width that is not a multiple of 4 is padded with zero bits on top.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module cla_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NB = (W + 3) / 4;   // number of 4-bit blocks
  localparam int WP = 4 * NB;        // padded width

  logic [WP-1:0] ap, bp, sp;
  logic [NB-1:0] pg, gg;
  logic [NB:0]   bc;                 // block carry-ins, bc[NB] = carry out of the padded adder
  logic [NB-1:0] c4_unused;

  assign ap = WP'(a);
  assign bp = WP'(b);

  for (genvar k = 0; k < NB; k++) begin : g_blk
    cla4_block u_blk (
      .a  (ap[4*k +: 4]),
      .b  (bp[4*k +: 4]),
      .c0 (bc[k]),
      .sum(sp[4*k +: 4]),
      .c4 (c4_unused[k]),
      .pg (pg[k]),
      .gg (gg[k])
    );
  end

  // Second lookahead level: bc[k+1] = G_k | P_k G_{k-1} | ... | P_k..P_0 cin.
  always_comb begin
    logic term;
    bc[0] = cin;
    for (int k = 0; k < NB; k++) begin
      bc[k+1] = gg[k];
      for (int m = k - 1; m >= -1; m--) begin
        term = (m >= 0) ? gg[m] : cin;
        for (int q = m + 1; q <= k; q++) term &= pg[q];
        bc[k+1] |= term;
      end
    end
  end

  assign sum = sp[W-1:0];
  // With padding the carry out of bit W-1 is the sum bit W of the padded adder.
  if (WP == W) begin : g_full
    assign cout = bc[NB];
  end else begin : g_pad
    assign cout = sp[W];
  end
endmodule

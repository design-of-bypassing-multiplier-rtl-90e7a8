// W-bit carry select adder, built by halving.
//
// The operands are padded to WP = 4 * 2^K bits and cut into 4-bit blocks.
// The lowest block is a ripple carry adder fed by cin. Every other block holds
// two 4-bit ripple adders working at the same time, one with carry in 0 and
// one with carry in 1. The blocks are then merged in K levels, each level
// joining neighbouring groups into groups twice as large: the high group's
// sums for either carry-in are picked by a 2-to-1 multiplexer steered by the
// low group's carry, and the joined carry is G | P c, where G and P are the
// high group's carries for carry in 0 and 1. This is the halving structure in
// which a 2n-bit carry select adder is a n-bit one for the low half and a
// selected pair of n-bit ones for the high half: for 16 bits a 4-bit ripple
// adder for bits 3:0, a selected pair of 4-bit ripple adders for bits 7:4 and
// a selected pair of 8-bit carry select adders for bits 15:8.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module csla_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NB = 1 << $clog2((W + 3) / 4);  // blocks, a power of 2
  localparam int WP = 4 * NB;                    // padded width
  localparam int K  = $clog2(NB);                // merge levels

  logic [WP-1:0] ap, bp;
  logic [WP-1:0] s0_blk, s1_blk;  // block sums for block carry in 0 / 1
  logic [NB-1:0] c0_blk, c1_blk;  // block carries for block carry in 0 / 1
  logic [WP-1:0] sp;
  logic          cp;

  assign ap = WP'(a);
  assign bp = WP'(b);

  // Block 0 sees the real carry in; both cases carry the same result.
  rca_adder #(.W(4)) u_blk0 (
    .a(ap[3:0]), .b(bp[3:0]), .cin(cin), .sum(s0_blk[3:0]), .cout(c0_blk[0])
  );
  assign s1_blk[3:0] = s0_blk[3:0];
  assign c1_blk[0]   = c0_blk[0];

  for (genvar k = 1; k < NB; k++) begin : g_blk
    rca_adder #(.W(4)) u_c0 (
      .a(ap[4*k +: 4]), .b(bp[4*k +: 4]), .cin(1'b0), .sum(s0_blk[4*k +: 4]), .cout(c0_blk[k])
    );
    rca_adder #(.W(4)) u_c1 (
      .a(ap[4*k +: 4]), .b(bp[4*k +: 4]), .cin(1'b1), .sum(s1_blk[4*k +: 4]), .cout(c1_blk[k])
    );
  end

  // Merge levels: at level l, groups of 2^l blocks are joined in pairs.
  always_comb begin
    logic [WP-1:0] s0, s1;
    logic [NB-1:0] g0, g1;  // carry of group m for group carry in 0 / 1
    int gw;                 // group width in bits
    s0 = s0_blk;
    s1 = s1_blk;
    g0 = c0_blk;
    g1 = c1_blk;
    for (int l = 0; l < K; l++) begin
      gw = 4 << l;
      for (int m = 0; m < (NB >> (l + 1)); m++) begin
        // Low group 2m, high group 2m+1; the result becomes group m.
        for (int i = 0; i < gw; i++) begin
          logic h0, h1;
          h0 = s0[(2*m+1)*gw + i];
          h1 = s1[(2*m+1)*gw + i];
          s0[(2*m+1)*gw + i] = g0[2*m] ? h1 : h0;
          s1[(2*m+1)*gw + i] = g1[2*m] ? h1 : h0;
        end
        begin
          logic gh, ph, gl0, gl1;
          gh  = g0[2*m+1];
          ph  = g1[2*m+1];
          gl0 = g0[2*m];
          gl1 = g1[2*m];
          g0[m] = gh | (ph & gl0);
          g1[m] = gh | (ph & gl1);
        end
      end
    end
    // The lowest group saw the real carry in, so case 0 and case 1 agree.
    sp = s0;
    cp = g0[0];
  end

  assign sum = sp[W-1:0];
  // With padding the carry out of bit W-1 is the sum bit W of the padded adder
  // (W % WP is W then, and the index stays in range when there is no padding).
  assign cout = (WP == W) ? cp : sp[W % WP];
endmodule

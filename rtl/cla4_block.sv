// 4-bit carry lookahead block.
//
// Each bit forms propagate p = a^b and generate g = a&b. The lookahead logic
// predicts every internal carry directly from c0 and the p/g bits in two gate
// levels (c_{i+1} = g_i | p_i g_{i-1} | ... | p_i..p_0 c0), and the sum bit is
// p_i ^ c_i. The block also reports its group propagate pg (all four bits
// propagate) and group generate gg (a carry is made inside the block), which a
// second lookahead level uses to predict the carries between blocks.
//
// Interface: a, b (4 bits), c0 in; sum (4 bits), c4, pg, gg out. Combinational.
module cla4_block (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] sum,
  output logic       c4,
  output logic       pg,
  output logic       gg
);
  logic [3:0] p, g;
  logic [4:0] c;

  always_comb begin
    p = a ^ b;
    g = a & b;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[4] = gg | (pg & c0);
    sum  = p ^ c[3:0];
    c4   = c[4];
  end
endmodule

// Modified full adder (MFA) of the row-bypassing array multiplier.
//
// A full adder whose three inputs pass through isolation gates and whose two
// outputs pass through 2-to-1 multiplexers, all controlled by the row's
// multiplier bit x_bit. With x_bit = 1 the cell adds its partial product, the
// sum from the row above and the carry from the row above. With x_bit = 0 the
// row's partial products are all zero, so the adder is not needed: its
// inputs are held at 0 so it does not switch, the incoming sum s_in is passed
// to s_out and the carry c_byp (the carry the row above hands to the left
// neighbour, which has the weight of this cell's carry output) is passed to
// c_out.
//
// The isolation buffers are three-state drivers in the original circuit; here
// they are AND gates that force the isolated inputs to 0, the synthesizable
// equivalent that also keeps the adder from switching.
//
// Interface: pp, x_bit, s_in, c_fa, c_byp in; s_out, c_out out. Combinational.
module row_bypass_cell (
  input  logic pp,     // partial product of this cell
  input  logic x_bit,  // multiplier bit of the row; 0 bypasses the cell
  input  logic s_in,   // sum from the row above, same weight
  input  logic c_fa,   // carry into the adder, from the row above
  input  logic c_byp,  // carry passed on when the row is bypassed
  output logic s_out,
  output logic c_out
);
  logic fa_s, fa_c;

  full_adder u_fa (
    .a   (pp   & x_bit),
    .b   (s_in & x_bit),
    .cin (c_fa & x_bit),
    .s   (fa_s),
    .cout(fa_c)
  );

  assign s_out = x_bit ? fa_s : s_in;
  assign c_out = x_bit ? fa_c : c_byp;
endmodule

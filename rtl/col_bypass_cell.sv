// Modified full adder (MFA) of the column-bypassing array multiplier.
//
// When the multiplicand bit a_bit of the cell's column is 0, the partial
// product is 0 and (by induction down the column) so is the incoming carry,
// so the cell's sum equals the sum arriving from the upper-left cell and its
// carry is 0. The cell therefore has only two isolated adder inputs (partial
// product and sum) and one output multiplexer on the sum; the carry input goes
// straight into the adder and the carry output straight out. Compared with the
// row-bypassing cell it saves a multiplexer and an isolation gate.
//
// Isolation is modelled with AND gates forcing the inputs to 0 (the original
// uses three-state buffers).
//
// Interface: pp, a_bit, s_in, c_in in; s_out, c_out out. Combinational.
module col_bypass_cell (
  input  logic pp,     // partial product of this cell
  input  logic a_bit,  // multiplicand bit of the column; 0 bypasses the cell
  input  logic s_in,   // sum from the upper-left cell
  input  logic c_in,   // carry from the cell above
  output logic s_out,
  output logic c_out
);
  logic fa_s;

  full_adder u_fa (
    .a   (pp   & a_bit),
    .b   (s_in & a_bit),
    .cin (c_in),
    .s   (fa_s),
    .cout(c_out)
  );

  assign s_out = a_bit ? fa_s : s_in;
endmodule

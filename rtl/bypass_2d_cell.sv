// Adding cell (AC) of the two-dimensional (row and column) bypassing multiplier.
//
// The cell is skipped when its row's multiplier bit b_bit is 0 (row bypass)
// or its column's multiplicand bit a_bit is 0 (column bypass). The two kinds
// of skip hand on different signals:
//   row bypass    (b_bit = 0): s_out = s_in, c_out = c_byp, the carry that
//                 enters the left neighbour, which keeps its binary weight;
//   column bypass (b_bit = 1, a_bit = 0): s_out = s_in, c_out = 0.
// A column bypass is only correct while the incoming carry is 0. After a
// bypassed row has shifted a carry into the column this is no longer true,
// so a cell built with bypass logic (HAS_BL = 1) stays active when its row
// bit is 1 and a carry arrives, even though its column bit is 0:
//   active = b_bit & (a_bit | (HAS_BL & c_in)).
// Cells without bypass logic sit where no such carry can arrive, or (column 0)
// where the array's correction chain picks the carry up.
//
// Isolation of the adder inputs is modelled with AND gates forcing them to 0.
//
// Interface: pp, a_bit, b_bit, s_in, c_in, c_byp in; s_out, c_out, active
// out. Combinational.
module bypass_2d_cell #(
  parameter bit HAS_BL = 1'b0
) (
  input  logic pp,      // partial product a_j & b_r
  input  logic a_bit,   // multiplicand (column) bit
  input  logic b_bit,   // multiplier (row) bit
  input  logic s_in,    // sum from the upper-left cell
  input  logic c_in,    // carry from the cell above
  input  logic c_byp,   // carry entering the left neighbour
  output logic s_out,
  output logic c_out,
  output logic active   // 1 when the adder computes
);
  logic fa_s, fa_c;

  assign active = b_bit & (a_bit | (HAS_BL & c_in));

  full_adder u_fa (
    .a   (pp   & active),
    .b   (s_in & active),
    .cin (c_in & active),
    .s   (fa_s),
    .cout(fa_c)
  );

  assign s_out = active ? fa_s : s_in;
  assign c_out = active ? fa_c : (b_bit ? 1'b0 : c_byp);
endmodule

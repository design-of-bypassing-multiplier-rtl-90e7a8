// Bypassing array multipliers: row, column and two-dimensional bypassing,
// next to the plain Braun array they are measured against.
//
// Four N x N unsigned array multipliers are placed side by side, each with its
// own operands and product:
//   braun_multiplier       the conventional Braun array; every adder cell
//                          works on every operand pair;
//   row_bypass_multiplier  skips a row of adders when its multiplier bit is
//                          0 and repairs the carries it shifts out of the
//                          array with a correction chain;
//   col_bypass_multiplier  skips a column of adders when its multiplicand
//                          bit is 0; no correction is needed;
//   bypass_2d_multiplier   skips by row and by column, with bypass logic in
//                          the (N-3)^2 cells where both skips conflict.
// The three bypassing variants skip adder cells whose work is known to be
// trivial, so those cells do not switch. All four compute the same product
// and differ in power, delay and area. Placing the baseline beside the
// bypassing designs follows the original comparison; one shared top is this
// implementation's choice.
//
// Parameters: N operand width (default 8), ADDER last-stage adder of all
// four arrays (default ripple carry).
// Interface: for each variant (prefix braun_, row_, col_, td_) operands a and
// b and product p (2N bits). The two-dimensional variant also brings out its
// cell activity map td_active ((N-1)^2 bits, bit (r-1)*(N-1)+j for row r,
// column j). Combinational.
module bypass_multiplier_top
  import bm_pkg::*;
#(
  parameter int     N     = 8,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0]           braun_a,
  input  logic [N-1:0]           braun_b,
  output logic [2*N-1:0]         braun_p,
  input  logic [N-1:0]           row_a,
  input  logic [N-1:0]           row_b,
  output logic [2*N-1:0]         row_p,
  input  logic [N-1:0]           col_a,
  input  logic [N-1:0]           col_b,
  output logic [2*N-1:0]         col_p,
  input  logic [N-1:0]           td_a,
  input  logic [N-1:0]           td_b,
  output logic [2*N-1:0]         td_p,
  output logic [(N-1)*(N-1)-1:0] td_active
);
  braun_multiplier #(.N(N), .ADDER(ADDER)) u_braun (
    .a(braun_a), .b(braun_b), .p(braun_p)
  );

  row_bypass_multiplier #(.N(N), .ADDER(ADDER)) u_row (
    .a(row_a), .b(row_b), .p(row_p)
  );

  col_bypass_multiplier #(.N(N), .ADDER(ADDER)) u_col (
    .a(col_a), .b(col_b), .p(col_p)
  );

  bypass_2d_multiplier #(.N(N), .ADDER(ADDER)) u_2d (
    .a(td_a), .b(td_b), .p(td_p), .cell_active(td_active)
  );
endmodule

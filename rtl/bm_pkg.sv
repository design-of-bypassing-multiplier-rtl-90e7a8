// Shared definitions of the bypassing multipliers.
//
// The array multipliers end in one carry-propagate adder that turns the last
// row of sums and carries into the upper half of the product. Three kinds of
// adder can be chosen for that stage; adder_e names them and every multiplier
// and the final-adder wrapper take one as a parameter.
package bm_pkg;

  // Last-stage adder of the array.
  typedef enum logic [1:0] {
    ADDER_RCA  = 2'd0,  // ripple carry
    ADDER_CLA  = 2'd1,  // carry lookahead, 4-bit blocks with a second lookahead level
    ADDER_CSLA = 2'd2   // carry select, 4-bit blocks
  } adder_e;

  // Bit index of the activity flag of array cell (row r, column j) in an
  // N x N array with rows 1..N-1 and columns 0..N-2.
  function automatic int cell_idx(int n, int r, int j);
    return (r - 1) * (n - 1) + j;
  endfunction

endpackage

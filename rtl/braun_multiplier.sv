// N x N unsigned Braun array multiplier, without bypassing.
//
// This is the conventional array that the bypassing multipliers are compared
// against. An AND gate forms each partial product a_j b_r. Rows r = 1..N-1
// each hold N-1 full adders, and every adder is always active. Cell (r, j)
// adds three inputs:
//   - its partial product a_j b_r;
//   - the sum of cell (r-1, j+1), one row up and one column left, which has
//     the same binary weight;
//   - the carry of cell (r-1, j), straight above.
// Row 1 instead takes the partial products a_{j+1} b_0 as its sums and 0 as
// its carries. The leftmost cell of each row takes a_{N-1} b_{r-1}. Column 0
// of row r gives product bit r. A final carry-propagate adder of N-1 bits
// adds the last row's sums and carries into bits N..2N-1. With N(N-1) full
// adders and N^2 AND gates, this follows the original description of the
// Braun multiplier. The selectable final adder is shared with the bypassing
// designs, so that all four arrays can be built with the same last stage.
//
// Parameters: N operand width (default 8), ADDER last-stage adder (default
// ripple carry).
// Interface: a (multiplicand), b (multiplier) in; p = a*b out.
// Purely combinational.
module braun_multiplier
  import bm_pkg::*;
#(
  parameter int     N     = 8,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-2:0] fin_a, fin_b, fin_s;
  logic         fin_c;

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar j = 0; j < N - 1; j++) begin : g_col
      logic s_i, c_i, s_o, c_o;
      if (r == 1) begin : g_s0
        assign s_i = a[j+1] & b[0];
      end else if (j == N - 2) begin : g_sl
        assign s_i = a[N-1] & b[r-1];
      end else begin : g_sm
        assign s_i = g_row[r-1].g_col[j+1].s_o;
      end

      if (r == 1) begin : g_c0
        assign c_i = 1'b0;
      end else begin : g_cm
        assign c_i = g_row[r-1].g_col[j].c_o;
      end

      full_adder u_fa (
        .a   (a[j] & b[r]),
        .b   (s_i),
        .cin (c_i),
        .s   (s_o),
        .cout(c_o)
      );
    end

    assign p[r] = g_col[0].s_o;
  end

  for (genvar j = 0; j < N - 1; j++) begin : g_fin
    if (j == N - 2) begin : g_top
      assign fin_a[j] = a[N-1] & b[N-1];
    end else begin : g_mid
      assign fin_a[j] = g_row[N-1].g_col[j+1].s_o;
    end
    assign fin_b[j] = g_row[N-1].g_col[j].c_o;
  end

  final_adder #(.W(N-1), .ADDER(ADDER)) u_final (
    .a   (fin_a),
    .b   (fin_b),
    .cin (1'b0),
    .sum (fin_s),
    .cout(fin_c)
  );

  assign p[0]       = a[0] & b[0];
  assign p[2*N-2:N] = fin_s;
  assign p[2*N-1]   = fin_c;
endmodule

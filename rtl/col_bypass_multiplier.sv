// N x N unsigned array (Braun) multiplier with column bypassing.
//
// Same carry-save array as the row-bypassing design (rows r = 1..N-1 of N-1
// cells, carries straight down, sums diagonally to the same weight, a final
// carry-propagate adder for bits N..2N-1), but the cells are skipped by
// column: when multiplicand bit a_j is 0, every cell of column j has a zero
// partial product and, by induction from row 1 (whose carry inputs are 0), a
// zero incoming carry. Its sum output is then simply the sum arriving from
// the upper-left cell and its carry is 0, so col_bypass_cell isolates the
// adder and passes the sum through one multiplexer. No carry leaves the array
// sideways, so no correction adders are needed. As a guard, each carry of the
// last row is ANDed with its column bit before it enters the final adder, so
// an isolated adder can never inject a stale carry.
//
// The cell, the column theorem and the protecting AND gates follow the
// original column-bypassing design; modelling the isolation buffers as AND
// gates is this implementation's choice.
//
// Parameters: N operand width (default 8), ADDER last-stage adder (default
// ripple carry).
// Interface: a (multiplicand), b (multiplier) in; p = a*b out.
// Purely combinational.
module col_bypass_multiplier
  import bm_pkg::*;
#(
  parameter int     N     = 8,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
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

      col_bypass_cell u_cell (
        .pp   (a[j] & b[r]),
        .a_bit(a[j]),
        .s_in (s_i),
        .c_in (c_i),
        .s_out(s_o),
        .c_out(c_o)
      );
    end

    assign p[r] = g_col[0].s_o;
  end

  // Last row: protecting AND gates on the carries, then the final adder.
  for (genvar j = 0; j < N - 1; j++) begin : g_fin
    if (j == N - 2) begin : g_top
      assign fin_a[j] = a[N-1] & b[N-1];
    end else begin : g_mid
      assign fin_a[j] = g_row[N-1].g_col[j+1].s_o;
    end
    assign fin_b[j] = g_row[N-1].g_col[j].c_o & a[j];
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

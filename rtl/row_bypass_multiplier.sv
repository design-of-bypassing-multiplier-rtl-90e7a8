// N x N unsigned array (Braun) multiplier with row bypassing.
//
// Structure: the partial products a_j b_i are formed by AND gates. Row 0 of
// partial products enters as the sum inputs of row 1; rows r = 1..N-1 of
// N-1 carry-save cells each add partial-product row r, with carries passed
// straight down and sums diagonally down-right (to the same weight). Column 0
// of each row delivers product bit r; the last row's sums and carries are
// merged by a final carry-propagate adder into bits N..2N-1.
//
// Row bypassing: when multiplier bit b_r is 0 every partial product of row r
// is 0, so all adders of that row are isolated and their row_bypass_cell
// multiplexers pass the sums through unchanged and shift each carry one
// position right, keeping its weight. The carry that entered column 0 of a
// bypassed row is shifted out of the array; the carry_correction chain on
// the right edge adds it back into product bit r. Its carry feeds the final
// adder's carry input.
//
// The cell (isolated adder, two output multiplexers), the row-bypass
// condition and the need for an extra correcting circuit follow the original
// row-bypassing design; taking the passed carry from the left neighbour and
// building the correction as one ripple of full adders over bits 2..N-1 are
// this implementation's choices.
//
// Parameters: N operand width (default 8, the 8x8 size the design is compared
// at), ADDER last-stage adder (default ripple carry).
// Interface: a (multiplicand), b (multiplier) in; p = a*b out.
// Purely combinational, no clock.
module row_bypass_multiplier
  import bm_pkg::*;
#(
  parameter int     N     = 8,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [2*N-1:0] p
);
  logic [N-1:1] s_edge;
  logic [N-1:2] k_edge;
  logic [N-2:0] fin_a, fin_b, fin_s;
  logic         fin_c, corr_c;

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar j = 0; j < N - 1; j++) begin : g_col
      logic s_i, c_i, s_o, c_o;
      // Sum input: row 0 partial products for row 1; otherwise the sum of
      // the upper-left cell, or the leftover partial product a_{N-1} b_{r-1}.
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

      logic c_byp;
      if (j == N - 2) begin : g_bl
        assign c_byp = 1'b0;
      end else begin : g_bm
        assign c_byp = g_row[r].g_col[j+1].c_i;
      end

      row_bypass_cell u_cell (
        .pp   (a[j] & b[r]),
        .x_bit(b[r]),
        .s_in (s_i),
        .c_fa (c_i),
        .c_byp(c_byp),
        .s_out(s_o),
        .c_out(c_o)
      );
    end

    assign s_edge[r] = g_col[0].s_o;
    if (r >= 2) begin : g_k
      assign k_edge[r] = g_col[0].c_i & ~b[r];
    end
  end

  assign p[1] = s_edge[1];

  carry_correction #(.N(N)) u_corr (
    .s_edge(s_edge[N-1:2]),
    .k_edge(k_edge),
    .p_low (p[N-1:2]),
    .c_out (corr_c)
  );

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
    .cin (corr_c),
    .sum (fin_s),
    .cout(fin_c)
  );

  assign p[0]         = a[0] & b[0];
  assign p[2*N-2:N]   = fin_s;
  assign p[2*N-1]     = fin_c;
endmodule

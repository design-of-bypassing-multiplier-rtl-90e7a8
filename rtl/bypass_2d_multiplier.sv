// N x N unsigned array (Braun) multiplier with two-dimensional (row and
// column) bypassing.
//
// The carry-save array is the one of the one-dimensional designs (rows
// r = 1..N-1 of N-1 cells, carries down, sums diagonally to the same weight,
// final carry-propagate adder for bits N..2N-1). Every cell is a
// bypass_2d_cell and is skipped when its row bit b_r is 0 (sums pass, carries
// shift one position right) or its column bit a_j is 0 (sums pass, carry 0).
//
// Combining both skips creates a conflict: a bypassed row can shift a 1
// carry into a column whose bit is 0, and a column-bypassed cell would drop
// it. Two measures fix this:
//   * bypass logic in the cells of rows 3..N-1 and columns 1..N-3, the
//     (N-3)^2 positions where such a carry can arrive: such a cell stays
//     active when its row bit is 1 and a carry comes in. Once it is active,
//     any carry it makes reaches the cell below, which therefore also stays
//     active, so the whole carry chain down the column is computed;
//   * for column 0, whose dropped carries would leave the array, the same
//     right-edge correction chain as in the row-bypassing design adds the
//     carry that entered an inactive column-0 cell back into product bit r.
// Rows 1 and 2 and column N-2 never receive such a carry.
//
// The activation rule of the bypass logic, its (N-3)^2 positions and the need
// to repair column 0 at the right edge follow the original 2-D design; the
// exact bypass-logic gates and the use of the row-bypassing correction chain
// for column 0 are this implementation's choices.
//
// Parameters: N operand width (default 8), ADDER last-stage adder (default
// ripple carry).
// Interface: a (multiplicand), b (multiplier) in; p = a*b and the cell
// activity map cell_active (bit (r-1)*(N-1)+j set when cell (r,j) adds) out.
// Purely combinational.
module bypass_2d_multiplier
  import bm_pkg::*;
#(
  parameter int     N     = 8,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  output logic [2*N-1:0]         p,
  output logic [(N-1)*(N-1)-1:0] cell_active
);
  logic [N-1:1] s_edge;
  logic [N-1:2] k_edge;
  logic [N-2:0] fin_a, fin_b, fin_s;
  logic         fin_c, corr_c;

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar j = 0; j < N - 1; j++) begin : g_col
      logic s_i, c_i, s_o, c_o, act;
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

      // Bypass logic only where a shifted carry can meet a zero column bit.
      localparam bit BL = (r >= 3) && (j >= 1) && (j <= N - 3);

      bypass_2d_cell #(.HAS_BL(BL)) u_cell (
        .pp    (a[j] & b[r]),
        .a_bit (a[j]),
        .b_bit (b[r]),
        .s_in  (s_i),
        .c_in  (c_i),
        .c_byp (c_byp),
        .s_out (s_o),
        .c_out (c_o),
        .active(act)
      );

      assign cell_active[(r-1)*(N-1)+j] = act;

      // A cell without bypass logic away from column 0 must never meet an
      // incoming carry while its column is bypassed.
      if (!BL && j != 0) begin : g_chk
        always_comb begin
          assert (!(b[r] && !a[j] && c_i))
            else $error("carry lost at row %0d column %0d", r, j);
        end
      end
    end

    assign s_edge[r] = g_col[0].s_o;
    if (r >= 2) begin : g_k
      assign k_edge[r] = g_col[0].c_i & ~g_col[0].act;
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

  assign p[0]       = a[0] & b[0];
  assign p[2*N-2:N] = fin_s;
  assign p[2*N-1]   = fin_c;
endmodule

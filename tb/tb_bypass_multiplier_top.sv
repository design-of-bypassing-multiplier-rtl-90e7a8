// End-to-end testbench of the Braun multiplier and the three bypassing
// multipliers at their default size (8x8, ripple carry final adder), with no
// parameter overrides.
//
// Every one of the 65536 operand pairs is fed to all four multipliers at
// once; each product is compared with a*b computed by the testbench, and the
// two-dimensional multiplier's activity map is checked (a cell is active only
// if its row bit is 1, and always if its row and column bits are both 1).
// The testbench counts how often each mechanism of the design occurred:
// row bypass, column bypass, bypass-logic activation in the 2-D array, and a
// carry picked up by the right-edge correction chain in the row-bypassing
// and 2-D arrays. A mechanism that never occurred counts as a failure.
//
// As a measure of switching work, the testbench also adds up the active
// adder cells of each array over all pairs. A Braun cell is always active.
// A row-bypassing cell is active when its row bit b_r is 1 and a
// column-bypassing cell when its column bit a_j is 1. A 2-D cell is active
// when td_active says so. Both one-dimensional arrays must use fewer cells
// than the Braun array, and the 2-D array fewer than either of them, which
// is the ranking the original power comparison reports. The multipliers are
// combinational; the product is sampled one time unit after the operands
// change.
module tb_bypass_multiplier_top;
  import bm_pkg::*;

  localparam int N = 8;

  int checks = 0;
  int failures = 0;
  int n_row = 0, n_col = 0, n_bl = 0, n_corr_row = 0, n_corr_2d = 0;
  longint act_braun = 0, act_row = 0, act_col = 0, act_2d = 0;

  logic [N-1:0]           a, b;
  logic [2*N-1:0]         braun_p, row_p, col_p, td_p;
  logic [(N-1)*(N-1)-1:0] td_active;
  logic                   clk;

  bypass_multiplier_top u_top (
    .braun_a(a), .braun_b(b), .braun_p(braun_p),
    .row_a(a), .row_b(b), .row_p(row_p),
    .col_a(a), .col_b(b), .col_p(col_p),
    .td_a(a),  .td_b(b),  .td_p(td_p), .td_active(td_active)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string tag, logic [2*N-1:0] got, logic [2*N-1:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("%s: %0d * %0d gave %0d, expected %0d", tag, a, b, got, expv);
    end
  endtask

  initial begin : stim
    logic [2*N-1:0] expv;
    int bad;
    for (int x = 0; x < (1 << N); x++) begin
      for (int y = 0; y < (1 << N); y++) begin
        a = N'(x);
        b = N'(y);
        #1;
        expv = (2*N)'(a) * (2*N)'(b);
        expect_eq("Braun", braun_p, expv);
        expect_eq("row", row_p, expv);
        expect_eq("column", col_p, expv);
        expect_eq("2-D", td_p, expv);

        bad = 0;
        for (int r = 1; r < N; r++) begin
          for (int j = 0; j < N - 1; j++) begin
            if (td_active[cell_idx(N, r, j)] && !b[r]) bad++;
            if (a[j] && b[r] && !td_active[cell_idx(N, r, j)]) bad++;
            if (td_active[cell_idx(N, r, j)] && !a[j]) n_bl++;
            act_braun++;
            if (b[r]) act_row++;
            if (a[j]) act_col++;
            if (td_active[cell_idx(N, r, j)]) act_2d++;
          end
        end
        checks++;
        if (bad != 0) begin
          failures++;
          $display("2-D activity map wrong for %0d * %0d", a, b);
        end

        if (b[N-1:1] != '1) n_row++;
        if (a[N-2:0] != '1) n_col++;
        if (u_top.u_row.k_edge != 0) n_corr_row++;
        if (u_top.u_2d.k_edge != 0) n_corr_2d++;
      end
    end

    $display("row bypass=%0d column bypass=%0d bypass-logic=%0d correction(row)=%0d correction(2-D)=%0d",
             n_row, n_col, n_bl, n_corr_row, n_corr_2d);
    checks++;
    if (n_row == 0) begin failures++; $display("row bypass never occurred"); end
    checks++;
    if (n_col == 0) begin failures++; $display("column bypass never occurred"); end
    checks++;
    if (n_bl == 0) begin failures++; $display("bypass logic never activated"); end
    checks++;
    if (n_corr_row == 0) begin failures++; $display("row correction never used"); end
    checks++;
    if (n_corr_2d == 0) begin failures++; $display("2-D correction never used"); end

    $display("active adder cells: Braun=%0d row=%0d column=%0d 2-D=%0d",
             act_braun, act_row, act_col, act_2d);
    checks++;
    if (!(act_row < act_braun && act_col < act_braun)) begin
      failures++;
      $display("a one-dimensional bypassing array is not below the Braun array");
    end
    checks++;
    if (!(act_2d < act_row && act_2d < act_col)) begin
      failures++;
      $display("the 2-D array is not below both one-dimensional arrays");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

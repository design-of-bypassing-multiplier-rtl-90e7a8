// Self-checking testbench of the two-dimensional bypassing array multiplier.
//
// The multiplier is combinational, so each operand pair is applied, allowed
// to settle for one time unit and the product compared with a*b computed by
// the testbench's own arithmetic. Sizes 4x4, 5x5 and 8x8 (ripple carry,
// carry lookahead and carry select final adders) are checked exhaustively;
// 16x16 with the three final adders on corner operands and random pairs.
// The cell activity map is checked on every vector: a cell may only be
// active when its row bit is 1 and must be active when its row and column
// bits are both 1. Row bypasses, column bypasses, bypass-logic activations
// (active cells whose column bit is 0) and right-edge corrections are
// counted; each must occur.
// A clocked watchdog ends a run that hangs.
module tb_bypass_2d_multiplier;
  import bm_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_row = 0, n_col = 0, n_bl = 0, n_corr = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] a0, b0;
  logic [7:0] p0;
  logic [8:0] act0;
  bypass_2d_multiplier #(.N(4), .ADDER(ADDER_RCA)) u0 (.a(a0), .b(b0), .p(p0), .cell_active(act0));

  logic [4:0] a1, b1;
  logic [9:0] p1;
  logic [15:0] act1;
  bypass_2d_multiplier #(.N(5), .ADDER(ADDER_RCA)) u1 (.a(a1), .b(b1), .p(p1), .cell_active(act1));

  logic [7:0] a2, b2;
  logic [15:0] p2;
  logic [48:0] act2;
  bypass_2d_multiplier #(.N(8), .ADDER(ADDER_RCA)) u2 (.a(a2), .b(b2), .p(p2), .cell_active(act2));

  logic [7:0] a3, b3;
  logic [15:0] p3;
  logic [48:0] act3;
  bypass_2d_multiplier #(.N(8), .ADDER(ADDER_CLA)) u3 (.a(a3), .b(b3), .p(p3), .cell_active(act3));

  logic [7:0] a4, b4;
  logic [15:0] p4;
  logic [48:0] act4;
  bypass_2d_multiplier #(.N(8), .ADDER(ADDER_CSLA)) u4 (.a(a4), .b(b4), .p(p4), .cell_active(act4));

  logic [15:0] a5, b5;
  logic [31:0] p5;
  logic [224:0] act5;
  bypass_2d_multiplier #(.N(16), .ADDER(ADDER_RCA)) u5 (.a(a5), .b(b5), .p(p5), .cell_active(act5));

  logic [15:0] a6, b6;
  logic [31:0] p6;
  logic [224:0] act6;
  bypass_2d_multiplier #(.N(16), .ADDER(ADDER_CLA)) u6 (.a(a6), .b(b6), .p(p6), .cell_active(act6));

  logic [15:0] a7, b7;
  logic [31:0] p7;
  logic [224:0] act7;
  bypass_2d_multiplier #(.N(16), .ADDER(ADDER_CSLA)) u7 (.a(a7), .b(b7), .p(p7), .cell_active(act7));

  // Number of activity-map violations of an N x N instance; adds the
  // bypass-logic activations to bl.
  function automatic int check_act(int n, logic [63:0] a, logic [63:0] b, logic [255:0] act,
                                   ref int bl);
    int bad = 0;
    for (int r = 1; r < n; r++) begin
      for (int j = 0; j < n - 1; j++) begin
        logic act_rj;
        act_rj = act[cell_idx(n, r, j)];
        if (act_rj && !b[r]) bad++;
        if (a[j] && b[r] && !act_rj) bad++;
        if (act_rj && !a[j]) bl++;
      end
    end
    return bad;
  endfunction

  task automatic score(string tag, int n, logic [63:0] a, logic [63:0] b,
                       logic [127:0] p, logic [255:0] act);
    logic [127:0] expv;
    expv = a * b;
    checks++;
    if (p !== expv) begin
      failures++;
      if (failures < 10) $display("%s: %0d * %0d gave %0d, expected %0d", tag, a, b, p, expv);
    end
    checks++;
    if (check_act(n, a, b, act, n_bl) != 0) begin
      failures++;
      if (failures < 10) $display("%s: wrong activity map for %0d * %0d", tag, a, b);
    end
    for (int r = 1; r < n; r++) if (!b[r]) begin n_row++; break; end
    for (int j = 0; j < n - 1; j++) if (!a[j]) begin n_col++; break; end
  endtask

  initial begin : stim
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a0 = 4'(x);
        b0 = 4'(y);
        #1;
        score("N=4 ADDER_RCA", 4, 64'(a0), 64'(b0), 128'(p0), 256'(act0));
        if (u0.k_edge != 0) n_corr++;
      end
    end
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        a1 = 5'(x);
        b1 = 5'(y);
        #1;
        score("N=5 ADDER_RCA", 5, 64'(a1), 64'(b1), 128'(p1), 256'(act1));
        if (u1.k_edge != 0) n_corr++;
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a2 = 8'(x);
        b2 = 8'(y);
        #1;
        score("N=8 ADDER_RCA", 8, 64'(a2), 64'(b2), 128'(p2), 256'(act2));
        if (u2.k_edge != 0) n_corr++;
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a3 = 8'(x);
        b3 = 8'(y);
        #1;
        score("N=8 ADDER_CLA", 8, 64'(a3), 64'(b3), 128'(p3), 256'(act3));
        if (u3.k_edge != 0) n_corr++;
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a4 = 8'(x);
        b4 = 8'(y);
        #1;
        score("N=8 ADDER_CSLA", 8, 64'(a4), 64'(b4), 128'(p4), 256'(act4));
        if (u4.k_edge != 0) n_corr++;
      end
    end
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin a5 = '1; b5 = '1; end
        1: begin a5 = '0; b5 = '1; end
        2: begin a5 = '1; b5 = '0; end
        3: begin a5 = 16'hAAAA; b5 = 16'h5555; end
        4: begin a5 = 16'h5555; b5 = 16'hAAAA; end
        default: begin
          a5 = 16'($urandom);
          b5 = 16'($urandom);
          // Sparse operands make long bypass chains more likely.
          if (t % 3 == 1) a5 &= 16'($urandom);
          if (t % 3 == 2) b5 &= 16'($urandom);
        end
      endcase
      #1;
      score("N=16 ADDER_RCA", 16, 64'(a5), 64'(b5), 128'(p5), 256'(act5));
      if (u5.k_edge != 0) n_corr++;
    end
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin a6 = '1; b6 = '1; end
        1: begin a6 = '0; b6 = '1; end
        2: begin a6 = '1; b6 = '0; end
        3: begin a6 = 16'hAAAA; b6 = 16'h5555; end
        4: begin a6 = 16'h5555; b6 = 16'hAAAA; end
        default: begin
          a6 = 16'($urandom);
          b6 = 16'($urandom);
          // Sparse operands make long bypass chains more likely.
          if (t % 3 == 1) a6 &= 16'($urandom);
          if (t % 3 == 2) b6 &= 16'($urandom);
        end
      endcase
      #1;
      score("N=16 ADDER_CLA", 16, 64'(a6), 64'(b6), 128'(p6), 256'(act6));
      if (u6.k_edge != 0) n_corr++;
    end
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin a7 = '1; b7 = '1; end
        1: begin a7 = '0; b7 = '1; end
        2: begin a7 = '1; b7 = '0; end
        3: begin a7 = 16'hAAAA; b7 = 16'h5555; end
        4: begin a7 = 16'h5555; b7 = 16'hAAAA; end
        default: begin
          a7 = 16'($urandom);
          b7 = 16'($urandom);
          // Sparse operands make long bypass chains more likely.
          if (t % 3 == 1) a7 &= 16'($urandom);
          if (t % 3 == 2) b7 &= 16'($urandom);
        end
      endcase
      #1;
      score("N=16 ADDER_CSLA", 16, 64'(a7), 64'(b7), 128'(p7), 256'(act7));
      if (u7.k_edge != 0) n_corr++;
    end
    $display("row bypasses=%0d column bypasses=%0d bypass-logic activations=%0d corrections=%0d",
             n_row, n_col, n_bl, n_corr);
    checks++;
    if (n_row == 0) begin
      failures++;
      $display("mechanism n_row never exercised");
    end
    checks++;
    if (n_col == 0) begin
      failures++;
      $display("mechanism n_col never exercised");
    end
    checks++;
    if (n_bl == 0) begin
      failures++;
      $display("mechanism n_bl never exercised");
    end
    checks++;
    if (n_corr == 0) begin
      failures++;
      $display("mechanism n_corr never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

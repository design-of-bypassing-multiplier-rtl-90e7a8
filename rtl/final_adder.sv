// Last-stage adder of the bypassing array multipliers.
//
// The array leaves its upper product bits as a row of sums and a row of
// carries; this W-bit carry-propagate adder merges them. The ADDER parameter
// picks a ripple carry, carry lookahead or carry select adder; all three give
// the same sum and differ only in delay and area.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module final_adder
  import bm_pkg::*;
#(
  parameter int     W     = 7,
  parameter adder_e ADDER = ADDER_RCA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (ADDER == ADDER_CLA) begin : g_cla
    cla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (ADDER == ADDER_CSLA) begin : g_csla
    csla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_rca
    rca_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end
endmodule

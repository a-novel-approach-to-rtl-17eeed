// mod_add_mersenne - modular carry-propagate adder modulo 2^W - 1.
//
// r = |a + b| mod (2^W - 1), always in 0 .. 2^W-2 (zero has a single code,
// the all-ones input code is accepted as a second zero). Two CPAs run in
// parallel, one on a + b and one on a + b + 1; the carry-out of the second
// tells whether a + b >= 2^W - 1, in which case its low W bits (a + b + 1 -
// 2^W) are the result; when a and b are both all-ones the result is forced
// to zero. Purely combinational. The two-adder structure is this
// design's choice; the CPA style follows the chosen adder configuration.
module mod_add_mersenne #(
  parameter int unsigned         W     = 8,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] r
);

  logic [W-1:0] sum0, sum1;
  logic         unused_cout0, cout1;

  cpa #(.W(W), .STYLE(STYLE)) u_add0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(unused_cout0));
  cpa #(.W(W), .STYLE(STYLE)) u_add1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1));

  // The carry-out of a + b is implied by cout1 and not needed for the
  // selection. The one input pair that would leave the all-ones code (a and
  // b both all-ones, i.e. zero plus zero) is caught separately.
  logic both_ones;
  assign both_ones = &(a & b);
  assign r = both_ones ? '0 : (cout1 ? sum1 : sum0);

endmodule

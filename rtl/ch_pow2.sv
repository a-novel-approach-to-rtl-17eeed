// ch_pow2 - arithmetic channel modulo 2^N (residue x1 of the RNS).
//
// op = OP_MUL: r = |a * b| mod 2^N. The N partial products (a << i gated by
//   b[i], truncated to N bits) are reduced by a carry-save array to a
//   (sum, carry) pair, which the final N-bit CPA adds.
// op = OP_ADD: r = |a + b| mod 2^N, the same CPA adding a and b directly.
// Bits above 2^N are simply dropped, so this channel's final adder is a plain
// CPA and is kept in the arithmetic unit. Purely combinational. The partial
// product scheme and the op encoding are this design's choices.
module ch_pow2 #(
  parameter int unsigned         N     = 12,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  rns_pkg::rns_op_e op,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [N-1:0]     r
);

  logic [N-1:0] pp [N];
  logic [N-1:0] ps, pc, fa, fb;
  logic         unused_cout;

  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = b[i] ? (a << i) : '0;
  end

  csa_array #(.W(N), .NOPS(N), .EAC(1'b0)) u_csa (.ops(pp), .s(ps), .c(pc));

  assign fa = (op == rns_pkg::OP_ADD) ? a : ps;
  assign fb = (op == rns_pkg::OP_ADD) ? b : pc;

  cpa #(.W(N), .STYLE(STYLE)) u_cpa (
    .a(fa), .b(fb), .cin(1'b0), .sum(r), .cout(unused_cout));

endmodule

// rns_top - a complete residue number system (RNS) multiply/add unit for the
// moduli set {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}, dynamic range
// M = 2^N (2^(2N+1)-1) (2^(2N)-1).
//
// x = |a * b| mod M (op = OP_MUL) or |a + b| mod M (op = OP_ADD).
// Both operands pass a forward converter; the four residue channels then
// work in parallel and the reverse converter rebuilds the binary result.
// The point of the design is the split of the final adders: the 2^n and
// 2^n+1 channels end in their own final adder, while the 2^(2n+1)-1 and
// 2^n-1 channels stop at a carry-save pair, whose addition is merged into
// the modular adders at the input of the reverse converter.
// Purely combinational, no clock or reset: the result follows the inputs
// after the full path delay (forward converter, channel, reverse converter).
// The channel/converter split follows the design; the forward converters,
// the op select and all inner structures are this design's own.
module rns_top #(
  parameter int unsigned         N         = 12,
  parameter rns_pkg::cpa_style_e CPA_STYLE = rns_pkg::CPA_PREFIX
) (
  input  rns_pkg::rns_op_e op,
  input  logic [5*N:0]     a,
  input  logic [5*N:0]     b,
  output logic [5*N:0]     x
);

  logic [N-1:0] a1, b1, r1, a4, b4, s4, c4;
  logic [2*N:0] a2, b2, s2, c2;
  logic [N:0]   a3, b3, r3;

  rns_forward_converter #(.N(N), .STYLE(CPA_STYLE)) u_fwd_a (
    .x(a), .x1(a1), .x2(a2), .x3(a3), .x4(a4));
  rns_forward_converter #(.N(N), .STYLE(CPA_STYLE)) u_fwd_b (
    .x(b), .x1(b1), .x2(b2), .x3(b3), .x4(b4));

  ch_pow2 #(.N(N), .STYLE(CPA_STYLE)) u_ch1 (.op(op), .a(a1), .b(b1), .r(r1));
  ch_mersenne_csa #(.K(2*N+1)) u_ch2 (.op(op), .a(a2), .b(b2), .s(s2), .c(c2));
  ch_fermat #(.N(N), .STYLE(CPA_STYLE)) u_ch3 (.op(op), .a(a3), .b(b3), .r(r3));
  ch_mersenne_csa #(.K(N)) u_ch4 (.op(op), .a(a4), .b(b4), .s(s4), .c(c4));

  rns_reverse_converter #(.N(N), .STYLE(CPA_STYLE)) u_rev (
    .x1(r1), .s2(s2), .c2(c2), .x3(r3), .s4(s4), .c4(c4), .x(x));

endmodule

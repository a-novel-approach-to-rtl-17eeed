// rns_reverse_converter - residues to binary for the moduli set
// {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}, taking two channels in carry-save form.
//
// The conversion is the three-step New CRT-II scheme:
//   Z = x1 + 2^N * V1,            V1 = |2^(N+1) (x2 - x1)|  mod 2^(2N+1)-1
//   Y = x3 + (2^N + 1) * V2,      V2 = |2^(N-1) (x4 - x3)|  mod 2^N-1
//   X = Z + 2^N (2^(2N+1)-1) V3,  V3 = |2^N (Y - Z)|        mod 2^(2N)-1
// The first modular adders of the converter have the same moduli as the
// channels x2 and x4. Those channels therefore arrive without their own final
// adder, as pairs (s2, c2) and (s4, c4). x2 - x1 becomes s2 + c2 - x1: the
// three terms, each multiplied by the power of two (a left rotation, since
// 2^K = 1 mod 2^K-1), pass an end-around-carry CSA and then a single
// modular CPA. The same is done for s4 + c4 - x3. Negation mod 2^K-1 is bit
// inversion; x3 (0 .. 2^N) is first reduced to N bits by folding its top bit.
// Z needs no adder (V1 is placed above x1), Y is one 2N-bit CPA
// ({V2,V2} + x3), the third stage again uses a CSA on Y, -Z[2N-1:0] and
// -Z[3N:2N] ahead of its modular CPA, and the final X is {({V3,V1} - V3), x1}.
// Output x lies in 0 .. M-1 with M = 2^N (2^(2N+1)-1) (2^(2N)-1).
// Purely combinational.
// Follows the design: the carry-save inputs, the extra CSA and the three
// conversion formulas. This design's own: the multiplier 2^(N+1) in V1 (the
// inverse of 2^N modulo 2^(2N+1)-1), the CSA in the third stage and the
// final subtraction arrangement. Requires N >= 2.
module rns_reverse_converter #(
  parameter int unsigned         N     = 12,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  logic [N-1:0] x1,
  input  logic [2*N:0] s2,
  input  logic [2*N:0] c2,
  input  logic [N:0]   x3,
  input  logic [N-1:0] s4,
  input  logic [N-1:0] c4,
  output logic [5*N:0] x
);

  localparam int unsigned K2 = 2 * N + 1;  // modulus 2^(2N+1)-1
  localparam int unsigned K3 = 2 * N;      // modulus 2^(2N)-1
  localparam int unsigned WW = 4 * N + 1;  // width of X >> N

  // ---- stage 1: V1 = |2^(N+1) (s2 + c2 - x1)| mod 2^(2N+1)-1
  logic [K2-1:0] neg_x1, a_ops [3], a_s, a_c, v1;
  assign neg_x1   = ~K2'(x1);
  assign a_ops[0] = {s2[N-1:0],     s2[2*N:N]};      // rotate left N+1
  assign a_ops[1] = {c2[N-1:0],     c2[2*N:N]};
  assign a_ops[2] = {neg_x1[N-1:0], neg_x1[2*N:N]};

  csa_array #(.W(K2), .NOPS(3), .EAC(1'b1)) u_csa_a (.ops(a_ops), .s(a_s), .c(a_c));
  mod_add_mersenne #(.W(K2), .STYLE(STYLE)) u_add_a (.a(a_s), .b(a_c), .r(v1));

  logic [3*N:0] z;
  assign z = {v1, x1};

  // ---- stage 2: V2 = |2^(N-1) (s4 + c4 - x3)| mod 2^N-1
  logic [N-1:0] x3_red, neg_x3, b_ops [3], b_s, b_c, v2;
  // x3 = 2^N only when its low bits are zero, and 2^N = 1 mod 2^N-1.
  assign x3_red   = {x3[N-1:1], x3[0] | x3[N]};
  assign neg_x3   = ~x3_red;
  assign b_ops[0] = {s4[0],     s4[N-1:1]};          // rotate left N-1
  assign b_ops[1] = {c4[0],     c4[N-1:1]};
  assign b_ops[2] = {neg_x3[0], neg_x3[N-1:1]};

  csa_array #(.W(N), .NOPS(3), .EAC(1'b1)) u_csa_b (.ops(b_ops), .s(b_s), .c(b_c));
  mod_add_mersenne #(.W(N), .STYLE(STYLE)) u_add_b (.a(b_s), .b(b_c), .r(v2));

  // Y = x3 + (2^N + 1) V2 = {V2, V2} + x3, below 2^(2N) - 1.
  logic [K3-1:0] y;
  logic          unused_cout_y;
  cpa #(.W(K3), .STYLE(STYLE)) u_cpa_y (
    .a({v2, v2}), .b(K3'(x3)), .cin(1'b0), .sum(y), .cout(unused_cout_y));

  // ---- stage 3: V3 = |2^N (Y - Z)| mod 2^(2N)-1
  logic [K3-1:0] nz_lo, nz_hi, c_ops [3], c_s, c_c, v3;
  assign nz_lo    = ~z[K3-1:0];
  assign nz_hi    = ~K3'(z[3*N:K3]);
  assign c_ops[0] = {y[N-1:0],     y[K3-1:N]};       // rotate by N
  assign c_ops[1] = {nz_lo[N-1:0], nz_lo[K3-1:N]};
  assign c_ops[2] = {nz_hi[N-1:0], nz_hi[K3-1:N]};

  csa_array #(.W(K3), .NOPS(3), .EAC(1'b1)) u_csa_c (.ops(c_ops), .s(c_s), .c(c_c));
  mod_add_mersenne #(.W(K3), .STYLE(STYLE)) u_add_c (.a(c_s), .b(c_c), .r(v3));

  // ---- X = 2^N * (V3 (2^(2N+1) - 1) + V1) + x1 = {({V3, V1} - V3), x1}
  logic [WW-1:0] w;
  logic          unused_cout_w;
  cpa #(.W(WW), .STYLE(STYLE)) u_cpa_x (
    .a({v3, v1}), .b(~WW'(v3)), .cin(1'b1), .sum(w), .cout(unused_cout_w));

  assign x = {w, x1};

endmodule

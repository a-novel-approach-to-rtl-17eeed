// ch_fermat - arithmetic channel modulo 2^N + 1 (residue x3 of the RNS).
//
// Residues use the normal N+1-bit code 0 .. 2^N.
// op = OP_MUL: the N+1 partial products (a << i gated by b[i]) are reduced by
//   a carry-save array and added by a (2N+1)-bit CPA to the full product P
//   (at most 2^(2N)).
// op = OP_ADD: the same CPA forms a + b.
// The final modular correction (fermat_fold) splits the value into its low
// N bits L and the rest H and returns |L - H| mod (2^N + 1).
// The reverse converter does not begin with a 2^n+1 adder, so this channel
// keeps its final modular adder, as in the design. Purely combinational. The
// multiplier structure and the op encoding are this design's choices.
module ch_fermat #(
  parameter int unsigned         N     = 12,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  rns_pkg::rns_op_e op,
  input  logic [N:0]       a,
  input  logic [N:0]       b,
  output logic [N:0]       r
);

  localparam int unsigned PW = 2 * N + 1;

  logic [PW-1:0] pp [N+1];
  logic [PW-1:0] ps, pc, fa, fb, p;
  logic          unused_cout;

  for (genvar i = 0; i <= N; i++) begin : g_pp
    assign pp[i] = b[i] ? (PW'(a) << i) : '0;
  end

  csa_array #(.W(PW), .NOPS(N+1), .EAC(1'b0)) u_csa (.ops(pp), .s(ps), .c(pc));

  assign fa = (op == rns_pkg::OP_ADD) ? PW'(a) : ps;
  assign fb = (op == rns_pkg::OP_ADD) ? PW'(b) : pc;

  cpa #(.W(PW), .STYLE(STYLE)) u_cpa (
    .a(fa), .b(fb), .cin(1'b0), .sum(p), .cout(unused_cout));

  fermat_fold #(.N(N), .STYLE(STYLE)) u_fold (.l(p[N-1:0]), .h(p[2*N:N]), .r(r));

endmodule

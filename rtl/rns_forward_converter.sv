// rns_forward_converter - binary to residues for the moduli set
// {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}.
//
// x (5N+1 bits) is folded into modulus-wide chunks:
//   x1 = x mod 2^N          the low N bits;
//   x2 = x mod 2^(2N+1)-1   three (2N+1)-bit chunks, end-around-carry CSA and
//                           a modular adder (2^(2N+1) = 1);
//   x4 = x mod 2^N-1        six N-bit chunks, the same way (2^N = 1);
//   x3 = x mod 2^N+1        six N-bit chunks with alternating signs
//                           (2^N = -1); a negated chunk is ~c + 2, so the sum
//                           of the even chunks, the inverted odd chunks and 6
//                           is formed by a CSA and a CPA and then folded.
// Any x is accepted; residues are x mod each modulus. Purely combinational.
// The forward converter is one of the three parts of an RNS system; how it is
// built here is this design's own choice. Requires N >= 3.
module rns_forward_converter #(
  parameter int unsigned         N     = 12,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  logic [5*N:0] x,
  output logic [N-1:0] x1,
  output logic [2*N:0] x2,
  output logic [N:0]   x3,
  output logic [N-1:0] x4
);

  localparam int unsigned K2 = 2 * N + 1;
  localparam int unsigned TW = N + 3;

  logic [3*K2-1:0] xp2;
  logic [6*N-1:0]  xpn;
  logic [K2-1:0]   ops2 [3];
  logic [N-1:0]    ops4 [6];
  logic [TW-1:0]   ops3 [7];
  logic [K2-1:0]   s2, c2;
  logic [N-1:0]    s4, c4;
  logic [TW-1:0]   s3, c3, t3;
  logic            unused_cout;

  if (N < 3) begin : g_bad_size
    $error("rns_forward_converter needs N >= 3");
  end

  assign x1  = x[N-1:0];
  assign xp2 = (3*K2)'(x);
  assign xpn = (6*N)'(x);

  always_comb begin
    logic [N-1:0] chunk;
    for (int j = 0; j < 3; j++) ops2[j] = xp2[j*K2 +: K2];
    for (int j = 0; j < 6; j++) ops4[j] = xpn[j*N +: N];
    for (int j = 0; j < 6; j++) begin
      chunk = xpn[j*N +: N];
      if (j % 2 != 0) chunk = ~chunk;     // N-bit inversion: -c = ~c + 2
      ops3[j] = TW'(chunk);
    end
    ops3[6] = TW'(6);
  end

  // x2: mod 2^(2N+1)-1
  csa_array #(.W(K2), .NOPS(3), .EAC(1'b1)) u_csa2 (.ops(ops2), .s(s2), .c(c2));
  mod_add_mersenne #(.W(K2), .STYLE(STYLE)) u_add2 (.a(s2), .b(c2), .r(x2));

  // x4: mod 2^N-1
  csa_array #(.W(N), .NOPS(6), .EAC(1'b1)) u_csa4 (.ops(ops4), .s(s4), .c(c4));
  mod_add_mersenne #(.W(N), .STYLE(STYLE)) u_add4 (.a(s4), .b(c4), .r(x4));

  // x3: mod 2^N+1
  csa_array #(.W(TW), .NOPS(7), .EAC(1'b0)) u_csa3 (.ops(ops3), .s(s3), .c(c3));
  cpa #(.W(TW), .STYLE(STYLE)) u_cpa3 (
    .a(s3), .b(c3), .cin(1'b0), .sum(t3), .cout(unused_cout));
  fermat_fold #(.N(N), .STYLE(STYLE)) u_fold3 (
    .l(t3[N-1:0]), .h((N+1)'(t3[TW-1:N])), .r(x3));

endmodule

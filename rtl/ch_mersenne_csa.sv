// ch_mersenne_csa - arithmetic channel modulo 2^K - 1 without its final
// modular adder.
//
// This is the channel the RNS design modifies: instead of ending in a slow
// modular CPA, it hands its result to the reverse converter as a redundant
// pair (s, c) with s + c congruent to the result modulo 2^K - 1.
// op = OP_MUL: the K partial products are rotations of a by i places gated
//   by b[i] (2^K = 1, so bits shifted out re-enter at the bottom); an
//   end-around-carry carry-save array reduces them to (s, c).
// op = OP_ADD: the pair is (a, b) itself; the only adder is the one removed.
// Used with K = 2n+1 (channel x2) and K = n (channel x4). Purely
// combinational. The removal of the final adder follows the design; the
// partial-product scheme and the op encoding are this design's own.
module ch_mersenne_csa #(
  parameter int unsigned K = 25
) (
  input  rns_pkg::rns_op_e op,
  input  logic [K-1:0]     a,
  input  logic [K-1:0]     b,
  output logic [K-1:0]     s,
  output logic [K-1:0]     c
);

  logic [K-1:0] pp [K];
  logic [K-1:0] ms, mc;

  // Partial product i: a rotated left by i places, gated by b[i].
  logic [2*K-2:0] aa;
  assign aa = {a, a[K-1:1]};
  for (genvar i = 0; i < K; i++) begin : g_pp
    assign pp[i] = b[i] ? aa[K-1-i +: K] : '0;
  end

  csa_array #(.W(K), .NOPS(K), .EAC(1'b1)) u_csa (.ops(pp), .s(ms), .c(mc));

  assign s = (op == rns_pkg::OP_ADD) ? a : ms;
  assign c = (op == rns_pkg::OP_ADD) ? b : mc;

endmodule

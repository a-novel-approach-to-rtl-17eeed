// csa_array - reduces NOPS W-bit operands to a redundant (sum, carry) pair.
//
// A linear carry-save array: the first two operands seed the pair, and each
// further operand passes one row of 3:2 full adders. The sum vector is the
// bitwise XOR, the carry vector the bitwise majority moved one place up.
//   EAC = 1: the carry out of the top bit re-enters at bit 0 (end-around
//            carry), so s + c = sum of operands modulo 2^W - 1.
//   EAC = 0: the top carry is dropped, so s + c = sum modulo 2^W.
// No carry propagates: the delay is one full adder per row, NOPS-2 rows.
// The carry-save reduction itself is the core of the RNS design; the linear
// (rather than tree) shape is this design's choice.
module csa_array #(
  parameter int unsigned W    = 8,
  parameter int unsigned NOPS = 3,
  parameter bit          EAC  = 1'b1
) (
  input  logic [W-1:0] ops [NOPS],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  if (NOPS < 2 || W < 2) begin : g_bad_size
    $error("csa_array needs NOPS >= 2 and W >= 2");
  end

  always_comb begin
    logic [W-1:0] maj;
    s = ops[0];
    c = ops[1];
    for (int i = 2; i < NOPS; i++) begin
      maj = (s & c) | (s & ops[i]) | (c & ops[i]);
      s   = s ^ c ^ ops[i];
      if (EAC) c = {maj[W-2:0], maj[W-1]};
      else     c = {maj[W-2:0], 1'b0};
    end
  end

endmodule

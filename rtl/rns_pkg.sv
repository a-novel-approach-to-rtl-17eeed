// rns_pkg - types shared by the residue number system (RNS) datapath.
//
// The design works on the four-modulus set {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}.
// Every carry-propagate adder in it can be built in one of two styles: a
// ripple chain of full adders or a parallel prefix (Kogge-Stone) network.
// Both styles are the two adder configurations the design is evaluated in;
// the choice of Kogge-Stone as the prefix network is this design's own.
// The op encoding (multiply / add) is likewise this design's choice.
package rns_pkg;

  // Carry-propagate adder implementation style.
  typedef enum logic {
    CPA_RIPPLE = 1'b0,  // full-adder ripple chain
    CPA_PREFIX = 1'b1   // Kogge-Stone parallel prefix
  } cpa_style_e;

  // Operation of the arithmetic channels.
  typedef enum logic {
    OP_MUL = 1'b0,
    OP_ADD = 1'b1
  } rns_op_e;

  // Width of a binary value covering the dynamic range
  // M = 2^n (2^(2n+1)-1) (2^(2n)-1) < 2^(5n+1).
  function automatic int unsigned bin_width(int unsigned n);
    return 5 * n + 1;
  endfunction

endpackage

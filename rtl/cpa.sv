// cpa - W-bit carry-propagate adder: {cout, sum} = a + b + cin.
//
// STYLE selects the implementation:
//   CPA_RIPPLE  a chain of full adders (carry ripples through W cells);
//   CPA_PREFIX  a Kogge-Stone parallel prefix network: bit generate and
//               propagate signals are combined over ceil(log2 W) levels, the
//               carry-in entering as the generate of a virtual bit -1.
// Both are purely combinational; the result is valid one adder delay after
// the inputs. The two styles are the two adder configurations in which the
// RNS design is evaluated; the Kogge-Stone topology is this design's choice.
module cpa #(
  parameter int unsigned         W     = 8,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  if (STYLE == rns_pkg::CPA_RIPPLE) begin : g_ripple
    logic [W:0] c;
    always_comb begin
      c[0] = cin;
      for (int i = 0; i < W; i++) begin
        sum[i]   = a[i] ^ b[i] ^ c[i];
        c[i+1]   = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
      end
    end
    assign cout = c[W];
  end else begin : g_prefix
    // Position 0 is the carry-in, positions 1..W are the operand bits.
    // Level l combines each position with the one 2^l below it. Positions
    // below 2^l already span down to the carry-in: their g is final and their
    // p is never read again, so p may lose them.
    localparam int unsigned L = $clog2(W + 1);
    logic [W:0] g [L+1];
    logic [W:0] p [L+1];
    assign g[0] = {a & b, cin};
    assign p[0] = {a ^ b, 1'b0};
    for (genvar l = 0; l < L; l++) begin : g_level
      localparam int unsigned D = 1 << l;
      assign g[l+1] = g[l] | (p[l] & (g[l] << D));
      assign p[l+1] = p[l] & (p[l] << D);
    end
    // g[L][i] is the carry into operand bit i (position i+1).
    assign sum  = p[0][W:1] ^ g[L][W-1:0];
    assign cout = g[L][W];
  end

endmodule

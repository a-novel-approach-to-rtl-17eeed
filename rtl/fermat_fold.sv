// fermat_fold - final modular correction modulo 2^N + 1.
//
// A value V = H * 2^N + L is congruent to L - H modulo 2^N + 1, because
// 2^N = -1. This block returns r = |L - H| mod (2^N + 1) in 0 .. 2^N, for
// L < 2^N and H <= 2^N. One CPA forms L - H (as L + ~H + 1); if it borrows,
// a second CPA adds 2^N + 1 back. Purely combinational. It is the final
// modular adder of the 2^n+1 channel; its structure is this design's choice.
module fermat_fold #(
  parameter int unsigned         N     = 12,
  parameter rns_pkg::cpa_style_e STYLE = rns_pkg::CPA_PREFIX
) (
  input  logic [N-1:0] l,
  input  logic [N:0]   h,
  output logic [N:0]   r
);

  localparam logic [N:0] MOD = {1'b1, {(N-1){1'b0}}, 1'b1};  // 2^N + 1

  logic [N:0] diff, wrapped;
  logic       no_borrow, unused_cout;

  cpa #(.W(N+1), .STYLE(STYLE)) u_sub (
    .a({1'b0, l}), .b(~h), .cin(1'b1), .sum(diff), .cout(no_borrow));
  cpa #(.W(N+1), .STYLE(STYLE)) u_wrap (
    .a(diff), .b(MOD), .cin(1'b0), .sum(wrapped), .cout(unused_cout));

  assign r = no_borrow ? diff : wrapped;

endmodule

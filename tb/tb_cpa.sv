// tb_cpa - checks the carry-propagate adder in both styles.
//
// Instances: ripple and Kogge-Stone prefix at W = 8 (all a, b pairs, both
// carry-ins) and at W = 41 (random and carry-chain corner operands, a width
// whose prefix network has a level spanning 32 positions). Each {cout, sum}
// is compared with a + b + cin formed in 64-bit integer arithmetic.
// Combinational: checked one time step after each vector.
module tb_cpa;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, sr8, sp8;
  logic [40:0] aw, bw, srw, spw;
  logic        cin, cr8, cp8, crw, cpw;

  cpa #(.W(8),  .STYLE(rns_pkg::CPA_RIPPLE)) u_r8 (.a(a8), .b(b8), .cin(cin), .sum(sr8), .cout(cr8));
  cpa #(.W(8),  .STYLE(rns_pkg::CPA_PREFIX)) u_p8 (.a(a8), .b(b8), .cin(cin), .sum(sp8), .cout(cp8));
  cpa #(.W(41), .STYLE(rns_pkg::CPA_RIPPLE)) u_rw (.a(aw), .b(bw), .cin(cin), .sum(srw), .cout(crw));
  cpa #(.W(41), .STYLE(rns_pkg::CPA_PREFIX)) u_pw (.a(aw), .b(bw), .cin(cin), .sum(spw), .cout(cpw));

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h expected %0h", what, got, expv);
    end
  endtask

  localparam int unsigned NWIDE = 20000;

  initial begin
    logic [63:0] e8, ew;
    a8 = '0; b8 = '0; aw = '0; bw = '0; cin = 1'b0;
    for (int i = 0; i < 2 * 65536; i++) begin
      @(posedge clk);
      a8 = 8'(i); b8 = 8'(i >> 8); cin = i[16];
      #1;
      e8 = 64'(a8) + 64'(b8) + 64'(cin);
      check("ripple8", {55'd0, cr8, sr8}, e8);
      check("prefix8", {55'd0, cp8, sp8}, e8);
    end
    for (int i = 0; i < NWIDE; i++) begin
      @(posedge clk);
      aw = 41'({$urandom, $urandom});
      bw = 41'({$urandom, $urandom});
      if (i % 4 == 1) bw = ~aw;                 // full propagate chain
      if (i % 4 == 2) bw = 41'(0) - aw;         // carry out of every bit
      cin = $urandom_range(0, 1) != 0;
      #1;
      ew = 64'(aw) + 64'(bw) + 64'(cin);
      check("ripple41", {22'd0, crw, srw}, ew);
      check("prefix41", {22'd0, cpw, spw}, ew);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 65536 + NWIDE + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

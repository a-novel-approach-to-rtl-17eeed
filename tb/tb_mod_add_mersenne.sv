// tb_mod_add_mersenne - checks the modulo 2^W-1 adder.
//
// W = 7 with both styles: every pair of 7-bit codes (including the all-ones
// code for zero); W = 25 (the 2^(2n+1)-1 width at n = 12), prefix style:
// random pairs plus pairs summing to exactly 2^W-1 and 2^(W+1)-2. The result
// must equal (a + b) % (2^W-1) and so never be the all-ones code.
// Combinational.
module tb_mod_add_mersenne;
  localparam int unsigned NWIDE = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [6:0]  a7, b7, r7r, r7p;
  logic [24:0] aw, bw, rw;

  mod_add_mersenne #(.W(7),  .STYLE(rns_pkg::CPA_RIPPLE)) u_r7 (.a(a7), .b(b7), .r(r7r));
  mod_add_mersenne #(.W(7),  .STYLE(rns_pkg::CPA_PREFIX)) u_p7 (.a(a7), .b(b7), .r(r7p));
  mod_add_mersenne #(.W(25), .STYLE(rns_pkg::CPA_PREFIX)) u_pw (.a(aw), .b(bw), .r(rw));

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    longint m;
    a7 = '0; b7 = '0; aw = '0; bw = '0;
    for (int i = 0; i < 128 * 128; i++) begin
      @(posedge clk);
      a7 = 7'(i); b7 = 7'(i >> 7);
      #1;
      check("ripple7", longint'(r7r), (longint'(a7) + longint'(b7)) % 127);
      check("prefix7", longint'(r7p), (longint'(a7) + longint'(b7)) % 127);
    end
    m = (longint'(1) << 25) - 1;
    for (int i = 0; i < NWIDE; i++) begin
      @(posedge clk);
      aw = 25'($urandom);
      case (i % 4)
        0: bw = 25'(m - longint'(aw));   // sum = 2^W-1
        1: bw = '1;
        default: bw = 25'($urandom);
      endcase
      if (i % 16 == 3) aw = '1;
      #1;
      check("prefix25", longint'(rw), (longint'(aw) + longint'(bw)) % m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (128 * 128 + NWIDE + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

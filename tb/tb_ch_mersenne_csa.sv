// tb_ch_mersenne_csa - checks the channel without final adder modulo 2^K-1
// at K = 25 (2^(2n+1)-1 for n = 12) and K = 12 (2^n-1 for n = 12).
//
// Random and corner residues (0, 1, 2^K-2, and the all-ones code of zero)
// with op = multiply and add. The channel's redundant pair must satisfy
// (s + c) % (2^K-1) = (a op b) % (2^K-1), formed here. It also checks that
// the pair is really redundant in some cases (s + c >= 2^K-1 occurs), which
// is what the converter's extra CSA has to absorb. Combinational.
module tb_ch_mersenne_csa;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rns_pkg::rns_op_e op;
  logic [24:0] a2, b2, s2, c2;
  logic [11:0] a4, b4, s4, c4;

  ch_mersenne_csa             dut2 (.op(op), .a(a2), .b(b2), .s(s2), .c(c2));
  ch_mersenne_csa #(.K(12))   dut4 (.op(op), .a(a4), .b(b4), .s(s4), .c(c4));

  int checks = 0, failures = 0, wraps = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d got %0d expected %0d", what, op, got, expv);
    end
  endtask

  function automatic longint pick(input int k);
    case ($urandom_range(0, 7))
      0: return 0;
      1: return 1;
      2: return (longint'(1) << k) - 2;
      3: return (longint'(1) << k) - 1;   // all-ones: second code of zero
      default: return longint'($urandom) % ((longint'(1) << k) - 1);
    endcase
  endfunction

  initial begin
    longint m2, m4;
    m2 = (longint'(1) << 25) - 1;
    m4 = (longint'(1) << 12) - 1;
    op = rns_pkg::OP_MUL; a2 = '0; b2 = '0; a4 = '0; b4 = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      op = (i % 3 == 2) ? rns_pkg::OP_ADD : rns_pkg::OP_MUL;
      a2 = 25'(pick(25)); b2 = 25'(pick(25));
      a4 = 12'(pick(12)); b4 = 12'(pick(12));
      #1;
      if (op == rns_pkg::OP_MUL) begin
        check("mul25", (longint'(s2) + longint'(c2)) % m2, (longint'(a2) * longint'(b2)) % m2);
        check("mul12", (longint'(s4) + longint'(c4)) % m4, (longint'(a4) * longint'(b4)) % m4);
      end else begin
        check("add25", (longint'(s2) + longint'(c2)) % m2, (longint'(a2) + longint'(b2)) % m2);
        check("add12", (longint'(s4) + longint'(c4)) % m4, (longint'(a4) + longint'(b4)) % m4);
      end
      if (longint'(s2) + longint'(c2) >= m2) wraps++;
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

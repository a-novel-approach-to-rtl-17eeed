// tb_ch_fermat - checks the modulo 2^N+1 channel (default N = 12, prefix
// CPA) and a ripple-CPA instance at N = 4 over all residue pairs.
//
// Residues are 0 .. 2^N (N+1 bits). Random and corner values (0, 1, 2^N-1,
// 2^N) with op = multiply and add; r is compared with (a op b) % (2^N+1)
// formed here. Combinational.
module tb_ch_fermat;
  localparam int unsigned N = 12;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rns_pkg::rns_op_e op;
  logic [N:0] a, b, r;
  logic [4:0] a4, b4, r4;

  ch_fermat dut (.op(op), .a(a), .b(b), .r(r));
  ch_fermat #(.N(4), .STYLE(rns_pkg::CPA_RIPPLE)) dut4 (.op(op), .a(a4), .b(b4), .r(r4));

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d got %0d expected %0d", what, op, got, expv);
    end
  endtask

  function automatic longint pick();
    case ($urandom_range(0, 6))
      0: return 0;
      1: return 1;
      2: return (longint'(1) << N) - 1;
      3: return longint'(1) << N;
      default: return longint'($urandom) % ((longint'(1) << N) + 1);
    endcase
  endfunction

  initial begin
    longint m, i4, j4;
    m = (longint'(1) << N) + 1;
    op = rns_pkg::OP_MUL; a = '0; b = '0; a4 = '0; b4 = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      op = (i % 2 == 0) ? rns_pkg::OP_MUL : rns_pkg::OP_ADD;
      a = (N+1)'(pick()); b = (N+1)'(pick());
      i4 = longint'((i >> 1) % 17); j4 = longint'(((i >> 1) / 17) % 17);
      a4 = 5'(i4); b4 = 5'(j4);
      #1;
      if (op == rns_pkg::OP_MUL) begin
        check("mul12", longint'(r), (longint'(a) * longint'(b)) % m);
        check("mul4", longint'(r4), (i4 * j4) % 17);
      end else begin
        check("add12", longint'(r), (longint'(a) + longint'(b)) % m);
        check("add4", longint'(r4), (i4 + j4) % 17);
      end
    end
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

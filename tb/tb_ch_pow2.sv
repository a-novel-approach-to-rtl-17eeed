// tb_ch_pow2 - checks the modulo 2^N channel (default N = 12, prefix CPA)
// and a ripple-CPA instance at N = 5.
//
// Random and corner residues (0, 1, 2^N-1) with op = multiply and add; r is
// compared with (a*b) % 2^N or (a+b) % 2^N formed here. At N = 5 all pairs
// are applied in both modes. Combinational.
module tb_ch_pow2;
  localparam int unsigned N = 12;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rns_pkg::rns_op_e op;
  logic [N-1:0] a, b, r;
  logic [4:0]   a5, b5, r5;

  ch_pow2 dut (.op(op), .a(a), .b(b), .r(r));
  ch_pow2 #(.N(5), .STYLE(rns_pkg::CPA_RIPPLE)) dut5 (.op(op), .a(a5), .b(b5), .r(r5));

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d got %0d expected %0d", what, op, got, expv);
    end
  endtask

  function automatic logic [N-1:0] pick();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return '1;
      2: return N'(1);
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    op = rns_pkg::OP_MUL; a = '0; b = '0; a5 = '0; b5 = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      op = (i % 2 == 0) ? rns_pkg::OP_MUL : rns_pkg::OP_ADD;
      a = pick(); b = pick();
      a5 = 5'(i >> 1); b5 = 5'(i >> 6);
      #1;
      if (op == rns_pkg::OP_MUL) begin
        check("mul12", longint'(r), (longint'(a) * longint'(b)) % (longint'(1) << N));
        if (i < 2048) check("mul5", longint'(r5), (longint'(a5) * longint'(b5)) % 32);
      end else begin
        check("add12", longint'(r), (longint'(a) + longint'(b)) % (longint'(1) << N));
        if (i < 2048) check("add5", longint'(r5), (longint'(a5) + longint'(b5)) % 32);
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

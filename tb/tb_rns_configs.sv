// tb_rns_configs - runs the RNS unit in the other evaluated configurations:
// n = 10 and n = 12, each with ripple (full-adder) CPAs, and n = 10 with
// parallel prefix CPAs (n = 12 with prefix CPAs is the default and has its
// own testbench).
//
// Each instance gets random and corner operands below its dynamic range
// M(n) = 2^n (2^(2n+1)-1) (2^(2n)-1) with op = multiply or add, and its
// result is compared with |a op b| mod M(n) formed here with 128-bit
// integer arithmetic. Combinational: checked one time step after each vector.
module tb_rns_configs;
  localparam int unsigned NVEC = 10000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rns_pkg::rns_op_e op;
  logic [50:0] a10, b10, x10r, x10p;
  logic [60:0] a12, b12, x12r;

  rns_top #(.N(10), .CPA_STYLE(rns_pkg::CPA_RIPPLE)) u_10r (.op(op), .a(a10), .b(b10), .x(x10r));
  rns_top #(.N(10), .CPA_STYLE(rns_pkg::CPA_PREFIX)) u_10p (.op(op), .a(a10), .b(b10), .x(x10p));
  rns_top #(.N(12), .CPA_STYLE(rns_pkg::CPA_RIPPLE)) u_12r (.op(op), .a(a12), .b(b12), .x(x12r));

  int checks = 0, failures = 0;

  function automatic logic [127:0] range_m(input int n);
    return (128'(1) << n) * ((128'(1) << (2*n+1)) - 1) * ((128'(1) << (2*n)) - 1);
  endfunction

  function automatic logic [127:0] pick(input logic [127:0] m);
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    case ($urandom_range(0, 5))
      0: return v % 128'(4);
      1: return m - 1 - v % 128'(4);
      default: return v % m;
    endcase
  endfunction

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d got %0d expected %0d", what, op, got, expv);
    end
  endtask

  initial begin
    logic [127:0] m10, m12, va, vb, wa, wb;
    m10 = range_m(10);
    m12 = range_m(12);
    op = rns_pkg::OP_MUL; a10 = '0; b10 = '0; a12 = '0; b12 = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      op = (i % 2 == 0) ? rns_pkg::OP_MUL : rns_pkg::OP_ADD;
      va = pick(m10); vb = pick(m10); wa = pick(m12); wb = pick(m12);
      a10 = 51'(va); b10 = 51'(vb); a12 = 61'(wa); b12 = 61'(wb);
      #1;
      if (op == rns_pkg::OP_MUL) begin
        check("n10 ripple", 128'(x10r), (va * vb) % m10);
        check("n10 prefix", 128'(x10p), (va * vb) % m10);
        check("n12 ripple", 128'(x12r), (wa * wb) % m12);
      end else begin
        check("n10 ripple", 128'(x10r), (va + vb) % m10);
        check("n10 prefix", 128'(x10p), (va + vb) % m10);
        check("n12 ripple", 128'(x12r), (wa + wb) % m12);
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

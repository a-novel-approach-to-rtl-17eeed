// tb_rns_top - end-to-end check of the RNS multiply/add unit.
//
// Drives binary operands a and b with op = multiply or add and compares x
// with |a * b| mod M or |a + b| mod M computed here with 128-bit integer
// arithmetic, independently of the residue datapath. Operands are directed
// corner values (0, 1, M-1, 2^k, values whose 2^n+1 residue is 2^n) and
// $urandom values. It also counts, through hierarchical references, how
// often the design's special cases occur and fails if one never does:
// multiply and add mode, a carry-save pair of the 2^(2n+1)-1 and of the
// 2^n-1 channel whose sum wraps past the modulus, a 2^n+1 channel result of
// 2^n (the code that needs n+1 bits) and a zero result.
// The unit is combinational: each vector is applied on a clock edge and
// checked one time step later, so the latency checked is zero cycles.
// Runs at the default parameters (N = 12, parallel prefix adders).
module tb_rns_top;
  localparam int unsigned N  = 12;
  localparam int unsigned XW = 5 * N + 1;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rns_pkg::rns_op_e op;
  logic [XW-1:0] a, b, x;

  rns_top dut (.op(op), .a(a), .b(b), .x(x));

  localparam logic [127:0] M1 = 128'(1) << N;
  localparam logic [127:0] M2 = (128'(1) << (2*N+1)) - 1;
  localparam logic [127:0] M3 = (128'(1) << N) + 1;
  localparam logic [127:0] M4 = (128'(1) << N) - 1;
  localparam logic [127:0] M  = M1 * M2 * M3 * M4;

  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0, n_wrap2 = 0, n_wrap4 = 0, n_fermat_top = 0, n_zero = 0;

  function automatic logic [XW-1:0] rnd_op();
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    case ($urandom_range(0, 7))
      0: return XW'(v % 128'(16));
      1: return XW'(M - 1 - (v % 128'(4)));
      2: return XW'(128'(1) << (v % 128'(XW)));
      3: return XW'(M3 * (v % (M / M3)) - 1);   // residue 2^n mod 2^n+1
      default: return XW'(v % M);
    endcase
  endfunction

  task automatic apply(input rns_pkg::rns_op_e o, input logic [XW-1:0] va, input logic [XW-1:0] vb);
    logic [127:0] expv;
    @(posedge clk);
    op = o; a = va; b = vb;
    #1;
    if (o == rns_pkg::OP_MUL) expv = (128'(va) * 128'(vb)) % M;
    else                      expv = (128'(va) + 128'(vb)) % M;
    checks++;
    if (128'(x) != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%0d b=%0d x=%0d expected %0d", o, va, vb, x, expv);
    end
    if (o == rns_pkg::OP_MUL) n_mul++; else n_add++;
    if (128'(dut.s2) + 128'(dut.c2) >= M2) n_wrap2++;
    if (128'(dut.s4) + 128'(dut.c4) >= M4) n_wrap4++;
    if (128'(dut.r3) == M3 - 1) n_fermat_top++;
    if (expv == 0) n_zero++;
  endtask

  initial begin
    op = rns_pkg::OP_MUL; a = '0; b = '0;
    apply(rns_pkg::OP_MUL, '0, '0);
    apply(rns_pkg::OP_MUL, XW'(M - 1), XW'(M - 1));
    apply(rns_pkg::OP_ADD, XW'(M - 1), XW'(1));
    apply(rns_pkg::OP_ADD, XW'(M3 - 1), '0);
    apply(rns_pkg::OP_MUL, XW'(M3 - 1), XW'(1));
    apply(rns_pkg::OP_MUL, '1, '1);
    apply(rns_pkg::OP_ADD, '1, '1);
    for (int i = 0; i < NVEC; i++)
      apply($urandom_range(0, 1) != 0 ? rns_pkg::OP_ADD : rns_pkg::OP_MUL, rnd_op(), rnd_op());
    $display("events: mul=%0d add=%0d wrap2=%0d wrap4=%0d fermat_2^n=%0d zero=%0d",
             n_mul, n_add, n_wrap2, n_wrap4, n_fermat_top, n_zero);
    checks++; if (n_mul == 0)        failures++;
    checks++; if (n_add == 0)        failures++;
    checks++; if (n_wrap2 == 0)      failures++;
    checks++; if (n_wrap4 == 0)      failures++;
    checks++; if (n_fermat_top == 0) failures++;
    checks++; if (n_zero == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

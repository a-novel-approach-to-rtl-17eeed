// tb_rns_forward_converter - checks binary-to-residue conversion.
//
// Random and corner 5N+1-bit inputs (0, all-ones, powers of two, values just
// below multiples of each modulus) are applied; every residue output is
// compared with x % m computed here for the four moduli 2^N, 2^(2N+1)-1,
// 2^N+1 and 2^N-1. Default size N = 12. Combinational: checked one time step
// after each vector.
module tb_rns_forward_converter;
  localparam int unsigned N  = 12;
  localparam int unsigned XW = 5 * N + 1;
  localparam int unsigned NVEC = 5000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [XW-1:0] x;
  logic [N-1:0]  x1, x4;
  logic [2*N:0]  x2;
  logic [N:0]    x3;

  rns_forward_converter dut (.x(x), .x1(x1), .x2(x2), .x3(x3), .x4(x4));

  localparam logic [127:0] M1 = 128'(1) << N;
  localparam logic [127:0] M2 = (128'(1) << (2*N+1)) - 1;
  localparam logic [127:0] M3 = (128'(1) << N) + 1;
  localparam logic [127:0] M4 = (128'(1) << N) - 1;

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d expected %0d", what, x, got, expv);
    end
  endtask

  initial begin
    logic [127:0] v, mm;
    x = '0;
    for (int i = 0; i < NVEC; i++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      case (i % 8)
        0: v = 128'(i / 8);
        1: v = '1;
        2: v = 128'(1) << (i % XW);
        3: begin
             mm = (i % 3 == 0) ? M2 : (i % 3 == 1) ? M3 : M4;
             v = mm * (v % ((128'(1) << XW) / mm)) + ((i & 16) != 0 ? mm - 1 : 0);
           end
        default: ;
      endcase
      @(posedge clk);
      x = XW'(v);
      #1;
      check("x1", 128'(x1), 128'(x) % M1);
      check("x2", 128'(x2), 128'(x) % M2);
      check("x3", 128'(x3), 128'(x) % M3);
      check("x4", 128'(x4), 128'(x) % M4);
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

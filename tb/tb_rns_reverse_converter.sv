// tb_rns_reverse_converter - checks the reverse converter on its own.
//
// For random X in 0 .. M-1 the residues x1, x3 are formed here with the %
// operator, and x2, x4 are split into a random carry-save pair (s, c) with
// s + c congruent to the residue (including pairs whose sum wraps past the
// modulus and all-ones codes). The converter output must equal X.
// Runs at N = 4 and N = 12; combinational, checked one time step after
// each vector is applied.
module tb_rns_reverse_converter;
  localparam int unsigned NVEC = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // One converter instance per size under test.
  logic [3:0]  x1_a;  logic [8:0]  s2_a, c2_a; logic [4:0]  x3_a; logic [3:0]  s4_a, c4_a; logic [20:0] x_a;
  logic [11:0] x1_b;  logic [24:0] s2_b, c2_b; logic [12:0] x3_b; logic [11:0] s4_b, c4_b; logic [60:0] x_b;

  rns_reverse_converter #(.N(4))  dut_a (.x1(x1_a), .s2(s2_a), .c2(c2_a), .x3(x3_a), .s4(s4_a), .c4(c4_a), .x(x_a));
  rns_reverse_converter #(.N(12)) dut_b (.x1(x1_b), .s2(s2_b), .c2(c2_b), .x3(x3_b), .s4(s4_b), .c4(c4_b), .x(x_b));

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction


  task automatic run(input int n);
    logic [127:0] m1, m2, m3, m4, mm, xv, r2, r4, s2, c2, s4, c4, got;
    m1 = 128'(1) << n;
    m2 = (128'(1) << (2*n+1)) - 1;
    m3 = (128'(1) << n) + 1;
    m4 = (128'(1) << n) - 1;
    mm = m1 * m2 * m3 * m4;
    for (int i = 0; i < NVEC; i++) begin
      case (i % 5)
        0: xv = rnd128() % 128'(8);
        1: xv = mm - 1 - rnd128() % 128'(8);
        default: xv = rnd128() % mm;
      endcase
      r2 = xv % m2;
      r4 = xv % m4;
      s2 = rnd128() % (m2 + 1);                // any k-bit code
      c2 = (r2 + m2 - (s2 % m2)) % m2;
      if (i % 3 == 0 && c2 == 0) c2 = m2;      // all-ones code for zero
      s4 = rnd128() % (m4 + 1);
      c4 = (r4 + m4 - (s4 % m4)) % m4;
      if (i % 7 == 0 && c4 == 0) c4 = m4;
      @(posedge clk);
      if (n == 4) begin
        x1_a = 4'(xv % m1); x3_a = 5'(xv % m3);
        s2_a = 9'(s2); c2_a = 9'(c2); s4_a = 4'(s4); c4_a = 4'(c4);
      end else begin
        x1_b = 12'(xv % m1); x3_b = 13'(xv % m3);
        s2_b = 25'(s2); c2_b = 25'(c2); s4_b = 12'(s4); c4_b = 12'(c4);
      end
      #1;
      got = (n == 4) ? 128'(x_a) : 128'(x_b);
      checks++;
      if (got != xv) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d X=%0d got %0d", n, xv, got);
      end
    end
  endtask

  initial begin
    x1_a = '0; s2_a = '0; c2_a = '0; x3_a = '0; s4_a = '0; c4_a = '0;
    x1_b = '0; s2_b = '0; c2_b = '0; x3_b = '0; s4_b = '0; c4_b = '0;
    run(4);
    run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

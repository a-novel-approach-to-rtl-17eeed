// tb_csa_array - checks the carry-save array with and without end-around
// carry.
//
// Instances: W = 9 with 3 operands (EAC, modulus 2^9-1), W = 12 with 12
// operands (EAC, modulus 2^12-1) and W = 10 with 5 operands (no EAC, modulus
// 2^10). For random operands, including all-ones codes, s + c must be
// congruent to the operand sum modulo the instance's modulus; the sum is
// formed here in integer arithmetic. Combinational.
module tb_csa_array;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]  o3 [3];
  logic [11:0] o12 [12];
  logic [9:0]  o5 [5];
  logic [8:0]  s3, c3;
  logic [11:0] s12, c12;
  logic [9:0]  s5, c5;

  csa_array #(.W(9),  .NOPS(3),  .EAC(1'b1)) u_a (.ops(o3),  .s(s3),  .c(c3));
  csa_array #(.W(12), .NOPS(12), .EAC(1'b1)) u_b (.ops(o12), .s(s12), .c(c12));
  csa_array #(.W(10), .NOPS(5),  .EAC(1'b0)) u_c (.ops(o5),  .s(s5),  .c(c5));

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    longint t3, t12, t5;
    foreach (o3[k]) o3[k] = '0;
    foreach (o12[k]) o12[k] = '0;
    foreach (o5[k]) o5[k] = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      t3 = 0; t12 = 0; t5 = 0;
      for (int k = 0; k < 3; k++) begin
        o3[k] = (i % 5 == 0) ? '1 : 9'($urandom);
        t3 += longint'(o3[k]);
      end
      for (int k = 0; k < 12; k++) begin
        o12[k] = (i % 7 == k) ? '1 : 12'($urandom);
        t12 += longint'(o12[k]);
      end
      for (int k = 0; k < 5; k++) begin
        o5[k] = 10'($urandom);
        t5 += longint'(o5[k]);
      end
      #1;
      check("eac9",  (longint'(s3)  + longint'(c3))  % 511,  t3 % 511);
      check("eac12", (longint'(s12) + longint'(c12)) % 4095, t12 % 4095);
      check("plain10", (longint'(s5) + longint'(c5)) % 1024, t5 % 1024);
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

// tb_fermat_fold - checks the modulo 2^N+1 folding step.
//
// For N = 12 (prefix CPAs) and N = 4 (ripple CPAs, all inputs), r must equal
// (L - H) mod (2^N+1) for L in 0 .. 2^N-1 and H in 0 .. 2^N, the result
// being formed here in integer arithmetic. Combinational.
module tb_fermat_fold;
  localparam int unsigned NVEC = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] l12;
  logic [12:0] h12, r12;
  logic [3:0]  l4;
  logic [4:0]  h4, r4;

  fermat_fold                                     dut12 (.l(l12), .h(h12), .r(r12));
  fermat_fold #(.N(4), .STYLE(rns_pkg::CPA_RIPPLE)) dut4 (.l(l4), .h(h4), .r(r4));

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    longint vl, vh, vl4, vh4;
    l12 = '0; h12 = '0; l4 = '0; h4 = '0;
    for (int i = 0; i < NVEC; i++) begin
      vl = longint'($urandom_range(0, 4095));
      vh = (i % 5 == 0) ? 4096 : longint'($urandom_range(0, 4096));
      vl4 = longint'(i % 16);
      vh4 = longint'((i / 16) % 17);
      @(posedge clk);
      l12 = 12'(vl); h12 = 13'(vh); l4 = 4'(vl4); h4 = 5'(vh4);
      #1;
      check("n12", longint'(r12), (vl - vh + 4097) % 4097);
      check("n4",  longint'(r4),  (vl4 - vh4 + 17) % 17);
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

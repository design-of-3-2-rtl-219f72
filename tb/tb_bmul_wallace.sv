// Self-checking testbench for the N x N bit Wallace multiplier with (7,3)
// counters, in both full-adder styles: corner cases and random operands,
// compared with the integer product. Prints the cell counts of the tree.
module tb_bmul_wallace;
  localparam int unsigned N    = 12;
  localparam int          NVEC = 4000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p14, p28;
  int checks = 0, failures = 0;

  bmul_wallace #(.N(N), .FA_STYLE(0)) dut   (.a(a), .b(b), .p(p14));
  bmul_wallace #(.N(N), .FA_STYLE(1)) dut28 (.a(a), .b(b), .p(p28));

  task automatic check(input int unsigned x, input int unsigned y);
    longint unsigned want;
    a = N'(x);
    b = N'(y);
    #1;
    want = longint'(a) * longint'(b);
    checks += 2;
    if (longint'(p14) != want) begin
      failures++;
      if (failures < 10) $display("FAIL 14T %0d * %0d: got %0d", a, b, p14);
    end
    if (longint'(p28) != want) begin
      failures++;
      if (failures < 10) $display("FAIL 28T %0d * %0d: got %0d", a, b, p28);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $display("tree: %0d stages, %0d AND gates, %0d (7,3), %0d (3,2), %0d half adders",
             dut.STAGE_COUNT, dut.AND_COUNT, dut.C73_COUNT, dut.C32_COUNT, dut.HA_COUNT);
    check(0, 0);
    check((1 << N) - 1, (1 << N) - 1);
    check((1 << N) - 1, 1);
    check(1, (1 << N) - 1);
    for (int v = 0; v < NVEC; v++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

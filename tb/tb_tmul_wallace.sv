// Self-checking testbench for the N x N trit Wallace multiplier.
// Operands are drawn at random (plus the all-zero and all-two corner cases),
// converted between base 3 and integers in the testbench, and the product is
// compared with the integer product. The multiplier is combinational, so each
// vector is checked one time step after it is applied. It also prints the
// counter counts of the generated tree.
module tb_tmul_wallace;
  import ternary_pkg::*;

  localparam int unsigned N      = 8;
  localparam int          NVEC   = 4000;

  logic [2*N-1:0] a, b;
  logic [4*N-1:0] p;
  int checks = 0, failures = 0;

  tmul_wallace #(.N(N)) dut (.a(a), .b(b), .p(p));

  function automatic longint unsigned to_int(input logic [4*N-1:0] v, input int nt);
    longint unsigned r = 0;
    for (int k = nt - 1; k >= 0; k--) r = r * 3 + longint'(v[2*k +: 2]);
    return r;
  endfunction

  function automatic logic [2*N-1:0] to_trits(input longint unsigned x);
    logic [2*N-1:0] r = '0;
    for (int k = 0; k < int'(N); k++) begin
      r[2*k +: 2] = 2'(x % 3);
      x = x / 3;
    end
    return r;
  endfunction

  task automatic check(input longint unsigned x, input longint unsigned y);
    longint unsigned got;
    bit legal = 1;
    a = to_trits(x);
    b = to_trits(y);
    #1;
    for (int k = 0; k < 2*int'(N); k++) if (p[2*k +: 2] == 2'd3) legal = 0;
    got = to_int(p, 2*N);
    checks++;
    if (!legal || got != x * y) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, got);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned maxv = 1;
    for (int k = 0; k < int'(N); k++) maxv *= 3;
    maxv -= 1;
    $display("tree: %0d stages, %0d one-trit multipliers, %0d (4,2), %0d (3,2), %0d half adders",
             dut.STAGE_COUNT, dut.TMUL1_COUNT, dut.TC42_COUNT, dut.TC32_COUNT, dut.THA_COUNT);
    check(0, 0);
    check(maxv, maxv);
    check(maxv, 1);
    check(1, maxv);
    check(maxv, 0);
    for (int v = 0; v < NVEC; v++)
      check(longint'($urandom) % (maxv + 1), longint'($urandom) % (maxv + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of the top level at its default sizes (8 x 8 trits,
// 12 x 12 bits). Random operands and corner cases go to both multipliers;
// each product is compared with an integer product computed here.
//
// It also counts how often the mechanisms that distinguish the ternary tree
// actually occur, by watching cells inside it, and fails if one never does:
//   - a one-trit multiplier carry (2 * 2), seen on the operands,
//   - a (4,2) counter giving the ternary carry 2 (second stage),
//   - the final ripple adder passing a carry on (out of trit 10),
//   - a ternary half adder giving a carry (third stage),
//   - a binary (7,3) counter reaching 4 or more (first stage).
module tb_cnt_mult_top;
  localparam int TN   = 8;
  localparam int BN   = 12;
  localparam int NVEC = 20000;

  logic [2*TN-1:0] ta, tb;
  logic [4*TN-1:0] tp;
  logic [BN-1:0]   ba, bb;
  logic [2*BN-1:0] bp;
  int checks = 0, failures = 0;
  int n_tmul_carry = 0, n_c42_two = 0, n_cpa_carry = 0, n_tha_carry = 0, n_c73_four = 0;

  cnt_mult_top dut (.ta(ta), .tb(tb), .tp(tp), .ba(ba), .bb(bb), .bp(bp));

  function automatic longint unsigned t2i(input logic [4*TN-1:0] v, input int nt);
    longint unsigned r = 0;
    for (int k = nt - 1; k >= 0; k--) r = r * 3 + longint'(v[2*k +: 2]);
    return r;
  endfunction

  function automatic logic [2*TN-1:0] i2t(input longint unsigned x);
    logic [2*TN-1:0] r = '0;
    for (int k = 0; k < TN; k++) begin
      r[2*k +: 2] = 2'(x % 3);
      x = x / 3;
    end
    return r;
  endfunction

  task automatic apply(input longint unsigned x, input longint unsigned y,
                       input int unsigned u, input int unsigned w);
    bit two_a = 0, two_b = 0;
    ta = i2t(x);
    tb = i2t(y);
    ba = BN'(u);
    bb = BN'(w);
    #1;
    for (int k = 0; k < TN; k++) begin
      if (ta[2*k +: 2] == 2'd2) two_a = 1;
      if (tb[2*k +: 2] == 2'd2) two_b = 1;
    end
    if (two_a && two_b) n_tmul_carry++;
    if (dut.u_tmul.g_stg[1].g_band[0].g_col[7].g_c42.u_c.cout == 2'd2) n_c42_two++;
    if (dut.u_tmul.g_cpa[10].g_fa.u_fa.cout != 2'd0) n_cpa_carry++;
    if (dut.u_tmul.g_stg[2].g_band[0].g_col[13].g_ha.u_c.cout != 2'd0) n_tha_carry++;
    if (dut.u_bmul.g_stg[0].g_col[8].g_c73[0].u_c.out[2]) n_c73_four++;
    checks += 2;
    if (t2i(tp, 2*TN) != x * y) begin
      failures++;
      if (failures < 10) $display("FAIL ternary %0d * %0d: got %0d", x, y, t2i(tp, 2*TN));
    end
    if (longint'(bp) != longint'(ba) * longint'(bb)) begin
      failures++;
      if (failures < 10) $display("FAIL binary %0d * %0d: got %0d", ba, bb, bp);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned tmax = 1;
    for (int k = 0; k < TN; k++) tmax *= 3;
    tmax -= 1;
    apply(0, 0, 0, 0);
    apply(tmax, tmax, (1 << BN) - 1, (1 << BN) - 1);
    apply(tmax, 1, (1 << BN) - 1, 1);
    apply(1, tmax, 1, (1 << BN) - 1);
    for (int v = 0; v < NVEC; v++)
      apply(longint'($urandom) % (tmax + 1), longint'($urandom) % (tmax + 1), $urandom, $urandom);
    $display("mechanism counts over %0d vectors:", NVEC + 4);
    need("one-trit multiplier carry (2*2)", n_tmul_carry);
    need("(4,2) counter carry of 2", n_c42_two);
    need("final adder carry out of trit 10", n_cpa_carry);
    need("ternary half adder carry", n_tha_carry);
    need("(7,3) counter count >= 4", n_c73_four);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive test of the ternary (3,2) counter: for all 27 input
// combinations, sum + 3*cout must equal a + b + cin, with sum and cout
// legal trits. Also counts how often each carry-out value appears: the
// ternary carry of 2 must occur (only for a+b+cin = 6).
module tb_tcnt32;
  import ternary_pkg::*;
  trit_t a, b, cin, sum, cout;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  tcnt32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++)
        for (int vc = 0; vc < 3; vc++) begin
          automatic int tot = va + vb + vc;
          a = trit_t'(va); b = trit_t'(vb); cin = trit_t'(vc);
          #1;
          checks++;
          if (int'(sum) != tot % 3 || int'(cout) != tot / 3) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d: sum=%0d cout=%0d", va, vb, vc, sum, cout);
          end else seen[cout]++;
        end
    checks++;
    if (seen[2] != 1 || seen[1] != 16 || seen[0] != 10) begin
      failures++;
      $display("FAIL carry histogram %0d/%0d/%0d", seen[0], seen[1], seen[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

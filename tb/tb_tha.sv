// Exhaustive test of the ternary half adder: a + b = sum + 3*cout.
module tb_tha;
  import ternary_pkg::*;
  trit_t a, b, sum, cout;
  int checks = 0, failures = 0;

  tha dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++) begin
        a = trit_t'(va); b = trit_t'(vb);
        #1;
        checks++;
        if (int'(sum) != (va + vb) % 3 || int'(cout) != (va + vb) / 3) begin
          failures++;
          $display("FAIL %0d+%0d: sum=%0d cout=%0d", va, vb, sum, cout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive test of the one-trit multiplier: a * b = p + 3*c for all nine
// pairs; the only carry is 2*2 = 4 = (1,1) in base 3.
module tb_tmul1;
  import ternary_pkg::*;
  trit_t a, b, p, c;
  int checks = 0, failures = 0;

  tmul1 dut (.a(a), .b(b), .p(p), .c(c));

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
        if (int'(p) != (va * vb) % 3 || int'(c) != (va * vb) / 3) begin
          failures++;
          $display("FAIL %0d*%0d: p=%0d c=%0d", va, vb, p, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive test of the successor circuits: a1 = (a+1) mod 3 and
// a2 = (a+2) mod 3 for every trit a.
module tb_trit_succ;
  import ternary_pkg::*;
  trit_t a, a1, a2;
  int checks = 0, failures = 0;

  trit_succ dut (.a(a), .a1(a1), .a2(a2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      a = trit_t'(v);
      #1;
      checks += 2;
      if (int'(a1) != (v + 1) % 3) begin failures++; $display("FAIL a=%0d a1=%0d", v, a1); end
      if (int'(a2) != (v + 2) % 3) begin failures++; $display("FAIL a=%0d a2=%0d", v, a2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

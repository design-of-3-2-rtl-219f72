// Exhaustive test of the binary half adder: a + b = sum + 2*cout.
module tb_bha;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  bha dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL ab=%02b sum=%0b cout=%0b", 2'(v), sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

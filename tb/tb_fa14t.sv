// Exhaustive test of the fa14t full adder: a + b + c = sum + 2*cout.
module tb_fa14t;
  logic a, b, c, sum, cout;
  int checks = 0, failures = 0;

  fa14t dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      automatic int tot;
      {a, b, c} = 3'(v);
      tot = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (int'({cout, sum}) != tot) begin
        failures++;
        $display("FAIL abc=%03b sum=%0b cout=%0b", 3'(v), sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

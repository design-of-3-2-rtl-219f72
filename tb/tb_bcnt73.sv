// Exhaustive test of the binary (7,3) counter with both full-adder styles:
// for all 128 input words the output must equal the number of ones. Then
// the critical-path sequence x0..x4 = 0, x6 = 1, x5 = 0,1,0 is applied; the
// count is 1,2,1, so out0 = 1,0,1 and out1 = 0,1,0.
module tb_bcnt73;
  logic [6:0] x;
  logic [2:0] out14, out28;
  int checks = 0, failures = 0;

  bcnt73 #(.FA_STYLE(0)) dut   (.x(x), .out(out14));
  bcnt73 #(.FA_STYLE(1)) dut28 (.x(x), .out(out28));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      automatic int ones = 0;
      x = 7'(v);
      for (int k = 0; k < 7; k++) ones += (v >> k) & 1;
      #1;
      checks += 2;
      if (int'(out14) != ones) begin failures++; $display("FAIL 14T x=%07b out=%0d", x, out14); end
      if (int'(out28) != ones) begin failures++; $display("FAIL 28T x=%07b out=%0d", x, out28); end
    end
    for (int k = 0; k < 3; k++) begin
      x = {1'b1, (k == 1), 5'b00000};
      #1;
      checks++;
      if (out14[0] != (k != 1) || out14[1] != (k == 1) || out14[2] != 1'b0) begin
        failures++;
        $display("FAIL critical-path step %0d: out=%03b", k, out14);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

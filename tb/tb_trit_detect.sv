// Exhaustive test of the NTI/PTI input decoder: for each trit the two
// binary outputs must be n = (t==0) and p = (t!=2), written here as a table.
module tb_trit_detect;
  import ternary_pkg::*;
  trit_t t;
  logic  n, p;
  int checks = 0, failures = 0;
  // Expected {n,p} for t = 0, 1, 2.
  localparam logic [1:0] EXP [3] = '{2'b11, 2'b01, 2'b00};

  trit_detect dut (.t(t), .n(n), .p(p));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      t = trit_t'(v);
      #1;
      checks++;
      if ({n, p} != EXP[v]) begin
        failures++;
        $display("FAIL t=%0d n=%0b p=%0b", v, n, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

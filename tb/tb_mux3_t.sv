// Exhaustive test of the ternary-controlled 3-input MUX: all 3^4 settings
// of control and data trits; the output must equal the data input the
// control selects.
module tb_mux3_t;
  import ternary_pkg::*;
  trit_t sel, i0, i1, i2, y;
  int checks = 0, failures = 0;

  mux3_t dut (.sel(sel), .i0(i0), .i1(i1), .i2(i2), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++)
      for (int x0 = 0; x0 < 3; x0++)
        for (int x1 = 0; x1 < 3; x1++)
          for (int x2 = 0; x2 < 3; x2++) begin
            automatic int exp_y;
            sel = trit_t'(s); i0 = trit_t'(x0); i1 = trit_t'(x1); i2 = trit_t'(x2);
            #1;
            exp_y = (s == 0) ? x0 : (s == 1) ? x1 : x2;
            checks++;
            if (int'(y) != exp_y) begin
              failures++;
              $display("FAIL sel=%0d in=%0d%0d%0d y=%0d", s, x0, x1, x2, y);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

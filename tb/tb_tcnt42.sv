// Exhaustive test of the ternary (4,2) counter: all 81 input combinations;
// sum + 3*cout must equal x1 + x2 + x3 + x4. A second pass walks the seven
// rows of the counter's truth table (x2+x3+x4 = 0..6, each with x1 = 0..2)
// and checks the printed Sum and Cout columns, which are written here
// independently of the arithmetic. A last pass applies the critical-path
// sequence x1 = 0, x3 = x4 = 1, x2 = 0,1,2,1,0, which must give
// sum = 2,0,1,0,2 and cout = 0,1,1,1,0.
module tb_tcnt42;
  import ternary_pkg::*;
  trit_t x1, x2, x3, x4, sum, cout;
  int checks = 0, failures = 0;

  // Truth table rows: for x2+x3+x4 = r, {Sum, Cout} for x1 = 0, 1, 2.
  localparam int TSUM  [7][3] = '{'{0,1,2}, '{1,2,0}, '{2,0,1}, '{0,1,2}, '{1,2,0}, '{2,0,1}, '{0,1,2}};
  localparam int TCOUT [7][3] = '{'{0,0,0}, '{0,0,1}, '{0,1,1}, '{1,1,1}, '{1,1,2}, '{1,2,2}, '{2,2,2}};

  tcnt42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 81; v++) begin
      automatic int t1 = v % 3, t2 = (v / 3) % 3, t3 = (v / 9) % 3, t4 = v / 27;
      automatic int tot = t1 + t2 + t3 + t4;
      x1 = trit_t'(t1); x2 = trit_t'(t2); x3 = trit_t'(t3); x4 = trit_t'(t4);
      #1;
      checks++;
      if (int'(sum) != tot % 3 || int'(cout) != tot / 3) begin
        failures++;
        $display("FAIL %0d%0d%0d%0d: sum=%0d cout=%0d", t1, t2, t3, t4, sum, cout);
      end
    end
    for (int r = 0; r < 7; r++)
      for (int t1 = 0; t1 < 3; t1++) begin
        // One way of making x2+x3+x4 = r.
        automatic int t2 = (r > 2) ? 2 : r;
        automatic int t3 = (r - t2 > 2) ? 2 : r - t2;
        automatic int t4 = r - t2 - t3;
        x1 = trit_t'(t1); x2 = trit_t'(t2); x3 = trit_t'(t3); x4 = trit_t'(t4);
        #1;
        checks++;
        if (int'(sum) != TSUM[r][t1] || int'(cout) != TCOUT[r][t1]) begin
          failures++;
          $display("FAIL table row %0d x1=%0d: sum=%0d cout=%0d", r, t1, sum, cout);
        end
      end
    for (int k = 0; k < 5; k++) begin
      automatic int seq_x2 [5]   = '{0, 1, 2, 1, 0};
      automatic int seq_sum [5]  = '{2, 0, 1, 0, 2};
      automatic int seq_cout [5] = '{0, 1, 1, 1, 0};
      x1 = T0; x3 = T1; x4 = T1; x2 = trit_t'(seq_x2[k]);
      #1;
      checks++;
      if (int'(sum) != seq_sum[k] || int'(cout) != seq_cout[k]) begin
        failures++;
        $display("FAIL critical-path step %0d: sum=%0d cout=%0d", k, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

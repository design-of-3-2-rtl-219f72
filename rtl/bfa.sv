// Binary full adder of a selectable circuit style, used wherever the binary
// counters need a (3,2) counter. FA_STYLE = 0 selects the 14-transistor
// adder (fa14t), FA_STYLE = 1 the 28-transistor mirror adder (fa28t); both
// compute a + b + c = sum + 2*cout. Combinational.
module bfa #(
  parameter int unsigned FA_STYLE = 0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  if (FA_STYLE == 0) begin : g_14t
    fa14t u_fa (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));
  end else begin : g_28t
    fa28t u_fa (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));
  end

endmodule

// Binary (7,3) counter: out = number of ones among x[6:0], 0..7.
//
// Four full adders, wired as in the design's (7,3) counter:
//   FA0: x0, x1, x2 -> S0, C0        FA1: x3, x4, x5 -> S1, C1
//   FA2: S0, S1, x6 -> out0, C2      FA3: C0, C1, C2 -> out1, out2
// The slowest path runs x5 -> FA1 -> FA2 -> FA3. FA_STYLE selects the
// full-adder circuit (0: 14T, 1: 28T); both styles are studied in the
// design, and the 14T default is this RTL's choice. Combinational.
module bcnt73 #(
  parameter int unsigned FA_STYLE = 0
) (
  input  logic [6:0] x,
  output logic [2:0] out
);

  logic s0, c0, s1, c1, c2;

  bfa #(.FA_STYLE(FA_STYLE)) u_fa0 (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s0),     .cout(c0));
  bfa #(.FA_STYLE(FA_STYLE)) u_fa1 (.a(x[3]), .b(x[4]), .c(x[5]), .sum(s1),     .cout(c1));
  bfa #(.FA_STYLE(FA_STYLE)) u_fa2 (.a(s0),   .b(s1),   .c(x[6]), .sum(out[0]), .cout(c2));
  bfa #(.FA_STYLE(FA_STYLE)) u_fa3 (.a(c0),   .b(c1),   .c(c2),   .sum(out[1]), .cout(out[2]));

endmodule

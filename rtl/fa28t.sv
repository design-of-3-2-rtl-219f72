// Binary full adder in the 28-transistor mirror style.
//
// A complex gate forms the inverted carry, and a second complex gate forms
// the inverted sum from the inputs and that inverted carry; an inverter
// follows each:
//   cout_n = ~(a&b | c&(a|b))
//   sum_n  = ~(a&b&c | cout_n&(a|b|c))
//   cout   = ~cout_n,  sum = ~sum_n
// The gate equations are those of the 28T schematic of the design.
// Combinational.
module fa28t (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  logic cout_n, sum_n;

  always_comb begin
    cout_n = ~((a & b) | (c & (a | b)));
    sum_n  = ~((a & b & c) | (cout_n & (a | b | c)));
    cout   = ~cout_n;
    sum    = ~sum_n;
  end

endmodule

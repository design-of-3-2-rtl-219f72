// Binary full adder in the 14-transistor style: the (3,2) binary counter.
//
//   x    = a XOR b             (4-transistor XOR cell, plus an inverter for
//                               its complement)
//   sum  = x XOR c
//   cout = x ? c : a           (2-input MUX controlled by x and ~x)
//
// The gate structure follows the 14T adder of the design; the RTL writes
// each gate as one expression. Combinational.
module fa14t (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  logic x, xn;

  always_comb begin
    x    = a ^ b;
    xn   = ~x;
    sum  = x ^ c;
    cout = xn ? a : c;
  end

endmodule

// Binary half adder: a + b = sum + 2*cout, as an XOR and an AND gate.
// The design names binary half adders in its reduction tree without showing
// their circuit; this two-gate form is the usual one. Combinational.
module bha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule

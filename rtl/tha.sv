// Ternary half adder: a + b = sum + 3 * cout, cout in {0,1}.
//
// Built in the MUX style of the (3,2) counter with the carry-in removed:
// a ternary MUX controlled by b picks A, A^1 or A^2 for the sum, and a second
// one picks the fixed levels 0, A001 (1 if a=2) or A011 (1 if a>0) for the
// carry. The design names ternary half adders without showing their
// circuit; this structure is this RTL's own. Combinational.
module tha
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t sum,
  output trit_t cout
);

  logic  an, ap;
  trit_t a1, a2, a001, a011;

  trit_detect u_det  (.t(a), .n(an), .p(ap));
  trit_succ   u_succ (.a(a), .a1(a1), .a2(a2));

  always_comb begin
    a001 = ap ? T0 : T1;
    a011 = an ? T0 : T1;
  end

  mux3_t u_s (.sel(b), .i0(a),  .i1(a1),   .i2(a2),   .y(sum));
  mux3_t u_c (.sel(b), .i0(T0), .i1(a001), .i2(a011), .y(cout));

endmodule

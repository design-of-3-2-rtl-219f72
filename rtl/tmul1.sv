// One-trit multiplier: a * b = p + 3 * c. The only product with a carry is
// 2 * 2 = 4 = "11" in base 3, so c is 0 or 1.
//
// The design gives only this function; the circuit here is this RTL's own,
// in the MUX style of the counters. A ternary MUX controlled by b picks 0, a
// or 2a mod 3. The doubled value 2a mod 3 is A^1 when a = 1 and A^2 when
// a = 2, so it is taken from the successor circuits, steered by the
// decoders of a. The carry is the fixed level 1 when both the a and b
// decoders see a 2, so the upper bit of c is always 0. Combinational.
module tmul1
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t p,
  output trit_t c
);

  logic  an, ap, bp;
  trit_t a1, a2, a_dbl;

  trit_detect u_da   (.t(a), .n(an), .p(ap));
  trit_detect u_db   (.t(b), .n(), .p(bp));
  trit_succ   u_succ (.a(a), .a1(a1), .a2(a2));

  // 2a mod 3: 0 -> 0, 1 -> 2, 2 -> 1. For a > 0 this equals (a+a) mod 3,
  // which is A^1 when a = 1 and A^2 when a = 2.
  always_comb begin
    if (an)      a_dbl = T0;
    else if (ap) a_dbl = a1;
    else         a_dbl = a2;
  end

  mux3_t u_p (.sel(b), .i0(T0), .i1(a), .i2(a_dbl), .y(p));

  assign c = (!ap && !bp) ? T1 : T0;

endmodule

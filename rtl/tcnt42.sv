// Ternary (4,2) counter: adds four trits,
//     x1 + x2 + x3 + x4 = sum + 3 * cout,   cout in {0,1,2}.
//
// A (3,2) counter adds x2, x3 and x4 into S0 and C0 (C0 may be 2). Then
//     sum  = (S0 + x1) mod 3 : a ternary MUX controlled by x1 choosing
//            S0, S0^1 or S0^2 (successor circuits on S0);
//     cout : two MUXes controlled by S0 give the carry for C0 = 0 and
//            C0 = 1, and a last MUX controlled by C0 picks between them and
//            the fixed level 2 (C0 = 2 only happens with S0 = 0).
// Inputs of the carry MUXes are fixed levels derived from x1:
//     C0=0:  (0,     X1-001, X1-011)   for S0 = 0, 1, 2
//     C0=1:  (1,     X1-112, X1-122)
// with X1-001 = 1 if x1=2 else 0, X1-011 = 1 if x1>0 else 0,
//      X1-112 = 2 if x1=2 else 1,  X1-122 = 1 if x1=0 else 2.
// Structure follows the design. Which of x2, x3, x4 goes to which input of
// the (3,2) counter (x4 -> A, x2 -> B, x3 -> carry in) is this RTL's choice;
// the counter is symmetric in value so results do not depend on it.
// Combinational.
module tcnt42
  import ternary_pkg::*;
(
  input  trit_t x1,
  input  trit_t x2,
  input  trit_t x3,
  input  trit_t x4,
  output trit_t sum,
  output trit_t cout
);

  trit_t s0, c0, s01, s02;
  logic  x1n, x1p;
  trit_t x1_001, x1_011, x1_112, x1_122;
  trit_t cy_c0, cy_c1;

  tcnt32    u_add  (.a(x4), .b(x2), .cin(x3), .sum(s0), .cout(c0));
  trit_succ u_succ (.a(s0), .a1(s01), .a2(s02));
  mux3_t    u_sum  (.sel(x1), .i0(s0), .i1(s01), .i2(s02), .y(sum));

  trit_detect u_det (.t(x1), .n(x1n), .p(x1p));

  always_comb begin
    x1_001 = x1p ? T0 : T1;
    x1_011 = x1n ? T0 : T1;
    x1_112 = x1p ? T1 : T2;
    x1_122 = x1n ? T1 : T2;
  end

  mux3_t u_cy0  (.sel(s0), .i0(T0),    .i1(x1_001), .i2(x1_011), .y(cy_c0));
  mux3_t u_cy1  (.sel(s0), .i0(T1),    .i1(x1_112), .i2(x1_122), .y(cy_c1));
  mux3_t u_cout (.sel(c0), .i0(cy_c0), .i1(cy_c1),  .i2(T2),     .y(cout));

endmodule

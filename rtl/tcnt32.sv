// Ternary (3,2) counter: a ternary full adder whose carry-in and carry-out
// may each take all three values. It satisfies
//     a + b + cin = sum + 3 * cout,   0 <= a+b+cin <= 6, cout in {0,1,2}.
//
// MUX structure: the successor circuits give A^1 = (A+1) mod 3 and
// A^2 = (A+2) mod 3, and five fixed-level signals are derived from A:
//     A000 = 0,  A001 = 1 if A=2 else 0,  A011 = 1 if A>0 else 0,
//     A111 = 1,  A112 = 2 if A=2 else 1.
// A first rank of six ternary MUXes, controlled by B, forms the sum and carry
// for each possible carry-in k:
//     Sum_k  = MUX(B; A^k, A^(k+1), A^(k+2))         (exponents mod 3)
//     Cout0  = MUX(B; A000, A001, A011)
//     Cout1  = MUX(B; A001, A011, A111)
//     Cout2  = MUX(B; A011, A111, A112)
// and a second rank of two MUXes controlled by cin picks Sum_cin and
// Cout_cin. A001, A011 and A112 come from inverters on Ap or An powered from
// Vdd/2 (or between Vdd and Vdd/2 for A112). Structure and levels follow the
// design; nothing here is this RTL's own choice except the 2-bit trit code.
// Combinational; worst-case input in the circuit is B (two MUX levels).
module tcnt32
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t cin,
  output trit_t sum,
  output trit_t cout
);

  logic  an, ap;
  trit_t a1, a2;
  trit_t a000, a001, a011, a111, a112;
  trit_t sum0, sum1, sum2;
  trit_t cout0, cout1, cout2;

  trit_detect u_det  (.t(a), .n(an), .p(ap));
  trit_succ   u_succ (.a(a), .a1(a1), .a2(a2));

  // Level generators (inverters on the decoded A with reduced supplies).
  always_comb begin
    a000 = T0;
    a111 = T1;
    a001 = ap ? T0 : T1;   // inverter on Ap, supply Vdd/2
    a011 = an ? T0 : T1;   // inverter on An, supply Vdd/2
    a112 = ap ? T1 : T2;   // inverter on Ap between Vdd and Vdd/2
  end

  // First rank, controlled by B.
  mux3_t u_s0 (.sel(b), .i0(a),    .i1(a1),   .i2(a2),   .y(sum0));
  mux3_t u_s1 (.sel(b), .i0(a1),   .i1(a2),   .i2(a),    .y(sum1));
  mux3_t u_s2 (.sel(b), .i0(a2),   .i1(a),    .i2(a1),   .y(sum2));
  mux3_t u_c0 (.sel(b), .i0(a000), .i1(a001), .i2(a011), .y(cout0));
  mux3_t u_c1 (.sel(b), .i0(a001), .i1(a011), .i2(a111), .y(cout1));
  mux3_t u_c2 (.sel(b), .i0(a011), .i1(a111), .i2(a112), .y(cout2));

  // Second rank, controlled by the carry in.
  mux3_t u_sum  (.sel(cin), .i0(sum0),  .i1(sum1),  .i2(sum2),  .y(sum));
  mux3_t u_cout (.sel(cin), .i0(cout0), .i1(cout1), .i2(cout2), .y(cout));

endmodule

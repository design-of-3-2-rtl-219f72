// Successor circuits A^1 = (A+1) mod 3 and A^2 = (A+2) mod 3.
//
// Each output is driven to one of the three levels by devices gated with the
// decoded signals of A (NTI output An, PTI output Ap, and their complements
// Anb, Apb), following the two small transistor networks of the design:
//   a1: Vdd/2 when An is high (A=0); Vdd when An and Apb are both low (A=1);
//       ground when Apb is high (A=2).
//   a2: Vdd/2 when Ap is low (A=2); Vdd when Anb is low (A=0); ground when
//       Anb and Ap are both high (A=1).
// The RTL picks the level from the same control conditions. Combinational.
module trit_succ
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t a1,
  output trit_t a2
);

  logic an, ap, anb, apb;

  trit_detect u_det (.t(a), .n(an), .p(ap));

  assign anb = ~an;
  assign apb = ~ap;

  always_comb begin
    if (an)           a1 = T1;
    else if (!apb)    a1 = T2;
    else              a1 = T0;

    if (!ap)          a2 = T1;
    else if (!anb)    a2 = T2;
    else              a2 = T0;
  end

endmodule

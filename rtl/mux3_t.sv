// Three-input multiplexer with a ternary control input.
//
// The control trit is decoded by an NTI/PTI pair into Bn (sel = 0) and Bp
// (sel < 2). Input i0 passes through one transmission gate that is on while
// Bn is high, i1 through two gates in series that are on while Bn is low and
// Bp is high, and i2 through one gate that is on while Bp is low. Exactly one
// path conducts for a legal control trit. Data inputs are trits and pass
// unchanged. Combinational.
module mux3_t
  import ternary_pkg::*;
(
  input  trit_t sel,
  input  trit_t i0,
  input  trit_t i1,
  input  trit_t i2,
  output trit_t y
);

  logic bn, bp;

  trit_detect u_det (.t(sel), .n(bn), .p(bp));

  always_comb begin
    y = T0;
    if (bn)        y = i0;
    if (!bn && bp) y = i1;
    if (!bp)       y = i2;
  end

endmodule

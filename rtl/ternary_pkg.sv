// Shared types for the ternary counters and multiplier.
//
// A trit is one of three logic levels. In the CNTFET circuits these are
// ground, Vdd/2 and Vdd; in this RTL a trit is a 2-bit unsigned code with
// the value 0, 1 or 2. Code 3 is never produced by any block (the
// testbenches compare outputs with legal values). The named constants stand
// for the three levels (T0 = ground, T1 = Vdd/2, T2 = Vdd), so a fixed level
// wired into a MUX input reads as in the schematics.
package ternary_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

endpackage

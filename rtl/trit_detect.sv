// Ternary input decoder: the negative and positive ternary inverters (NTI and
// PTI) that turn one trit into the two binary control signals the counters
// steer their MUXes with.
//
//   n  (An, Bn in the schematics): NTI output, high only when t = 0
//   p  (Ap, Bp in the schematics): PTI output, high unless t = 2
//
// So (n,p) = (1,1) for t=0, (0,1) for t=1 and (0,0) for t=2. The schematics
// follow each inverter with two more inverters (An -> Anb -> Anbb) only to
// restore drive and to supply complements; users of this block take the
// complements with '~'. The thresholds follow from how the counters use An
// and Ap; the buffer chains are a drive detail this RTL leaves out.
// Purely combinational.
module trit_detect
  import ternary_pkg::*;
(
  input  trit_t t,
  output logic  n,
  output logic  p
);

  always_comb begin
    n = (t == T0);
    p = (t != T2);
  end

endmodule

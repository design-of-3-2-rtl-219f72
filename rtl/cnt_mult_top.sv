// Top level: the two multipliers that the counters are built for, side by
// side.
//
//   ternary: an 8 x 8 trit multiplier. One-trit multipliers make 16 rows of
//            product and carry trits; a Wallace tree of ternary (4,2) and
//            (3,2) counters and ternary half adders reduces them to two
//            rows, and a ripple chain of (3,2) counters adds those.
//   binary:  a 12 x 12 bit multiplier, about the same information content
//            (3^8 = 6561 against 2^12 = 4096 values per operand), whose tree
//            uses binary (7,3) counters, full adders and half adders.
//
// The two share no signals. Both are purely combinational: outputs follow
// inputs after the gate delays, with no clock or reset. Trits are 2-bit
// codes 0/1/2, trit i of a word in bits [2i+1:2i]. Sizes are parameters
// whose defaults are the 8-trit and 12-bit sizes the design compares;
// FA_STYLE selects the binary full-adder circuit (0: 14T, 1: 28T).
module cnt_mult_top #(
  parameter int unsigned TN       = 8,
  parameter int unsigned BN       = 12,
  parameter int unsigned FA_STYLE = 0
) (
  input  logic [2*TN-1:0] ta,
  input  logic [2*TN-1:0] tb,
  output logic [4*TN-1:0] tp,
  input  logic [BN-1:0]   ba,
  input  logic [BN-1:0]   bb,
  output logic [2*BN-1:0] bp
);

  tmul_wallace #(.N(TN)) u_tmul (.a(ta), .b(tb), .p(tp));

  bmul_wallace #(.N(BN), .FA_STYLE(FA_STYLE)) u_bmul (.a(ba), .b(bb), .p(bp));

endmodule

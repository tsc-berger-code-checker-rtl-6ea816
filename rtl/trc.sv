// TRC: two-variable two-rail-code checker.
//
// Takes two pairs (ai,bi) and (aj,bj). While both pairs are two-rail code
// words (ai = ~bi, aj = ~bj) the output pair (f,g) is also complementary;
// if either input pair is 00 or 11 the output pair is 00 or 11, which a
// following checker or observer sees as an error indication. The four
// product terms pair the rails as a_i b_j, b_i a_j (into f) and a_i a_j,
// b_i b_j (into g), as in the reference gate diagram. With code inputs
// f = ai XOR aj, so the tree above it computes a parity of the a-rails.
// The product terms are kept as named nets (p_ab, p_ba, p_aa, p_bb) so that
// fault-injection tests can reach them.
// The checker is fully tested by the inputs 0101, 0110, 1001 and 1010.
// Combinational, no clock.
module trc (
  input  logic ai,
  input  logic bi,
  input  logic aj,
  input  logic bj,
  output logic f,
  output logic g
);
  logic p_ab, p_ba, p_aa, p_bb;   // the four product terms

  assign p_ab = ai & bj;
  assign p_ba = bi & aj;
  assign p_aa = ai & aj;
  assign p_bb = bi & bj;
  assign f    = p_ab | p_ba;
  assign g    = p_aa | p_bb;
endmodule

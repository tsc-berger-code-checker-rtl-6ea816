// M-TRC: modified two-rail-code checker that closes the BC1 checker.
//
// Two two-variable TRC cells in a chain. TRC 1 checks the external 1/2-code
// pair (fi,gi) together with the most significant pair (a1,b1) =
// (c_{r-1}, ~y_{r-1}) and gives (t1,t2); TRC 2 checks (t1,t2) together with
// the TRC-TREE output (a2,b2) and gives the checker output (z1,z2).
// Because y_{r-1} is 1 for only one code word (all information bits zero),
// the pair (a1,b1) alone would not exercise a TRC fully; the toggling
// external pair makes both cells see all four code patterns. The external
// pair must come from another self-checking checker or a complementary
// signal pair (fi = ~gi). Combinational, two TRC delays from input to output.
// The two-cell chain and its pairing follow the published M-TRC; which rail of
// the tree output is a2 is this design's choice (the f rail).
module m_trc (
  input  logic fi,
  input  logic gi,
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  output logic z1,
  output logic z2
);
  logic t1, t2;

  trc u_trc1 (.ai(fi), .bi(gi), .aj(a1), .bj(b1), .f(t1), .g(t2));
  trc u_trc2 (.ai(t1), .bi(t2), .aj(a2), .bj(b2), .f(z1), .g(z2));
endmodule

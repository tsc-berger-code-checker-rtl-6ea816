// M-TRC*: periodic two-variable two-rail-code checker closing the BC2 checker.
//
// Four XOR gates and CMOS-GATE*: g1 = b1 ^ s, t1 = a1 ^ g1, g2 = b2 ^ s,
// t2 = a2 ^ g2. While both pairs are two-rail code words (a1 = ~b1,
// a2 = ~b2), t1 = t2 = ~s and CMOS-GATE* drives Z = ~s, i.e. Z toggles with
// the periodic input. A non-code pair makes t1 != t2 in every phase of s,
// so Z floats and stops toggling; a stuck-at fault inside breaks the
// periodicity in at least one phase. Pair (a1,b1) is (c_{r-1}, ~y_{r-1})
// and (a2,b2) the TRC-TREE output. Combinational from s to Z (two XOR delays
// plus the gate); the only storage is the held node of CMOS-GATE*.
// Gates and wiring follow the published M-TRC* and reproduce its truth table;
// the assignment of the checker's pairs to (a1,b1) and (a2,b2) mirrors BC1.
module m_trc_star (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  input  logic s,
  output logic z
);
  logic g1, g2, t1, t2;

  assign g1 = b1 ^ s;
  assign t1 = a1 ^ g1;
  assign g2 = b2 ^ s;
  assign t2 = a2 ^ g2;

  cmos_gate_star u_gate (.t1(t1), .t2(t2), .z(z));
endmodule

// C-HA: complementary half adder of the 0's counter.
//
// 2*co + s is the count of zeros among a and b: s is high when exactly one
// input is zero, co when both are. First-level cell on raw information bits.
// Function as published; the XOR/NOR form is this design's own.
// Purely combinational, no clock.
module c_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = ~(a | b);
endmodule

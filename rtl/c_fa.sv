// C-FA: complementary full adder of the 0's counter.
//
// Its two outputs form the binary number 2*co + s equal to the count of
// zeros among a, b and c, i.e. (1-a)+(1-b)+(1-c). It is a first-level cell
// that takes raw information bits, so the counter needs no separate
// inverters. The cell's function is the published one; its gate network is
// written here from that function (inverted parity and inverted majority)
// rather than copied. Purely combinational, no clock.
module c_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  // The zero count is the ones count of the complemented inputs:
  // sum bit is the inverted parity, carry is the inverted majority.
  assign s  = ~(a ^ b ^ c);
  assign co = ~((a & b) | (a & c) | (b & c));
endmodule

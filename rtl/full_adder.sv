// FA: ordinary full adder, 2*co + s = a + b + c.
// Used in the column-compression levels of the 0's counter; the published
// design only names it, so the textbook form is used. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule

// HA: ordinary half adder, 2*co + s = a + b.
// Used in the column-compression levels of the 0's counter; the published
// design only names it, so the textbook form is used. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule

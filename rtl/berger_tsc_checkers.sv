// Both totally self-checking Berger-code checkers for k = 2^(r-1)
// information bits, BC1 and BC2, side by side on one code word.
//
// A Berger code word is K information bits x plus R = log2(K)+1 check bits
// c holding the number of zeros in x. BC1 reports on a two-rail pair
// (bc1_z1, bc1_z2): 01 or 10 means "code word, checker healthy", 00 or 11
// means error; it needs an external complementary pair (fi, gi), for
// example the output of another self-checking checker. BC2 reports on one
// wire bc2_z that follows ~s for a healthy code word and stops toggling
// otherwise; s can be the system clock. Each checker has its own counter
// and tree, so a fault in one cannot mask the other. Combinational apart
// from the held output node inside BC2. Default K = 8 is the BC(12,8) code
// of the reference examples; any power of two from 2 up is accepted.
module berger_tsc_checkers
  import berger_pkg::*;
#(
  parameter  int unsigned K = 8,
  localparam int unsigned R = check_bits(K)
) (
  input  logic [K-1:0] x,
  input  logic [R-1:0] c,
  input  logic         fi,
  input  logic         gi,
  input  logic         s,
  output logic         bc1_z1,
  output logic         bc1_z2,
  output logic         bc2_z
);
  bc1_checker #(.K(K)) u_bc1 (.x(x), .c(c), .fi(fi), .gi(gi), .z1(bc1_z1), .z2(bc1_z2));
  bc2_checker #(.K(K)) u_bc2 (.x(x), .c(c), .s(s), .z(bc2_z));
endmodule

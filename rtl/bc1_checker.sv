// BC1: totally self-checking Berger-code checker for k = 2^(r-1)
// information bits, closed by an external 1/2-code input pair.
//
// The 0's counter recomputes the check symbol y from the information bits
// x; each y_i is inverted and paired with the received check bit c_i. On a
// valid code word every pair (~y_i, c_i) is complementary. The lower r-1
// pairs go through the TRC-TREE; the top pair (c_{r-1}, ~y_{r-1}) and the
// tree output go to M-TRC together with the external pair (fi,gi). The
// output (z1,z2) is complementary (01 or 10) for a code word with a valid
// external pair and 00 or 11 otherwise. Because k = 2^(r-1), the low r-1
// counter bits take all 2^(r-1) values over the code space, so the tree is
// exhaustively exercised, and the external pair lets M-TRC see all its test
// patterns although y_{r-1} is 1 only for the all-zero information word.
// Interface: x = information bits x_{k-1}..x_0, c = check bits
// c_{r-1}..c_0, fi/gi = external complementary pair. Combinational: the
// output follows the inputs after the counter, tree and M-TRC delays.
// The structure follows the reference design; which tree rail drives which
// M-TRC input, and the rail order inside the pairs, are this design's reading.
module bc1_checker
  import berger_pkg::*;
#(
  parameter  int unsigned K = 8,
  localparam int unsigned R = check_bits(K)
) (
  input  logic [K-1:0] x,
  input  logic [R-1:0] c,
  input  logic         fi,
  input  logic         gi,
  output logic         z1,
  output logic         z2
);
  logic [R-1:0] y;      // recomputed zero count
  logic [R-1:0] y_n;    // its complement, the a-rail of every pair
  logic         tf, tg; // TRC-TREE output pair

  zeros_counter #(.K(K)) u_cnt (.x(x), .y(y));
  assign y_n = ~y;

  trc_tree #(.N(R-1)) u_tree (
    .a (y_n[R-2:0]),
    .b (c[R-2:0]),
    .z1(tf),
    .z2(tg)
  );

  m_trc u_mtrc (
    .fi(fi), .gi(gi),
    .a1(c[R-1]), .b1(y_n[R-1]),
    .a2(tf),     .b2(tg),
    .z1(z1),     .z2(z2)
  );
endmodule

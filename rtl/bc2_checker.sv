// BC2: totally self-checking Berger-code checker for k = 2^(r-1)
// information bits with a periodic input and a single periodic output.
//
// Identical to BC1 up to the TRC-TREE: the 0's counter recomputes the check
// symbol, each inverted counter bit is paired with the received check bit,
// and the lower r-1 pairs are reduced by the TRC-TREE. The closing stage is
// M-TRC* instead of M-TRC: it folds the periodic input s (the system clock
// can serve) into the top pair (c_{r-1}, ~y_{r-1}) and the tree output, so
// on a code word Z = ~s and toggles every half period. A non-code word or a
// stuck-at fault in the checker makes Z stop following ~s (it holds its
// value in at least one phase); an observer flags an aperiodic Z.
// Interface: x = information bits, c = check bits c_{r-1}..c_0, s = periodic
// input, z = output Z. Combinational from x, c and s to z except for the
// held node of CMOS-GATE*, which keeps Z while its inputs disagree.
module bc2_checker
  import berger_pkg::*;
#(
  parameter  int unsigned K = 8,
  localparam int unsigned R = check_bits(K)
) (
  input  logic [K-1:0] x,
  input  logic [R-1:0] c,
  input  logic         s,
  output logic         z
);
  logic [R-1:0] y;
  logic [R-1:0] y_n;
  logic         tf, tg;

  zeros_counter #(.K(K)) u_cnt (.x(x), .y(y));
  assign y_n = ~y;

  trc_tree #(.N(R-1)) u_tree (
    .a (y_n[R-2:0]),
    .b (c[R-2:0]),
    .z1(tf),
    .z2(tg)
  );

  m_trc_star u_mtrc (
    .a1(c[R-1]), .b1(y_n[R-1]),
    .a2(tf),     .b2(tg),
    .s (s),
    .z (z)
  );
endmodule

// 0's counter: binary count of the zero bits among K information bits.
//
// Output y (R = log2(K)+1 bits) equals the number of zeros in x, so on a
// valid Berger code word it equals the check symbol c. Structure:
//   * First level: complementary cells on the raw bits. C-FA cells take
//     x[2:0], x[5:3], ...; the remaining two (or four) bits go to C-HA cells.
//     Each cell adds one bit to column 0 (its s) and one to column 1 (its co).
//   * Column compression: columns are reduced from weight 1 upward. In a
//     column, bits are consumed first-in first-out: a full adder takes the
//     three oldest bits while three or more are left and appends its sum to
//     the column; when exactly two are left a half adder takes them. Every
//     carry enters the next column after that column's own first-level bits.
//     The one bit left in column w is y[w].
// For K = 8 this is exactly the reference network: C-FA(x2..x0),
// C-FA(x5..x3), C-HA(x7,x6); an FA on the three weight-1 sums gives y0; an FA
// on the three weight-2 carries, then an HA with the carry of the y0 adder,
// gives y1; a last HA gives y2 and y3. It uses K - R full adders (C-FA
// included) as the reference cost formula states; the first-level grouping
// and the FIFO order for other K are this design's own choice.
// The network has no redundant logic, so every exhaustive input set tests
// it. Purely combinational: y is valid one adder-tree delay after x.
module zeros_counter
  import berger_pkg::*;
#(
  parameter  int unsigned K = 8,
  localparam int unsigned R = check_bits(K)
) (
  input  logic [K-1:0] x,
  output logic [R-1:0] y
);
  localparam int NCFA = n_cfa(K);
  localparam int NCHA = n_cha(K);
  localparam int NF   = NCFA + NCHA;

  // Elaboration-time guard: the checker family is defined for k = 2^(r-1).
  if (K < 2 || (1 << (R - 1)) != K) begin : g_bad_k
    $error("zeros_counter: K must be a power of two >= 2");
  end

  // ---- first level: complementary cells ----
  logic [NF-1:0] fl_s;   // weight-1 partial counts
  logic [NF-1:0] fl_c;   // weight-2 partial counts

  for (genvar i = 0; i < NCFA; i++) begin : g_cfa
    c_fa u_cfa (.a(x[3*i]), .b(x[3*i+1]), .c(x[3*i+2]),
                .s(fl_s[i]), .co(fl_c[i]));
  end
  for (genvar i = 0; i < NCHA; i++) begin : g_cha
    c_ha u_cha (.a(x[3*NCFA+2*i]), .b(x[3*NCFA+2*i+1]),
                .s(fl_s[NCFA+i]), .co(fl_c[NCFA+i]));
  end

  // ---- column compression ----
  for (genvar w = 0; w < R; w++) begin : col
    localparam int NB    = col_bits(K, w);  // bits entering this column
    localparam int NCELL = NB / 2;          // adders in this column
    localparam int NPREV = (w == 0) ? 0 : col_bits(K, w - 1) / 2;

    logic [NB-1:0] inb;

    if (w == 0) begin : g_in0
      assign inb = fl_s;
    end else if (w == 1) begin : g_in1
      assign inb[NF-1:0] = fl_c;
      for (genvar j = 0; j < NPREV; j++) begin : g_cy
        assign inb[NF+j] = col[w-1].g_cell[j].co;
      end
    end else begin : g_inw
      for (genvar j = 0; j < NPREV; j++) begin : g_cy
        assign inb[j] = col[w-1].g_cell[j].co;
      end
    end

    // Cell j reads pool positions 3j, 3j+1, 3j+2; pool position p is
    // inb[p] for p < NB, else the sum of cell p-NB. Its own sum is
    // pool position NB+j.
    for (genvar j = 0; j < NCELL; j++) begin : g_cell
      localparam bit IS_HA = (NB % 2 == 0) && (j == NCELL - 1);
      localparam int NIN   = IS_HA ? 2 : 3;
      logic [NIN-1:0] in;
      logic s, co;

      for (genvar q = 0; q < NIN; q++) begin : pick
        localparam int P = 3 * j + q;
        if (P < NB) begin : g_from_in
          assign in[q] = inb[P];
        end else begin : g_from_sum
          assign in[q] = g_cell[P-NB].s;
        end
      end

      if (IS_HA) begin : g_ha
        half_adder u_ha (.a(in[0]), .b(in[1]), .s(s), .co(co));
      end else begin : g_fa
        full_adder u_fa (.a(in[0]), .b(in[1]), .c(in[2]), .s(s), .co(co));
      end
    end

    if (NCELL == 0) begin : g_out_wire
      assign y[w] = inb[0];
    end else begin : g_out_cell
      assign y[w] = g_cell[NCELL-1].s;
    end
  end
endmodule

// End-to-end testbench for berger_tsc_checkers at its default size
// (BC(12,8): K = 8 information bits, 4 check bits).
//
// A source produces Berger-encoded words: random information words, with the
// all-zero and all-one words mixed in, each encoded with its zero count.
// One word is presented per period of the periodic input s (two clock
// cycles); the external pair (fi, gi) alternates 10/01 every cycle as a
// healthy 1/2-code source would. Some words are corrupted before they reach
// the checkers: a single information bit, a single check bit, a
// unidirectional 1->0 or 0->1 error over several bits of the whole word, or
// (for BC1 only) a non-code external pair. Expected behaviour:
//   BC1: (z1,z2) complementary in both cycles iff word and pair are valid;
//   BC2: Z = ~s in both phases iff the word is valid.
// Every mechanism the design relies on is counted and must occur: each
// error kind detected by each checker, the all-zero word (the only word
// with y_{r-1} = 1), all three M-TRC input combinations, all eight tree
// code words, both external pair values and the held (frozen) Z of BC2.
module tb_berger_tsc_checkers;
  localparam int K = 8;
  localparam int R = 4;
  localparam int WORDS = 3000;

  typedef enum int {
    E_NONE, E_INFO1, E_CHECK1, E_UNI10, E_UNI01, E_EXT, E_KINDS
  } err_t;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [K-1:0] x;
  logic [R-1:0] c;
  logic fi, gi, s;
  logic bc1_z1, bc1_z2, bc2_z;

  berger_tsc_checkers dut (
    .x(x), .c(c), .fi(fi), .gi(gi), .s(s),
    .bc1_z1(bc1_z1), .bc1_z2(bc1_z2), .bc2_z(bc2_z)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4 * WORDS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bc1_detect [E_KINDS];
  int bc2_detect [E_KINDS];
  int injected   [E_KINDS];
  int all_zero_words, ext_pair_seen [2], bc2_frozen;
  bit [15:0] mtrc_seen;
  bit [7:0]  tree_seen;

  function automatic logic [R-1:0] encode(input logic [K-1:0] info);
    return R'(K - $countones(info));
  endfunction

  task automatic check(string tag, bit good);
    checks++;
    if (!good) begin
      failures++;
      $display("%s", tag);
    end
  endtask

  initial begin
    foreach (bc1_detect[i]) begin
      bc1_detect[i] = 0; bc2_detect[i] = 0; injected[i] = 0;
    end
    all_zero_words = 0; ext_pair_seen = '{0, 0}; bc2_frozen = 0;
    mtrc_seen = '0; tree_seen = '0;
    s = 1'b1; fi = 1'b0; gi = 1'b1;
    x = '1; c = '0;
    @(posedge clk);

    for (int n = 0; n < WORDS; n++) begin
      logic [K-1:0] info;
      logic [K+R-1:0] word;
      err_t kind;
      bit bc1_bad, bc2_bad, prev_z_held;

      // source
      case (n % 10)
        0:       info = '0;
        1:       info = '1;
        default: info = K'($urandom);
      endcase
      word = {encode(info), info};

      // channel
      kind = (n % 4 == 0) ? err_t'(1 + ($urandom % (E_KINDS - 1))) : E_NONE;
      case (kind)
        E_INFO1:  word[$urandom_range(K-1)] ^= 1'b1;
        E_CHECK1: word[K + $urandom_range(R-1)] ^= 1'b1;
        E_UNI10: begin
          if (word == '0) kind = E_NONE;
          else begin
            // clear a random non-empty subset of the ones
            logic [K+R-1:0] m;
            do m = (K+R)'($urandom) & word; while (m == '0);
            word &= ~m;
          end
        end
        E_UNI01: begin
          if (word == '1) kind = E_NONE;
          else begin
            logic [K+R-1:0] m;
            do m = (K+R)'($urandom) & ~word; while (m == '0);
            word |= m;
          end
        end
        default: ;
      endcase
      injected[kind]++;
      {c, x} = word;
      if (x == '0 && c == encode('0)) all_zero_words++;

      bc1_bad = 1'b0;
      bc2_bad = 1'b0;
      for (int ph = 0; ph < 2; ph++) begin
        prev_z_held = bc2_z;
        s  = ~s;
        fi = ~fi;
        gi = (kind == E_EXT) ? fi : ~fi;
        @(posedge clk);
        if (bc1_z1 == bc1_z2) bc1_bad = 1'b1;
        if (bc2_z != ~s) bc2_bad = 1'b1;
        if (bc2_z != ~s && bc2_z == prev_z_held) bc2_frozen++;
        if (kind != E_EXT) ext_pair_seen[fi]++;
        if (kind == E_NONE) begin
          mtrc_seen[{dut.u_bc1.u_mtrc.a1, dut.u_bc1.u_mtrc.b1,
                     dut.u_bc1.u_mtrc.a2, dut.u_bc1.u_mtrc.b2}] = 1'b1;
          tree_seen[dut.u_bc1.y_n[2:0]] = 1'b1;
        end
      end

      check($sformatf("word %0d kind=%s x=%h c=%h: BC1 flagged=%0d", n, kind.name(), x, c, bc1_bad),
            bc1_bad == (kind != E_NONE));
      check($sformatf("word %0d kind=%s x=%h c=%h: BC2 flagged=%0d", n, kind.name(), x, c, bc2_bad),
            bc2_bad == (kind != E_NONE && kind != E_EXT));
      if (bc1_bad) bc1_detect[kind]++;
      if (bc2_bad) bc2_detect[kind]++;
    end

    // every mechanism must have happened
    for (int k = E_INFO1; k < E_KINDS; k++) begin
      err_t e;
      e = err_t'(k);
      $display("%-8s injected %4d  BC1 detected %4d  BC2 detected %4d",
               e.name(), injected[k], bc1_detect[k], bc2_detect[k]);
      check($sformatf("%s never detected by BC1", e.name()), bc1_detect[k] > 0);
      if (e != E_EXT)
        check($sformatf("%s never detected by BC2", e.name()), bc2_detect[k] > 0);
    end
    $display("valid words %0d, all-zero words %0d, ext pair 10/01 %0d/%0d, BC2 frozen phases %0d",
             injected[E_NONE], all_zero_words, ext_pair_seen[1], ext_pair_seen[0], bc2_frozen);
    check("no valid word", injected[E_NONE] > 0);
    check("all-zero word never presented", all_zero_words > 0);
    check($sformatf("M-TRC inputs %b", mtrc_seen), mtrc_seen == 16'b0000_0100_0110_0000);
    check("tree code words incomplete", tree_seen == 8'hFF);
    check("external pair phase missing", ext_pair_seen[0] > 0 && ext_pair_seen[1] > 0);
    check("BC2 output never frozen", bc2_frozen > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench helper: drives one berger_tsc_checkers instance of size K with
// the all-zero and all-one words and WORDS random Berger code words, about
// a quarter of them corrupted by a single-bit error or a unidirectional
// (1->0 or 0->1) multi-bit error, one word per period of s (two clk
// cycles). BC1 must flag exactly the corrupted words (z1 == z2 in some
// cycle) and BC2 exactly those too (Z != ~s in some phase). Results are
// returned as check and failure counts; done rises when the run ends.
module workload_runner
  import berger_pkg::*;
#(
  parameter int K     = 8,
  parameter int WORDS = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int R = check_bits(K);
  localparam int N = K + R;

  logic [K-1:0] x;
  logic [R-1:0] c;
  logic fi, gi, s;
  logic z1, z2, z;

  berger_tsc_checkers #(.K(K)) dut (
    .x(x), .c(c), .fi(fi), .gi(gi), .s(s),
    .bc1_z1(z1), .bc1_z2(z2), .bc2_z(z)
  );

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] v;
    for (int b = 0; b < N; b++) v[b] = 1'($urandom);
    return v;
  endfunction

  task automatic check(string tag, bit good);
    checks++;
    if (!good) begin
      failures++;
      $display("%s", tag);
    end
  endtask

  initial begin
    int detected, clean;
    logic [N-1:0] word, m;
    logic [K-1:0] info;
    bit bad, bc1_bad, bc2_bad;
    int kind;
    checks = 0; failures = 0; done = 1'b0;
    detected = 0; clean = 0;
    s = 1'b1; fi = 1'b0; gi = 1'b1;
    x = '0; c = R'(K);
    @(posedge clk);
    for (int n = 0; n < WORDS; n++) begin
      info = K'(rand_word());
      if (n % 8 == 1) info &= K'(rand_word());
      if (n % 8 == 2) info |= K'(rand_word());
      if (n == 0) info = '0;
      if (n == 1) info = '1;
      word = {R'(K - $countones(info)), info};
      kind = (n % 4 == 3) ? 1 + int'($urandom % 3) : 0;
      bad  = (kind != 0);
      m    = rand_word();
      case (kind)
        1: word[$urandom_range(N-1)] ^= 1'b1;
        2: begin m &= word;  if (m == '0) bad = 1'b0; word &= ~m; end
        3: begin m &= ~word; if (m == '0) bad = 1'b0; word |= m;  end
        default: ;
      endcase
      {c, x} = word;
      bc1_bad = 1'b0;
      bc2_bad = 1'b0;
      for (int ph = 0; ph < 2; ph++) begin
        s = ~s; fi = ~fi; gi = ~fi;
        @(posedge clk);
        if (z1 == z2) bc1_bad = 1'b1;
        if (z != ~s) bc2_bad = 1'b1;
      end
      check($sformatf("K=%0d word %0d x=%h c=%h bad=%0d: BC1 %0d", K, n, x, c, bad, bc1_bad), bc1_bad == bad);
      check($sformatf("K=%0d word %0d x=%h c=%h bad=%0d: BC2 %0d", K, n, x, c, bad, bc2_bad), bc2_bad == bad);
      if (bad) detected++;
      else clean++;
    end
    check($sformatf("K=%0d saw no corrupted or no clean word", K), detected > 0 && clean > 0);
    $display("k=%0d r=%0d: %0d clean words accepted, %0d corrupted words flagged", K, R, clean, detected);
    done = 1'b1;
  end
endmodule

// Workload testbench: the code sizes of the cost and delay comparison,
// k = 8, 16, 32, 64 and 128 information bits (r = 4 ... 8 check bits).
//
// For each size a workload_runner drives one berger_tsc_checkers instance
// with the all-zero and all-one words and with random code words, about a
// quarter of them corrupted by a single-bit or a unidirectional multi-bit
// error. BC1 must flag exactly the corrupted words, and BC2's output must
// follow ~s over the whole period of s exactly for the clean ones.
//
// It also prints the adder count of each built 0's counter and the gate-
// input cost that follows from it with the published per-cell costs (FA
// and C-FA 10, HA and C-HA 4, TRC 12, M-TRC* 10 gate inputs), and checks
// that the counter uses k - r full adders as the cost analysis states.
module tb_workloads;
  import berger_pkg::*;

  localparam int NSIZES = 5;
  localparam int KS [NSIZES] = '{8, 16, 32, 64, 128};
  localparam int WORDS = 1500;
  // Published gate-input counts of BC1 and BC2 for the sizes above.
  localparam int GI1_PUB [NSIZES] = '{100, 186, 352, 678, 1324};
  localparam int GI2_PUB [NSIZES] = '{86, 172, 338, 664, 1310};

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4 * WORDS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, bit good);
    checks++;
    if (!good) begin
      failures++;
      $display("%s", tag);
    end
  endtask

  int rc [NSIZES];
  int rf [NSIZES];
  logic [NSIZES-1:0] done;

  workload_runner #(.K(8),   .WORDS(WORDS)) u_k8   (.clk(clk), .checks(rc[0]), .failures(rf[0]), .done(done[0]));
  workload_runner #(.K(16),  .WORDS(WORDS)) u_k16  (.clk(clk), .checks(rc[1]), .failures(rf[1]), .done(done[1]));
  workload_runner #(.K(32),  .WORDS(WORDS)) u_k32  (.clk(clk), .checks(rc[2]), .failures(rf[2]), .done(done[2]));
  workload_runner #(.K(64),  .WORDS(WORDS)) u_k64  (.clk(clk), .checks(rc[3]), .failures(rf[3]), .done(done[3]));
  workload_runner #(.K(128), .WORDS(WORDS)) u_k128 (.clk(clk), .checks(rc[4]), .failures(rf[4]), .done(done[4]));

  // Adder counts of the built counters and the resulting gate-input cost.
  function automatic void cost(input int k, output int fa, output int ha);
    int nb;
    fa = n_cfa(k);
    ha = n_cha(k);
    for (int w = 0; w < check_bits(k); w++) begin
      nb = col_bits(k, w);
      if (nb >= 2) begin
        fa += (nb % 2 == 0) ? (nb - 2) / 2 : (nb - 1) / 2;
        ha += (nb % 2 == 0) ? 1 : 0;
      end
    end
  endfunction

  initial begin
    wait (done == '1);
    foreach (rc[i]) begin
      checks   += rc[i];
      failures += rf[i];
    end
    foreach (KS[i]) begin
      int fa, ha, r, gi1, gi2;
      cost(KS[i], fa, ha);
      r   = check_bits(KS[i]);
      gi1 = 10 * fa + 4 * ha + 12 * r;
      gi2 = 10 * fa + 4 * ha + 12 * (r - 2) + 10;
      $display("k=%0d r=%0d: FA/C-FA %0d (k-r=%0d), HA/C-HA %0d (r-1=%0d), gate inputs BC1 %0d BC2 %0d",
               KS[i], r, fa, KS[i] - r, ha, r - 1, gi1, gi2);
      check($sformatf("k=%0d full-adder count %0d != k-r", KS[i], fa), fa == KS[i] - r);
      // Published gate-input counts; for k = 16 and 64 the first level of
      // this counter needs two C-HA cells, one half adder more than the
      // published count, i.e. 4 gate inputs more.
      check($sformatf("k=%0d gate inputs %0d/%0d differ from the published %0d/%0d (+%0d)",
                      KS[i], gi1, gi2, GI1_PUB[i], GI2_PUB[i], 4 * (ha - (r - 1))),
            gi1 == GI1_PUB[i] + 4 * (ha - (r - 1)) && gi2 == GI2_PUB[i] + 4 * (ha - (r - 1))
            && ha - (r - 1) == ((KS[i] % 3 == 1) ? 1 : 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

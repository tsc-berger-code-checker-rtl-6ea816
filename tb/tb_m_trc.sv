// Self-checking testbench for m_trc. All 64 combinations of the three
// input pairs: the output is complementary iff all three pairs are, and
// z1 = fi ^ a1 ^ a2 then. Also checks, for the three input combinations a
// BC1 checker can present (a1b1a2b2 = 0110, 0101 and 1010 for BC(12,8)),
// that both internal TRC cells see all four code patterns.
module tb_m_trc;
  logic fi, gi, a1, b1, a2, b2, z1, z2;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  m_trc dut (.fi(fi), .gi(gi), .a1(a1), .b1(b1), .a2(a2), .b2(b2), .z1(z1), .z2(z2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] trc1_seen, trc2_seen;
    logic [3:0] combos [3];
    combos = '{4'b0110, 4'b0101, 4'b1010};
    trc1_seen = '0;
    trc2_seen = '0;

    for (int v = 0; v < 64; v++) begin
      bit code;
      {fi, gi, a1, b1, a2, b2} = 6'(v);
      code = (fi != gi) && (a1 != b1) && (a2 != b2);
      @(posedge clk);
      checks++;
      if (code ? (z1 == z2 || z1 != (fi ^ a1 ^ a2)) : (z1 != z2)) begin
        failures++;
        $display("m_trc in %b%b %b%b %b%b -> %b%b", fi, gi, a1, b1, a2, b2, z1, z2);
      end
    end

    // Patterns seen by the two TRC cells under the reachable inputs.
    foreach (combos[i]) begin
      for (int p = 0; p < 2; p++) begin
        {a1, b1, a2, b2} = combos[i];
        fi = p[0];
        gi = ~p[0];
        @(posedge clk);
        trc1_seen[{fi, gi, a1, b1}] = 1'b1;
        trc2_seen[{dut.t1, dut.t2, a2, b2}] = 1'b1;
      end
    end
    checks++;
    if (trc1_seen != 16'b0000_0110_0110_0000 || trc2_seen != 16'b0000_0110_0110_0000) begin
      failures++;
      $display("TRC test patterns missing: trc1=%b trc2=%b", trc1_seen, trc2_seen);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

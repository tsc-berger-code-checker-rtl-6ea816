// Self-checking testbench for bc2_checker, K = 8, with s a free-running
// periodic signal. Every (x, c) pair (4096 cases) is held for one full
// period of s: for a code word Z must equal ~s in both phases; for a
// non-code word Z must differ from ~s in at least one phase. Cases are
// visited in a shuffled order so that the held value of Z at the start of a
// case varies. Also confirms M-TRC* sees its three reachable input
// combinations and its output gate both test patterns 00 and 11.
module tb_bc2_checker;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [7:0] x; logic [3:0] c; logic s, z;

  bc2_checker dut (.x(x), .c(c), .s(s), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] in_seen;
    bit [3:0]  gate_seen;
    int order [4096];
    int noncode_detected, code_periodic;
    in_seen = '0;
    gate_seen = '0;
    noncode_detected = 0;
    code_periodic = 0;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    s = 1'b0;
    x = '1; c = '0;
    @(posedge clk);

    foreach (order[i]) begin
      bit code, wrong;
      {x, c} = 12'(order[i]);
      code  = (int'(c) == 8 - $countones(x));
      wrong = 1'b0;
      for (int ph = 0; ph < 2; ph++) begin
        s = ~s;
        @(posedge clk);
        if (z != ~s) wrong = 1'b1;
        if (code) begin
          in_seen[{dut.u_mtrc.a1, dut.u_mtrc.b1, dut.u_mtrc.a2, dut.u_mtrc.b2}] = 1'b1;
          gate_seen[{dut.u_mtrc.t1, dut.u_mtrc.t2}] = 1'b1;
        end
      end
      checks++;
      if (wrong == code) begin
        failures++;
        $display("x=%h c=%h code=%0d but periodic=%0d", x, c, code, !wrong);
      end
      if (code && !wrong) code_periodic++;
      if (!code && wrong) noncode_detected++;
    end
    checks++;
    if (in_seen != 16'b0000_0100_0110_0000 || gate_seen != 4'b1001) begin
      failures++;
      $display("coverage: M-TRC* inputs %b, gate patterns %b", in_seen, gate_seen);
    end
    $display("code words periodic: %0d, non-code words detected: %0d", code_periodic, noncode_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for c_ha: all four input patterns, checking that
// 2*co + s equals the number of zero inputs.
module tb_c_ha;
  logic a, b, s, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  c_ha dut (.a(a), .b(b), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int zeros;
      {a, b} = 2'(v);
      zeros = 2 - $countones(2'(v));
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(zeros)) begin
        failures++;
        $display("c_ha a=%b b=%b: got %0d expected %0d", a, b, {co, s}, zeros);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

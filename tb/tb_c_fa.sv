// Self-checking testbench for c_fa: applies all eight input patterns and
// checks that 2*co + s equals the number of zero inputs.
module tb_c_fa;
  logic a, b, c, s, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  c_fa dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int zeros;
      {a, b, c} = 3'(v);
      zeros = 3 - $countones(3'(v));
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(zeros)) begin
        failures++;
        $display("c_fa a=%b b=%b c=%b: got %0d expected %0d", a, b, c, {co, s}, zeros);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

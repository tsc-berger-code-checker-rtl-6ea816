// Self-checking testbench for half_adder: all four input patterns, checking
// 2*co + s = a + b.
module tb_half_adder;
  logic a, b, s, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int ones;
      {a, b} = 2'(v);
      ones = $countones(2'(v));
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(ones)) begin
        failures++;
        $display("half_adder %b%b: got %0d expected %0d", a, b, {co, s}, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for full_adder: all eight input patterns, checking
// 2*co + s = a + b + c.
module tb_full_adder;
  logic a, b, c, s, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      ones = $countones(3'(v));
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(ones)) begin
        failures++;
        $display("full_adder %b%b%b: got %0d expected %0d", a, b, c, {co, s}, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for zeros_counter.
// K = 8 (default) and K = 16 are checked exhaustively, K = 2 and 4
// exhaustively, K = 128 on random words plus the all-zero and all-one
// words. The reference is K minus the population count of x. For K = 8 it
// also confirms the count table of the reference example: y3 is 1 only for
// the all-zero word and y2..y0 take all eight values.
module tb_zeros_counter;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [7:0]   x8;   logic [3:0] y8;
  logic [15:0]  x16;  logic [4:0] y16;
  logic [1:0]   x2;   logic [1:0] y2;
  logic [3:0]   x4;   logic [2:0] y4;
  logic [127:0] x128; logic [7:0] y128;

  zeros_counter                dut8   (.x(x8),   .y(y8));
  zeros_counter #(.K(16))      dut16  (.x(x16),  .y(y16));
  zeros_counter #(.K(2))       dut2   (.x(x2),   .y(y2));
  zeros_counter #(.K(4))       dut4   (.x(x4),   .y(y4));
  zeros_counter #(.K(128))     dut128 (.x(x128), .y(y128));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    bit [7:0] low_seen;
    int y3_ones;
    low_seen = '0;
    y3_ones  = 0;
    x16 = '0; x2 = '0; x4 = '0; x128 = '0; x8 = '0;

    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      expect_eq($sformatf("K=8 x=%h", x8), int'(y8), 8 - $countones(x8));
      low_seen[y8[2:0]] = 1'b1;
      if (y8[3]) begin
        y3_ones++;
        expect_eq("K=8 y3 only for all-zero word", int'(x8), 0);
      end
    end
    expect_eq("K=8 y3 set count", y3_ones, 1);
    expect_eq("K=8 y2..y0 all values", int'(low_seen), 255);

    for (int v = 0; v < 4; v++) begin
      x2 = 2'(v); #1;
      expect_eq($sformatf("K=2 x=%h", x2), int'(y2), 2 - $countones(x2));
    end
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v); #1;
      expect_eq($sformatf("K=4 x=%h", x4), int'(y4), 4 - $countones(x4));
    end
    for (int v = 0; v < 65536; v++) begin
      x16 = 16'(v); #1;
      if (int'(y16) != 16 - $countones(x16)) expect_eq($sformatf("K=16 x=%h", x16), int'(y16), 16 - $countones(x16));
      else checks++;
    end

    x128 = '0; #1;
    expect_eq("K=128 all zero", int'(y128), 128);
    x128 = '1; #1;
    expect_eq("K=128 all one", int'(y128), 0);
    for (int n = 0; n < 2000; n++) begin
      x128 = {$urandom, $urandom, $urandom, $urandom};
      // vary the density so that small and large counts both occur
      if (n % 3 == 1) x128 = x128 & {$urandom, $urandom, $urandom, $urandom};
      if (n % 3 == 2) x128 = x128 | {$urandom, $urandom, $urandom, $urandom};
      #1;
      expect_eq($sformatf("K=128 x=%h", x128), int'(y128), 128 - $countones(x128));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

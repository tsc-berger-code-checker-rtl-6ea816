// Self-checking testbench for trc_tree. N = 3 (the BC(12,8) tree) is
// checked over all 64 rail combinations, N = 1, 2, 4, 7 likewise or
// exhaustively over code words plus single non-code pairs. A tree output
// is complementary iff every input pair is; its z1 rail is then the parity
// of the a-rails. For N = 3 the test also confirms the tree receives all
// 2^3 two-rail code words.
module tb_trc_tree;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3; logic z1_3, z2_3;
  logic [0:0] a1, b1; logic z1_1, z2_1;
  logic [1:0] a2, b2; logic z1_2, z2_2;
  logic [3:0] a4, b4; logic z1_4, z2_4;
  logic [6:0] a7, b7; logic z1_7, z2_7;

  trc_tree          dut3 (.a(a3), .b(b3), .z1(z1_3), .z2(z2_3));
  trc_tree #(.N(1)) dut1 (.a(a1), .b(b1), .z1(z1_1), .z2(z2_1));
  trc_tree #(.N(2)) dut2 (.a(a2), .b(b2), .z1(z1_2), .z2(z2_2));
  trc_tree #(.N(4)) dut4 (.a(a4), .b(b4), .z1(z1_4), .z2(z2_4));
  trc_tree #(.N(7)) dut7 (.a(a7), .b(b7), .z1(z1_7), .z2(z2_7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: complementary output iff all pairs complementary; then
  // z1 is the XOR of the a rails.
  function automatic bit ok(input logic [15:0] a, input logic [15:0] b,
                            input int n, input logic z1, input logic z2);
    bit code;
    bit par;
    code = 1'b1;
    par  = 1'b0;
    for (int i = 0; i < n; i++) begin
      if (a[i] == b[i]) code = 1'b0;
      par ^= a[i];
    end
    if (code) return (z1 != z2) && (z1 == par);
    return z1 == z2;
  endfunction

  task automatic check(string tag, bit good);
    checks++;
    if (!good) begin
      failures++;
      $display("%s", tag);
    end
  endtask

  initial begin
    bit [7:0] code_seen;
    code_seen = '0;
    a1 = '0; b1 = '0; a2 = '0; b2 = '0; a4 = '0; b4 = '0; a7 = '0; b7 = '0;
    for (int v = 0; v < 64; v++) begin
      {a3, b3} = 6'(v); #1;
      check($sformatf("N=3 a=%b b=%b z=%b%b", a3, b3, z1_3, z2_3), ok(16'(a3), 16'(b3), 3, z1_3, z2_3));
      if ((a3 ^ b3) == 3'b111) code_seen[a3] = 1'b1;
    end
    check("N=3 all code words", code_seen == 8'hFF);
    for (int v = 0; v < 4; v++) begin
      {a1, b1} = 2'(v); #1;
      check($sformatf("N=1 a=%b b=%b", a1, b1), ok(16'(a1), 16'(b1), 1, z1_1, z2_1));
    end
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = 4'(v); #1;
      check($sformatf("N=2 a=%b b=%b", a2, b2), ok(16'(a2), 16'(b2), 2, z1_2, z2_2));
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v); #1;
      check($sformatf("N=4 a=%b b=%b", a4, b4), ok(16'(a4), 16'(b4), 4, z1_4, z2_4));
    end
    for (int v = 0; v < 16384; v++) begin
      {a7, b7} = 14'(v); #1;
      check($sformatf("N=7 a=%b b=%b", a7, b7), ok(16'(a7), 16'(b7), 7, z1_7, z2_7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for bc1_checker.
// K = 8: every information word x, every check symbol c and both values of
// the external pair (fi,gi) = 10/01 (8192 cases), plus non-code external
// pairs 00/11 on code words. A code word (c = number of zeros in x) with a
// complementary external pair must give z1 != z2; anything else z1 == z2.
// It also confirms the self-testing coverage the design relies on: over the
// code space the M-TRC inputs a1b1a2b2 take exactly three values and the
// tree receives all 2^(r-1) code words. K = 16 is checked on random words
// with single-bit and unidirectional errors.
module tb_bc1_checker;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [7:0]  x;   logic [3:0] c;   logic fi, gi, z1, z2;
  logic [15:0] xw;  logic [4:0] cw;  logic fw, gw, zw1, zw2;

  bc1_checker              dut   (.x(x),  .c(c),  .fi(fi), .gi(gi), .z1(z1),  .z2(z2));
  bc1_checker #(.K(16))    dut16 (.x(xw), .c(cw), .fi(fw), .gi(gw), .z1(zw1), .z2(zw2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
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

  initial begin
    bit [15:0] mtrc_seen;
    bit [7:0]  tree_seen;
    mtrc_seen = '0;
    tree_seen = '0;
    xw = '0; cw = '0; fw = 1'b0; gw = 1'b1;

    for (int v = 0; v < 8192; v++) begin
      bit code;
      {x, c, fi} = 13'(v);
      gi = ~fi;
      #1;
      code = (int'(c) == 8 - $countones(x));
      check($sformatf("K=8 x=%h c=%h f=%b: z=%b%b code=%0d", x, c, fi, z1, z2, code),
            code ? (z1 != z2) : (z1 == z2));
      if (code) begin
        mtrc_seen[{dut.u_mtrc.a1, dut.u_mtrc.b1, dut.u_mtrc.a2, dut.u_mtrc.b2}] = 1'b1;
        tree_seen[~dut.y[2:0]] = 1'b1;
      end
    end
    check($sformatf("M-TRC input set %b", mtrc_seen), mtrc_seen == 16'b0000_0100_0110_0000);
    check("tree receives all code words", tree_seen == 8'hFF);

    // non-code external pair on valid words
    for (int n = 0; n < 64; n++) begin
      x = 8'($urandom);
      c = 4'(8 - $countones(x));
      {fi, gi} = n[0] ? 2'b11 : 2'b00;
      #1;
      check("non-code external pair not flagged", z1 == z2);
    end

    // K = 16, random code words and errors
    for (int n = 0; n < 4000; n++) begin
      int zeros;
      int kind;
      xw = 16'($urandom);
      if (n % 4 == 1) xw = xw & 16'($urandom);
      zeros = 16 - $countones(xw);
      cw = 5'(zeros);
      {fw, gw} = n[1] ? 2'b10 : 2'b01;
      kind = n % 3;
      if (kind == 1) xw[$urandom_range(15)] ^= 1'b1;           // single information error
      if (kind == 2) cw[$urandom_range(4)] ^= 1'b1;            // single check error
      #1;
      check($sformatf("K=16 x=%h c=%h kind=%0d z=%b%b", xw, cw, kind, zw1, zw2),
            (kind == 0) ? (zw1 != zw2) : (zw1 == zw2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

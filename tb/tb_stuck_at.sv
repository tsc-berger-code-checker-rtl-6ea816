// Stuck-at fault testbench for the two BC(12,8) checkers (K = 8).
//
// Every net between cells of BC1 and BC2 (first-level counter outputs,
// adder sums and carries, inverted counter bits, tree outputs, M-TRC's
// internal pair and outputs, M-TRC*'s XOR outputs) and the four product
// terms inside every two-rail checker cell is forced to 0 and to 1
// in turn with force/release, and the checker is run over all 256 valid
// code words. For each fault:
//   BC1 self-testing: some valid word (with fi = 0 or 1) gives z1 == z2.
//   BC1 fault-secure: no valid word gives a complementary output that
//                     differs from the fault-free one.
//   BC2 self-testing: some valid word makes Z differ from ~s in a phase.
// As a contrast, BC1 is also graded with the external pair held at
// (fi,gi) = (0,1): then the closing stage no longer sees all its test
// patterns and at least one fault must go undetected, which is the reason
// the external pair exists.
// These are the two properties the totally-self-checking claim rests on,
// checked here for single stuck-at faults on these nets (faults inside the
// adder cells and CMOS-GATE*, and on fan-out branches, are not modelled).
`define BC1 dut.u_bc1
`define BC2 dut.u_bc2
`define F(n, p) n: if (v) force p = 1'b1; else force p = 1'b0;
`define R(n, p) n: release p;

module tb_stuck_at;
  localparam int NF1 = 42;   // BC1 nets
  localparam int NF2 = 28;   // BC2 nets

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [7:0] x;
  logic [3:0] c;
  logic fi, gi, s;
  logic z1, z2, z;

  berger_tsc_checkers dut (
    .x(x), .c(c), .fi(fi), .gi(gi), .s(s),
    .bc1_z1(z1), .bc1_z2(z2), .bc2_z(z)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic inject1(input int n, input bit v);
    case (n)
      `F(0,  `BC1.u_cnt.fl_s[0]) `F(1,  `BC1.u_cnt.fl_s[1]) `F(2,  `BC1.u_cnt.fl_s[2])
      `F(3,  `BC1.u_cnt.fl_c[0]) `F(4,  `BC1.u_cnt.fl_c[1]) `F(5,  `BC1.u_cnt.fl_c[2])
      `F(6,  `BC1.u_cnt.col[0].g_cell[0].s)  `F(7,  `BC1.u_cnt.col[0].g_cell[0].co)
      `F(8,  `BC1.u_cnt.col[1].g_cell[0].s)  `F(9,  `BC1.u_cnt.col[1].g_cell[0].co)
      `F(10, `BC1.u_cnt.col[1].g_cell[1].s)  `F(11, `BC1.u_cnt.col[1].g_cell[1].co)
      `F(12, `BC1.u_cnt.col[2].g_cell[0].s)  `F(13, `BC1.u_cnt.col[2].g_cell[0].co)
      `F(14, `BC1.y_n[0]) `F(15, `BC1.y_n[1]) `F(16, `BC1.y_n[2]) `F(17, `BC1.y_n[3])
      `F(18, `BC1.u_tree.g_tree.g_node[0].f) `F(19, `BC1.u_tree.g_tree.g_node[0].g)
      `F(20, `BC1.u_tree.g_tree.g_node[1].f) `F(21, `BC1.u_tree.g_tree.g_node[1].g)
      `F(22, `BC1.u_mtrc.t1) `F(23, `BC1.u_mtrc.t2)
      `F(24, `BC1.z1)        `F(25, `BC1.z2)
      `F(26, `BC1.u_tree.g_tree.g_node[0].u_trc.p_ab)
      `F(27, `BC1.u_tree.g_tree.g_node[0].u_trc.p_ba)
      `F(28, `BC1.u_tree.g_tree.g_node[0].u_trc.p_aa)
      `F(29, `BC1.u_tree.g_tree.g_node[0].u_trc.p_bb)
      `F(30, `BC1.u_tree.g_tree.g_node[1].u_trc.p_ab)
      `F(31, `BC1.u_tree.g_tree.g_node[1].u_trc.p_ba)
      `F(32, `BC1.u_tree.g_tree.g_node[1].u_trc.p_aa)
      `F(33, `BC1.u_tree.g_tree.g_node[1].u_trc.p_bb)
      `F(34, `BC1.u_mtrc.u_trc1.p_ab)
      `F(35, `BC1.u_mtrc.u_trc1.p_ba)
      `F(36, `BC1.u_mtrc.u_trc1.p_aa)
      `F(37, `BC1.u_mtrc.u_trc1.p_bb)
      `F(38, `BC1.u_mtrc.u_trc2.p_ab)
      `F(39, `BC1.u_mtrc.u_trc2.p_ba)
      `F(40, `BC1.u_mtrc.u_trc2.p_aa)
      `F(41, `BC1.u_mtrc.u_trc2.p_bb)
      default: ;
    endcase
  endtask

  task automatic release1(input int n);
    case (n)
      `R(0,  `BC1.u_cnt.fl_s[0]) `R(1,  `BC1.u_cnt.fl_s[1]) `R(2,  `BC1.u_cnt.fl_s[2])
      `R(3,  `BC1.u_cnt.fl_c[0]) `R(4,  `BC1.u_cnt.fl_c[1]) `R(5,  `BC1.u_cnt.fl_c[2])
      `R(6,  `BC1.u_cnt.col[0].g_cell[0].s)  `R(7,  `BC1.u_cnt.col[0].g_cell[0].co)
      `R(8,  `BC1.u_cnt.col[1].g_cell[0].s)  `R(9,  `BC1.u_cnt.col[1].g_cell[0].co)
      `R(10, `BC1.u_cnt.col[1].g_cell[1].s)  `R(11, `BC1.u_cnt.col[1].g_cell[1].co)
      `R(12, `BC1.u_cnt.col[2].g_cell[0].s)  `R(13, `BC1.u_cnt.col[2].g_cell[0].co)
      `R(14, `BC1.y_n[0]) `R(15, `BC1.y_n[1]) `R(16, `BC1.y_n[2]) `R(17, `BC1.y_n[3])
      `R(18, `BC1.u_tree.g_tree.g_node[0].f) `R(19, `BC1.u_tree.g_tree.g_node[0].g)
      `R(20, `BC1.u_tree.g_tree.g_node[1].f) `R(21, `BC1.u_tree.g_tree.g_node[1].g)
      `R(22, `BC1.u_mtrc.t1) `R(23, `BC1.u_mtrc.t2)
      `R(24, `BC1.z1)        `R(25, `BC1.z2)
      `R(26, `BC1.u_tree.g_tree.g_node[0].u_trc.p_ab)
      `R(27, `BC1.u_tree.g_tree.g_node[0].u_trc.p_ba)
      `R(28, `BC1.u_tree.g_tree.g_node[0].u_trc.p_aa)
      `R(29, `BC1.u_tree.g_tree.g_node[0].u_trc.p_bb)
      `R(30, `BC1.u_tree.g_tree.g_node[1].u_trc.p_ab)
      `R(31, `BC1.u_tree.g_tree.g_node[1].u_trc.p_ba)
      `R(32, `BC1.u_tree.g_tree.g_node[1].u_trc.p_aa)
      `R(33, `BC1.u_tree.g_tree.g_node[1].u_trc.p_bb)
      `R(34, `BC1.u_mtrc.u_trc1.p_ab)
      `R(35, `BC1.u_mtrc.u_trc1.p_ba)
      `R(36, `BC1.u_mtrc.u_trc1.p_aa)
      `R(37, `BC1.u_mtrc.u_trc1.p_bb)
      `R(38, `BC1.u_mtrc.u_trc2.p_ab)
      `R(39, `BC1.u_mtrc.u_trc2.p_ba)
      `R(40, `BC1.u_mtrc.u_trc2.p_aa)
      `R(41, `BC1.u_mtrc.u_trc2.p_bb)
      default: ;
    endcase
  endtask

  task automatic inject2(input int n, input bit v);
    case (n)
      `F(0,  `BC2.u_cnt.fl_s[0]) `F(1,  `BC2.u_cnt.fl_s[1]) `F(2,  `BC2.u_cnt.fl_s[2])
      `F(3,  `BC2.u_cnt.fl_c[0]) `F(4,  `BC2.u_cnt.fl_c[1]) `F(5,  `BC2.u_cnt.fl_c[2])
      `F(6,  `BC2.u_cnt.col[0].g_cell[0].s)  `F(7,  `BC2.u_cnt.col[0].g_cell[0].co)
      `F(8,  `BC2.u_cnt.col[1].g_cell[0].s)  `F(9,  `BC2.u_cnt.col[1].g_cell[0].co)
      `F(10, `BC2.u_cnt.col[1].g_cell[1].s)  `F(11, `BC2.u_cnt.col[1].g_cell[1].co)
      `F(12, `BC2.u_cnt.col[2].g_cell[0].s)  `F(13, `BC2.u_cnt.col[2].g_cell[0].co)
      `F(14, `BC2.y_n[0]) `F(15, `BC2.y_n[1]) `F(16, `BC2.y_n[2]) `F(17, `BC2.y_n[3])
      `F(18, `BC2.u_tree.g_tree.g_node[0].f) `F(19, `BC2.u_tree.g_tree.g_node[0].g)
      `F(20, `BC2.u_mtrc.g1) `F(21, `BC2.u_mtrc.g2)
      `F(22, `BC2.u_mtrc.t1) `F(23, `BC2.u_mtrc.t2)
      `F(24, `BC2.u_tree.g_tree.g_node[0].u_trc.p_ab)
      `F(25, `BC2.u_tree.g_tree.g_node[0].u_trc.p_ba)
      `F(26, `BC2.u_tree.g_tree.g_node[0].u_trc.p_aa)
      `F(27, `BC2.u_tree.g_tree.g_node[0].u_trc.p_bb)
      default: ;
    endcase
  endtask

  task automatic release2(input int n);
    case (n)
      `R(0,  `BC2.u_cnt.fl_s[0]) `R(1,  `BC2.u_cnt.fl_s[1]) `R(2,  `BC2.u_cnt.fl_s[2])
      `R(3,  `BC2.u_cnt.fl_c[0]) `R(4,  `BC2.u_cnt.fl_c[1]) `R(5,  `BC2.u_cnt.fl_c[2])
      `R(6,  `BC2.u_cnt.col[0].g_cell[0].s)  `R(7,  `BC2.u_cnt.col[0].g_cell[0].co)
      `R(8,  `BC2.u_cnt.col[1].g_cell[0].s)  `R(9,  `BC2.u_cnt.col[1].g_cell[0].co)
      `R(10, `BC2.u_cnt.col[1].g_cell[1].s)  `R(11, `BC2.u_cnt.col[1].g_cell[1].co)
      `R(12, `BC2.u_cnt.col[2].g_cell[0].s)  `R(13, `BC2.u_cnt.col[2].g_cell[0].co)
      `R(14, `BC2.y_n[0]) `R(15, `BC2.y_n[1]) `R(16, `BC2.y_n[2]) `R(17, `BC2.y_n[3])
      `R(18, `BC2.u_tree.g_tree.g_node[0].f) `R(19, `BC2.u_tree.g_tree.g_node[0].g)
      `R(20, `BC2.u_mtrc.g1) `R(21, `BC2.u_mtrc.g2)
      `R(22, `BC2.u_mtrc.t1) `R(23, `BC2.u_mtrc.t2)
      `R(24, `BC2.u_tree.g_tree.g_node[0].u_trc.p_ab)
      `R(25, `BC2.u_tree.g_tree.g_node[0].u_trc.p_ba)
      `R(26, `BC2.u_tree.g_tree.g_node[0].u_trc.p_aa)
      `R(27, `BC2.u_tree.g_tree.g_node[0].u_trc.p_bb)
      default: ;
    endcase
  endtask

  // Fault-free BC1 output z1 for a valid word: fi ^ y3 ^ parity(~y[2:0]).
  function automatic logic bc1_good_z1(input logic [7:0] xi, input logic fiv);
    logic [3:0] y;
    y = 4'(8 - $countones(xi));
    return fiv ^ y[3] ^ (^(~y[2:0]));
  endfunction

  initial begin
    int st_bc1, st_bc2, st_fixed;
    st_bc1 = 0;
    st_fixed = 0;
    st_bc2 = 0;
    s = 1'b0; fi = 1'b0; gi = 1'b1; x = '0; c = 4'd8;
    @(posedge clk);

    // fault-free reference must hold first
    for (int w = 0; w < 256; w++) begin
      x = 8'(w); c = 4'(8 - $countones(x));
      for (int p = 0; p < 2; p++) begin
        fi = p[0]; gi = ~p[0];
        #1;
        checks++;
        if (z1 == z2 || z1 != bc1_good_z1(x, fi)) begin
          failures++;
          $display("fault-free BC1 wrong for x=%h fi=%b", x, fi);
        end
      end
    end

    for (int n = 0; n < NF1; n++) begin
      for (int v = 0; v < 2; v++) begin
        bit detected, unsafe, detected_fixed;
        detected = 1'b0;
        detected_fixed = 1'b0;
        unsafe   = 1'b0;
        inject1(n, v[0]);
        for (int w = 0; w < 256; w++) begin
          x = 8'(w); c = 4'(8 - $countones(x));
          for (int p = 0; p < 2; p++) begin
            fi = p[0]; gi = ~p[0];
            #1;
            if (z1 == z2 && p == 0) detected_fixed = 1'b1;
            if (z1 == z2) detected = 1'b1;
            else if (z1 != bc1_good_z1(x, fi)) unsafe = 1'b1;
          end
        end
        release1(n);
        #1;
        checks += 2;
        if (!detected) begin
          failures++;
          $display("BC1 net %0d stuck-at-%0d never shows at the output", n, v);
        end
        if (unsafe) begin
          failures++;
          $display("BC1 net %0d stuck-at-%0d gives a wrong code output", n, v);
        end
        if (detected) st_bc1++;
        if (detected_fixed) st_fixed++;
        else $display("with a constant external pair, BC1 net %0d stuck-at-%0d escapes", n, v);
      end
    end

    for (int n = 0; n < NF2; n++) begin
      for (int v = 0; v < 2; v++) begin
        bit detected;
        detected = 1'b0;
        inject2(n, v[0]);
        for (int w = 0; w < 256; w++) begin
          x = 8'(w); c = 4'(8 - $countones(x));
          for (int ph = 0; ph < 2; ph++) begin
            s = ~s;
            @(posedge clk);
            if (z != ~s) detected = 1'b1;
          end
        end
        release2(n);
        #1;
        checks++;
        if (!detected) begin
          failures++;
          $display("BC2 net %0d stuck-at-%0d never shows at the output", n, v);
        end
        if (detected) st_bc2++;
      end
    end

    $display("BC1: %0d of %0d stuck-at faults detected, BC2: %0d of %0d",
             st_bc1, 2 * NF1, st_bc2, 2 * NF2);
    $display("BC1 with the external pair held constant: %0d of %0d detected",
             st_fixed, 2 * NF1);
    checks++;
    if (st_fixed == 2 * NF1) begin
      failures++;
      $display("a constant external pair should leave some fault undetected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

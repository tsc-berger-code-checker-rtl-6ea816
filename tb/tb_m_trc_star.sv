// Self-checking testbench for m_trc_star.
// 1. The six rows of the M-TRC* truth table (a1b1a2b2 = 0110, 1010, 0101,
//    s = 0 and 1): g1, g2, t1, t2 and Z are compared with the table.
// 2. All 16 input combinations over a full period of s, starting from each
//    value of Z: code inputs must give Z = ~s in both phases; non-code
//    inputs must give Z != ~s in at least one phase (aperiodic output).
module tb_m_trc_star;
  logic a1, b1, a2, b2, s, z;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  m_trc_star dut (.a1(a1), .b1(b1), .a2(a2), .b2(b2), .s(s), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {a1,b1,a2,b2,s} -> {g1,g2,t1,t2,z}
  typedef struct packed {
    logic [4:0] in;
    logic [4:0] out;
  } row_t;

  initial begin
    row_t table3 [6];
    table3 = '{
      '{5'b01100, 5'b10111},
      '{5'b01101, 5'b01000},
      '{5'b10100, 5'b00111},
      '{5'b10101, 5'b11000},
      '{5'b01010, 5'b11111},
      '{5'b01011, 5'b00000}
    };
    foreach (table3[i]) begin
      {a1, b1, a2, b2, s} = table3[i].in;
      @(posedge clk);
      checks++;
      if ({dut.g1, dut.g2, dut.t1, dut.t2, z} !== table3[i].out) begin
        failures++;
        $display("row %0d in=%b: got %b expected %b", i, table3[i].in,
                 {dut.g1, dut.g2, dut.t1, dut.t2, z}, table3[i].out);
      end
    end

    for (int start = 0; start < 2; start++) begin
      for (int v = 0; v < 16; v++) begin
        bit code;
        bit wrong;
        // drive Z to a known value with a code input first
        {a1, b1, a2, b2} = 4'b0110;
        s = ~start[0];
        @(posedge clk);
        {a1, b1, a2, b2} = 4'(v);
        code  = (a1 != b1) && (a2 != b2);
        wrong = 1'b0;
        for (int ph = 0; ph < 2; ph++) begin
          s = ph[0];
          @(posedge clk);
          if (z != ~s) wrong = 1'b1;
        end
        checks++;
        if (wrong == code) begin
          failures++;
          $display("input %b (code=%0d) start=%0d: periodic=%0d", v[3:0], code, start, !wrong);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

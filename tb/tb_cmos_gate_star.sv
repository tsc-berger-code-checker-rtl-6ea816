// Self-checking testbench for cmos_gate_star: Z follows the common value
// of t1 and t2 when they agree and holds its last value when they differ.
// A reference model keeps the expected held value; 400 random input steps
// plus a directed sequence.
module tb_cmos_gate_star;
  logic t1, t2, z;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  cmos_gate_star dut (.t1(t1), .t2(t2), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    logic [1:0] seq [8];
    int holds;
    seq = '{2'b00, 2'b01, 2'b10, 2'b11, 2'b10, 2'b01, 2'b00, 2'b10};
    holds = 0;
    // start from a driven state
    {t1, t2} = 2'b11; model = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 408; n++) begin
      logic [1:0] v;
      v = (n < 8) ? seq[n] : 2'($urandom);
      {t1, t2} = v;
      if (v[1] == v[0]) model = v[1];
      else holds++;
      @(posedge clk);
      checks++;
      if (z !== model) begin
        failures++;
        $display("cmos_gate_star t=%b: z=%b expected %b", v, z, model);
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("no hold step exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// CMOS-GATE*: the output stage of the periodic checker M-TRC*.
//
// At transistor level the gate is a stack of two series devices from Z to
// ground and two series devices from Z to the supply, all gated by t1 and t2.
// When t1 and t2 agree one stack conducts and Z takes the common input value
// (Z = t1 = t2, the relation the M-TRC* truth table gives); when they differ
// neither stack conducts and Z floats, keeping the charge of its last driven
// value. The gate is tested by the input patterns 00 and 11.
// In RTL the floating node is modelled as a level-sensitive hold: Z follows
// t1 while t1 = t2 and keeps its value otherwise. That hold is the intended
// behaviour, not a coding slip: a non-code input freezes Z, so the periodic
// output stops toggling, which is how the checker signals an error. A
// synthesis tool therefore infers a latch here. Modelling the floating node
// as a held value (rather than a decaying one) is this design's choice.
module cmos_gate_star (
  input  logic t1,
  input  logic t2,
  output logic z
);
  always_latch begin
    if (t1 == t2) z = t1;
  end
endmodule

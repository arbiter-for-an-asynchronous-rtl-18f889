// c_element: two-input Muller C-element, the state-holding gate of the
// arbiter.
//
// The output follows the inputs when they agree and keeps its value when they
// differ:  a=0 b=0 -> y=0,  a=1 b=1 -> y=1,  a!=b -> y holds.
// In the transistor cell this is a pull-up/pull-down stack that drives the
// storage node only when both inputs agree, with a weak feedback inverter that
// keeps the value otherwise. Here the same behaviour is written as a
// level-sensitive latch that is transparent while a == b and whose data input
// is a. The latch is intended: it is the state element of a clockless circuit.
// The cell has no reset; driving both inputs low clears it.
//
// Interface: inputs a, b; output y. Timing: zero delay, y changes in the same
// time step as the input change that makes a and b agree.
// The truth table is the cell's standard definition; describing it as a latch
// is this design's choice.
module c_element (
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (a == b) y = a;
  end

endmodule

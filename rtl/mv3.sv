// mv3: 3-input majority voter, MV(A,B,C) = AB + AC + BC.
//
// The majority gate is the basic logic gate of quantum-dot cellular automata (five
// cells in a cross). It is the voter of a TMR stage, and with one input held at a
// constant (the control input) it becomes a 2-input AND (control 0) or OR (control 1).
// Purely combinational: the output follows the inputs with no clock.
//
// The function follows the source design exactly; nothing here is an own choice.
module mv3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule

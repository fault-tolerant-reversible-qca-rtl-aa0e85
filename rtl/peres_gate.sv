// peres_gate: 3x3 reversible Peres gate.
//
//   P = A,  Q = A ^ B,  R = (A & B) ^ C.
// It maps the eight input patterns one-to-one onto the eight output patterns, so the
// inputs can always be recovered from the outputs. With C = 0 it also yields A AND B,
// which is how the reversible full adder obtains its carry terms. Combinational.
//
// The source design names the Peres gate among the known reversible gates; its
// equations are the standard ones and are not taken from the source.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule

// rev_full_adder: reversible full adder, the module replicated three times in a TMR
// stage.
//
// Two cascaded Peres gates form a 4-input, 4-output reversible circuit:
//   gate 1 (A, B, K)          -> P1 = A,       Q1 = A ^ B,  R1 = AB ^ K
//   gate 2 (Q1, Cin, R1)      -> P2 = A ^ B,   Q2 = A ^ B ^ Cin,  R2 = (A^B)Cin ^ AB ^ K
// With the constant input K = 0, Q2 is the sum and R2 the carry out; P1 and P2 are
// garbage outputs that keep the mapping one-to-one. Port vector d packs the inputs
// as {K, Cin, B, A} (bit 0 = A) and q packs the outputs as
// {Cout, Sum, A^B, A} (bit 0 = A). Combinational.
//
// The source design says only that the replicated modules may be any reversible QCA
// circuit, such as a reversible full adder; the two-Peres-gate structure is an own
// choice, the simplest reversible full adder built from a gate the source names.
module rev_full_adder
  import rqca_pkg::*;
(
  input  logic [RFA_WIDTH-1:0] d,  // {K (constant 0), Cin, B, A}
  output logic [RFA_WIDTH-1:0] q   // {Cout, Sum, A^B, A}
);

  logic p1, q1, r1;

  peres_gate u_pg1 (.a(d[0]), .b(d[1]), .c(d[3]), .p(p1),   .q(q1),   .r(r1));
  peres_gate u_pg2 (.a(q1),   .b(d[2]), .c(r1),   .p(q[1]), .q(q[2]), .r(q[3]));

  always_comb q[0] = p1;

endmodule

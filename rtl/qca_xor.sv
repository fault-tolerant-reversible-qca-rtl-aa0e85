// qca_xor: 2-input XOR built only from majority gates and inverters.
//
// QCA has no XOR primitive, so the comparator builds each XOR from three majority
// gates: two ANDs (majority gates whose control input is fixed at logic 0, printed as
// polarization -1.00 in the layout) form a&~b and ~a&b, and an OR (control input fixed
// at logic 1, polarization 1.00) merges them:
//   y = MV( MV(a, ~b, 0), MV(~a, b, 0), 1 ).
// Three of these make up nine of the comparator's majority gates. Combinational.
//
// The gate count and the fixed control polarizations follow the source layout; the
// exact placement of the two inverters is an own reading of that layout.
module qca_xor (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n;
  logic and_a_nb, and_na_b;

  always_comb begin
    a_n = ~a;
    b_n = ~b;
  end

  mv3 u_and0 (.a(a),        .b(b_n),      .c(1'b0), .y(and_a_nb));
  mv3 u_and1 (.a(a_n),      .b(b),        .c(1'b0), .y(and_na_b));
  mv3 u_or   (.a(and_a_nb), .b(and_na_b), .c(1'b1), .y(y));

endmodule

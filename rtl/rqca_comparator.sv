// rqca_comparator: reversible comparator and fault detector for one TMR output line.
//
// Inputs X1, X2, X3 are the three copies of one output bit, taken from modules M1,
// M2 and M3. Each error signal compares two copies:
//   ER12 = X1 ^ X2,  ER13 = X1 ^ X3,  ER23 = X2 ^ X3.
// These three outputs alone cannot be reversible (they always have even parity, so
// only four patterns occur), so the circuit adds one constant input R and one garbage
// output Gar = R & X3. With R = 1, the eight input patterns map to eight distinct
// output patterns, which makes the function a bijection on its defined half; the R = 0
// half is don't-care.
// Structure: three qca_xor blocks (three majority gates each) and one AND, which is a
// majority gate with its control input at 0: nine majority gates and one AND in all.
// Combinational; in QCA the whole circuit spans four clocking zones (one clock period),
// which the top level models as one register stage.
//
// The function, the constant input, the garbage expression and the gate count follow
// the source design. Nothing here is an own choice apart from port names.
module rqca_comparator
  import rqca_pkg::*;
(
  input  logic r,    // constant input, tie to 1
  input  logic x1,   // copy of the output bit from M1
  input  logic x2,   // copy from M2
  input  logic x3,   // copy from M3
  output err_t er,   // ER12, ER13, ER23
  output logic gar   // garbage output, R AND X3
);

  qca_xor u_xor12 (.a(x1), .b(x2), .y(er.er12));
  qca_xor u_xor13 (.a(x1), .b(x3), .y(er.er13));
  qca_xor u_xor23 (.a(x2), .b(x3), .y(er.er23));

  mv3 u_gar_and (.a(r), .b(x3), .c(1'b0), .y(gar));

endmodule

// fault_locator: names the faulty module of a TMR stage from one comparator's error
// signals.
//
// Rule: if every error signal is 0, no module is faulty. If one module is faulty, the
// two error signals that involve it are 1 and the third is 0, and the faulty module is
// the index common to the two error signals that are 1:
//   ER12 & ER13 -> M1,  ER12 & ER23 -> M2,  ER13 & ER23 -> M3.
// With binary inputs the three error signals always have even parity, so these four
// cases are all that can occur. Two faulty modules are indistinguishable from one
// faulty module (the third, good module is then named); the scheme assumes a single
// fault. Combinational.
//
// The rule follows the source design; expressing it as a 2-bit code is an own choice.
module fault_locator
  import rqca_pkg::*;
(
  input  err_t      er,
  output fault_id_t fault_id
);

  always_comb begin
    unique case ({er.er12, er.er13, er.er23})
      3'b110:  fault_id = FAULT_M1;
      3'b101:  fault_id = FAULT_M2;
      3'b011:  fault_id = FAULT_M3;
      default: fault_id = FAULT_NONE;
    endcase
  end

endmodule

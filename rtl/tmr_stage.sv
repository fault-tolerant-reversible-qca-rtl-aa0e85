// tmr_stage: one triple-modular-redundancy stage with an embedded comparator and
// fault detector on every output line.
//
// Every input line fans out to three copies (M1, M2, M3) of a reversible full adder.
// Each of the RFA_WIDTH output lines then has:
//   - a 3-input majority voter, whose output masks a single faulty copy;
//   - a reversible comparator (constant input R = 1) giving ER12, ER13, ER23 and the
//     garbage output Gar;
//   - a fault locator that turns the error signals into the index of the faulty copy.
// module_faulty[i] is set when any output line names copy i+1 as faulty.
// fault_mask emulates faults: bit [i][j] inverts output line j of copy i+1 before it
// reaches the voter and the comparator. Tie it to 0 in normal use. Combinational.
//
// Following the source design: three copies, one voter per output line, one
// comparator per output line, the error-signal rule. Own choices: the fault-emulation
// input, the per-module summary flags and the choice of replicated module.
module tmr_stage
  import rqca_pkg::*;
(
  input  logic      [RFA_WIDTH-1:0]                 in_bits,       // {K, Cin, B, A}
  input  logic      [N_REPLICAS-1:0][RFA_WIDTH-1:0] fault_mask,    // [copy][line]
  output logic      [RFA_WIDTH-1:0]                 voted,         // {Cout, Sum, A^B, A}
  output err_t      [RFA_WIDTH-1:0]                 er,            // per output line
  output logic      [RFA_WIDTH-1:0]                 gar,           // per output line
  output fault_id_t [RFA_WIDTH-1:0]                 fault_id,      // per output line
  output logic      [N_REPLICAS-1:0]                module_faulty  // [copy]
);

  logic [N_REPLICAS-1:0][RFA_WIDTH-1:0] mod_out;  // raw module outputs
  logic [N_REPLICAS-1:0][RFA_WIDTH-1:0] mod_seen; // after fault emulation

  for (genvar i = 0; i < N_REPLICAS; i++) begin : g_mod
    rev_full_adder u_rfa (.d(in_bits), .q(mod_out[i]));
    always_comb mod_seen[i] = mod_out[i] ^ fault_mask[i];
  end

  for (genvar j = 0; j < RFA_WIDTH; j++) begin : g_line
    mv3 u_voter (
      .a(mod_seen[0][j]), .b(mod_seen[1][j]), .c(mod_seen[2][j]), .y(voted[j])
    );
    rqca_comparator u_cmp (
      .r(1'b1), .x1(mod_seen[0][j]), .x2(mod_seen[1][j]), .x3(mod_seen[2][j]),
      .er(er[j]), .gar(gar[j])
    );
    fault_locator u_loc (.er(er[j]), .fault_id(fault_id[j]));
  end

  always_comb begin
    module_faulty = '0;
    for (int j = 0; j < RFA_WIDTH; j++) begin
      if (fault_id[j] == FAULT_M1) module_faulty[0] = 1'b1;
      if (fault_id[j] == FAULT_M2) module_faulty[1] = 1'b1;
      if (fault_id[j] == FAULT_M3) module_faulty[2] = 1'b1;
    end
  end

endmodule

// rqca_pkg: types and constants shared by the fault-tolerant reversible TMR design.
//
// The design replicates a reversible module three times (triple modular redundancy),
// votes every output bit with a 3-input majority gate and compares the three copies of
// every output bit with a reversible comparator whose error signals ER12, ER13 and ER23
// name the faulty module. This package holds the number of replicas, the width of the
// replicated module (a reversible full adder with four inputs and four outputs), the
// bundle of error signals and the encoding of the fault location.
//
// Following the source design: three replicas, the three error signals and their
// meaning. Own choices: the 2-bit fault-location encoding and the struct layout.
package rqca_pkg;

  // Number of redundant modules in a TMR stage.
  localparam int unsigned N_REPLICAS = 3;

  // Width of the replicated reversible module: a reversible gate has as many outputs
  // as inputs, and the reversible full adder used here has four of each.
  localparam int unsigned RFA_WIDTH = 4;

  // Error signals of one comparator: ER_ij = 1 when copies i and j differ.
  typedef struct packed {
    logic er12;
    logic er13;
    logic er23;
  } err_t;

  // Which module the comparator's error signals point at.
  typedef enum logic [1:0] {
    FAULT_NONE = 2'd0,
    FAULT_M1   = 2'd1,
    FAULT_M2   = 2'd2,
    FAULT_M3   = 2'd3
  } fault_id_t;

endpackage

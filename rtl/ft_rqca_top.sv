// ft_rqca_top: fault-tolerant reversible TMR stage with faulty-module detection,
// clocked at the boundary.
//
// A tmr_stage (three reversible full adders, a majority voter and a reversible
// comparator on each of the four output lines) computes combinationally. Its voted
// outputs, error signals, garbage outputs, fault locations and per-module fault flags
// are captured in one register stage on the rising edge of clk, so every result
// appears one clock cycle after its inputs. This single cycle stands for the four QCA
// clocking zones (one full period of the four-phase clock) that the comparator spans.
// rst_n is an active-low synchronous reset that clears all result registers.
// Two assertions check the registered results: even parity of each line's error
// signals, and a named faulty copy exactly when two error signals are set.
//
// Interface: in_bits = {K, Cin, B, A} with K the reversible adder's constant input
// (0 for addition); fault_mask[i][j] inverts output line j of copy i+1 to emulate a
// fault (0 in normal use); voted = {Cout, Sum, A^B, A}; er/gar/fault_id per output
// line; module_faulty[i] flags copy i+1.
//
// Following the source design: the TMR structure, the comparator per output line and
// the four-zone latency of the comparator. Own choices: mapping four clocking zones to
// one register stage, the reset, and the fault-emulation input.
module ft_rqca_top
  import rqca_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic      [RFA_WIDTH-1:0]                 in_bits,
  input  logic      [N_REPLICAS-1:0][RFA_WIDTH-1:0] fault_mask,
  output logic      [RFA_WIDTH-1:0]                 voted,
  output err_t      [RFA_WIDTH-1:0]                 er,
  output logic      [RFA_WIDTH-1:0]                 gar,
  output fault_id_t [RFA_WIDTH-1:0]                 fault_id,
  output logic      [N_REPLICAS-1:0]                module_faulty
);

  logic      [RFA_WIDTH-1:0]  voted_c;
  err_t      [RFA_WIDTH-1:0]  er_c;
  logic      [RFA_WIDTH-1:0]  gar_c;
  fault_id_t [RFA_WIDTH-1:0]  fault_id_c;
  logic      [N_REPLICAS-1:0] module_faulty_c;

  tmr_stage u_stage (
    .in_bits      (in_bits),
    .fault_mask   (fault_mask),
    .voted        (voted_c),
    .er           (er_c),
    .gar          (gar_c),
    .fault_id     (fault_id_c),
    .module_faulty(module_faulty_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      voted         <= '0;
      er            <= '0;
      gar           <= '0;
      fault_id      <= {RFA_WIDTH{FAULT_NONE}};
      module_faulty <= '0;
    end else begin
      voted         <= voted_c;
      er            <= er_c;
      gar           <= gar_c;
      fault_id      <= fault_id_c;
      module_faulty <= module_faulty_c;
    end
  end

  // Three binary copies can differ pairwise only in an even number of pairs, so the
  // error signals of every line have even parity, and a line that names a copy must
  // show exactly two error signals set.
  for (genvar j = 0; j < RFA_WIDTH; j++) begin : g_check
    a_er_even_parity : assert property (
      @(posedge clk) disable iff (!rst_n) (^er[j]) == 1'b0
    ) else $error("line %0d: error signals %b have odd parity", j, er[j]);

    a_fault_id_consistent : assert property (
      @(posedge clk) disable iff (!rst_n)
        (fault_id[j] != FAULT_NONE) == ($countones(er[j]) == 2)
    ) else $error("line %0d: fault location %0d disagrees with error signals %b",
                  j, fault_id[j], er[j]);
  end

endmodule

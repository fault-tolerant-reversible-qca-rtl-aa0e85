// tb_tmr_stage: self-checking test of one TMR stage with its comparators.
// Every one of the 16 input patterns is combined with every fault scenario on the
// three copies: no fault, every single-copy fault pattern (any non-empty set of
// inverted output lines on one copy), and random faults on two or three copies. The
// expected voted outputs, error signals, garbage outputs, fault locations and
// per-copy flags come from a reference model written from the arithmetic of a full
// adder and the comparison rules, not from the design's gates.
module tb_tmr_stage;
  import rqca_pkg::*;

  logic      [RFA_WIDTH-1:0]                 in_bits;
  logic      [N_REPLICAS-1:0][RFA_WIDTH-1:0] fault_mask;
  logic      [RFA_WIDTH-1:0]                 voted;
  err_t      [RFA_WIDTH-1:0]                 er;
  logic      [RFA_WIDTH-1:0]                 gar;
  fault_id_t [RFA_WIDTH-1:0]                 fault_id;
  logic      [N_REPLICAS-1:0]                module_faulty;

  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0;

  tmr_stage dut (.*);

  // Fault-free output of the reversible full adder: {Cout ^ K, Sum, A ^ B, A}.
  function automatic logic [RFA_WIDTH-1:0] golden(input logic [RFA_WIDTH-1:0] d);
    int unsigned t;
    t = 32'(d[0]) + 32'(d[1]) + 32'(d[2]);
    return {t[1] ^ d[3], t[0], d[0] ^ d[1], d[0]};
  endfunction

  task automatic check_case();
    logic [RFA_WIDTH-1:0] g;
    logic [2:0] c, f;
    logic [RFA_WIDTH-1:0] want_voted, want_gar;
    err_t [RFA_WIDTH-1:0] want_er;
    fault_id_t [RFA_WIDTH-1:0] want_id;
    logic [N_REPLICAS-1:0] want_flags;
    g = golden(in_bits);
    want_flags = '0;
    for (int j = 0; j < RFA_WIDTH; j++) begin
      f = {fault_mask[2][j], fault_mask[1][j], fault_mask[0][j]};
      c = {3{g[j]}} ^ f;
      want_voted[j] = ($countones(c) >= 2);
      want_er[j] = '{er12: c[0] != c[1], er13: c[0] != c[2], er23: c[1] != c[2]};
      want_gar[j] = c[2];
      // A single odd-one-out copy is the one named; two inverted copies make the
      // third look like the odd one out.
      case (f)
        3'b001, 3'b110: want_id[j] = FAULT_M1;
        3'b010, 3'b101: want_id[j] = FAULT_M2;
        3'b100, 3'b011: want_id[j] = FAULT_M3;
        default:        want_id[j] = FAULT_NONE;
      endcase
      if (want_id[j] != FAULT_NONE) want_flags[int'(want_id[j]) - 1] = 1'b1;
    end
    #10;
    checks++;
    if (voted !== want_voted) begin
      failures++;
      $display("FAIL in=%04b mask=%h voted=%04b want %04b", in_bits, fault_mask, voted, want_voted);
    end
    checks++;
    if (er !== want_er || gar !== want_gar) begin
      failures++;
      $display("FAIL in=%04b mask=%h er=%h gar=%b", in_bits, fault_mask, er, gar);
    end
    checks++;
    if (fault_id !== want_id || module_faulty !== want_flags) begin
      failures++;
      $display("FAIL in=%04b mask=%h id=%h flags=%b want %h %b", in_bits, fault_mask,
               fault_id, module_faulty, want_id, want_flags);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      in_bits = 4'(v);
      fault_mask = '0;
      check_case();
      // Single faulty copy: the voted output must equal the fault-free result.
      for (int i = 0; i < N_REPLICAS; i++) begin
        for (int m = 1; m < 16; m++) begin
          fault_mask = '0;
          fault_mask[i] = 4'(m);
          check_case();
          checks++;
          if (voted !== golden(in_bits)) begin
            failures++;
            $display("FAIL single fault not masked: in=%04b copy %0d mask %04b", in_bits, i + 1, m);
          end
          checks++;
          if (module_faulty !== 3'(1 << i)) begin
            failures++;
            $display("FAIL single fault in copy %0d not located: flags=%b", i + 1, module_faulty);
          end
          n_single++;
        end
      end
      // Faults on several copies: outside the single-fault assumption, but the
      // outputs must still follow the comparison rules.
      for (int k = 0; k < 20; k++) begin
        fault_mask = 12'($urandom);
        check_case();
        n_multi++;
      end
    end
    $display("single-fault cases %0d, multi-copy cases %0d", n_single, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

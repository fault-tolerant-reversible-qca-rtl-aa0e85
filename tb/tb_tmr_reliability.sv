// tb_tmr_reliability: Monte Carlo check of the TMR reliability law on tmr_stage.
// Every output line of every copy is inverted independently with probability
// 1 - Rin. With a fault-free voter, the probability that a voted line is correct is
//   Rout = Rin^3 + 3 Rin^2 (1 - Rin),
// which exceeds Rin whenever Rin > 0.5. For several values of Rin the measured
// fraction of correct voted lines must lie within five standard deviations of Rout,
// and must be above Rin for Rin > 0.5 and below it for Rin < 0.5. In the same runs,
// every line with exactly one inverted copy must have that copy named by the
// comparator's fault locator.
module tb_tmr_reliability;
  import rqca_pkg::*;

  localparam int TRIALS = 20000;
  localparam int NPOINTS = 5;
  localparam int RIN_PERMILLE [NPOINTS] = '{400, 600, 800, 900, 990};

  logic      [RFA_WIDTH-1:0]                 in_bits;
  logic      [N_REPLICAS-1:0][RFA_WIDTH-1:0] fault_mask;
  logic      [RFA_WIDTH-1:0]                 voted;
  err_t      [RFA_WIDTH-1:0]                 er;
  logic      [RFA_WIDTH-1:0]                 gar;
  fault_id_t [RFA_WIDTH-1:0]                 fault_id;
  logic      [N_REPLICAS-1:0]                module_faulty;

  int checks = 0, failures = 0;

  tmr_stage dut (.*);

  function automatic logic [RFA_WIDTH-1:0] golden(input logic [RFA_WIDTH-1:0] d);
    int unsigned t;
    t = 32'(d[0]) + 32'(d[1]) + 32'(d[2]);
    return {t[1] ^ d[3], t[0], d[0] ^ d[1], d[0]};
  endfunction

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rin, rout, meas, sigma;
    int good, lines, single, located;
    logic [RFA_WIDTH-1:0] g;
    logic [2:0] f;
    for (int p = 0; p < NPOINTS; p++) begin
      rin = real'(RIN_PERMILLE[p]) / 1000.0;
      rout = rin ** 3 + 3.0 * rin ** 2 * (1.0 - rin);
      good = 0; lines = 0; single = 0; located = 0;
      for (int t = 0; t < TRIALS; t++) begin
        in_bits = 4'($urandom);
        for (int i = 0; i < N_REPLICAS; i++)
          for (int j = 0; j < RFA_WIDTH; j++)
            fault_mask[i][j] = ($urandom_range(999, 0) >= RIN_PERMILLE[p]);
        #1;
        g = golden(in_bits);
        for (int j = 0; j < RFA_WIDTH; j++) begin
          lines++;
          if (voted[j] == g[j]) good++;
          f = {fault_mask[2][j], fault_mask[1][j], fault_mask[0][j]};
          if ($countones(f) == 1) begin
            single++;
            if ((f == 3'b001 && fault_id[j] == FAULT_M1) ||
                (f == 3'b010 && fault_id[j] == FAULT_M2) ||
                (f == 3'b100 && fault_id[j] == FAULT_M3)) located++;
          end
        end
      end
      meas  = real'(good) / real'(lines);
      sigma = $sqrt(rout * (1.0 - rout) / real'(lines));
      $display("Rin=%0.3f  Rout predicted=%0.5f measured=%0.5f  single-copy lines %0d located %0d",
               rin, rout, meas, single, located);
      checks++;
      if (meas < rout - 5.0 * sigma - 1e-4 || meas > rout + 5.0 * sigma + 1e-4) begin
        failures++;
        $display("FAIL measured reliability far from equation (1)");
      end
      checks++;
      if ((rin > 0.5) ? (meas <= rin) : (meas >= rin)) begin
        failures++;
        $display("FAIL voting did not move reliability the expected way");
      end
      checks++;
      if (single == 0 || located != single) begin
        failures++;
        $display("FAIL %0d of %0d single-copy faults located", located, single);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ft_rqca_top: end-to-end test of the fault-tolerant reversible TMR stage, at the
// design's default (and only) size.
// Each clock cycle applies a new input pattern {K, Cin, B, A} and a fault scenario:
// no fault, a fault on copy M1, M2 or M3 alone (random non-empty set of inverted
// output lines), or faults on several copies. A reference model built from full-adder
// arithmetic and the comparison rules predicts every output. The test checks:
//   - latency: a result appears exactly one clock edge after its inputs, and the
//     registered outputs do not change between edges;
//   - masking: with one faulty copy the voted result equals the fault-free sum;
//   - detection: with one faulty copy exactly that copy is flagged;
//   - the synchronous reset clears every output.
// Each of these mechanisms is counted, and one that never happened is a failure.
module tb_ft_rqca_top;
  import rqca_pkg::*;

  localparam int NCYCLES = 4000;

  logic                                      clk = 1'b0;
  logic                                      rst_n;
  logic      [RFA_WIDTH-1:0]                 in_bits;
  logic      [N_REPLICAS-1:0][RFA_WIDTH-1:0] fault_mask;
  logic      [RFA_WIDTH-1:0]                 voted;
  err_t      [RFA_WIDTH-1:0]                 er;
  logic      [RFA_WIDTH-1:0]                 gar;
  fault_id_t [RFA_WIDTH-1:0]                 fault_id;
  logic      [N_REPLICAS-1:0]                module_faulty;

  int checks = 0, failures = 0, cycles = 0;
  int n_fault_free = 0, n_multi = 0, n_reset = 0, n_latency = 0;
  int n_masked [N_REPLICAS];
  int n_located[N_REPLICAS];

  ft_rqca_top dut (.*);

  always #5 clk = ~clk;

  typedef struct packed {
    logic      [RFA_WIDTH-1:0]  voted;
    err_t      [RFA_WIDTH-1:0]  er;
    logic      [RFA_WIDTH-1:0]  gar;
    fault_id_t [RFA_WIDTH-1:0]  fault_id;
    logic      [N_REPLICAS-1:0] flags;
  } result_t;

  function automatic logic [RFA_WIDTH-1:0] golden(input logic [RFA_WIDTH-1:0] d);
    int unsigned t;
    t = 32'(d[0]) + 32'(d[1]) + 32'(d[2]);
    return {t[1] ^ d[3], t[0], d[0] ^ d[1], d[0]};
  endfunction

  function automatic result_t model(input logic [RFA_WIDTH-1:0] d,
                                    input logic [N_REPLICAS-1:0][RFA_WIDTH-1:0] m);
    result_t res;
    logic [RFA_WIDTH-1:0] g;
    logic [2:0] c, f;
    g = golden(d);
    res.flags = '0;
    for (int j = 0; j < RFA_WIDTH; j++) begin
      f = {m[2][j], m[1][j], m[0][j]};
      c = {3{g[j]}} ^ f;
      res.voted[j] = ($countones(c) >= 2);
      res.er[j] = '{er12: c[0] != c[1], er13: c[0] != c[2], er23: c[1] != c[2]};
      res.gar[j] = c[2];
      case (f)
        3'b001, 3'b110: res.fault_id[j] = FAULT_M1;
        3'b010, 3'b101: res.fault_id[j] = FAULT_M2;
        3'b100, 3'b011: res.fault_id[j] = FAULT_M3;
        default:        res.fault_id[j] = FAULT_NONE;
      endcase
      if (res.fault_id[j] != FAULT_NONE) res.flags[int'(res.fault_id[j]) - 1] = 1'b1;
    end
    return res;
  endfunction

  function automatic result_t observed();
    return '{voted: voted, er: er, gar: gar, fault_id: fault_id, flags: module_faulty};
  endfunction

  initial begin : watchdog
    repeat (NCYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    result_t want, prev;
    int scenario, copy;
    foreach (n_masked[i]) begin
      n_masked[i] = 0;
      n_located[i] = 0;
    end
    rst_n = 1'b0;
    in_bits = '0;
    fault_mask = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (observed() !== result_t'('0)) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end else n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    prev = '0;

    for (int n = 0; n < NCYCLES; n++) begin
      // Apply the next inputs half a cycle before the capturing edge.
      in_bits = 4'($urandom);
      scenario = n % 5;
      fault_mask = '0;
      copy = -1;
      if (scenario >= 1 && scenario <= 3) begin
        copy = scenario - 1;
        fault_mask[copy] = 4'($urandom_range(15, 1));
      end else if (scenario == 4) begin
        fault_mask = 12'($urandom);
      end
      want = model(in_bits, fault_mask);
      #1;
      // Latency: the new inputs must not reach the outputs before the clock edge.
      checks++;
      if (observed() !== prev) begin
        failures++;
        $display("FAIL cycle %0d: outputs changed before the clock edge", n);
      end else if (want != prev) n_latency++;
      @(posedge clk);
      #1;
      cycles++;
      checks++;
      if (observed() !== want) begin
        failures++;
        $display("FAIL cycle %0d in=%04b mask=%h got %h want %h", n, in_bits, fault_mask,
                 observed(), want);
      end
      if (copy >= 0) begin
        checks++;
        if (voted === golden(in_bits)) n_masked[copy]++;
        else begin
          failures++;
          $display("FAIL cycle %0d: single fault in M%0d not masked", n, copy + 1);
        end
        checks++;
        if (module_faulty === 3'(1 << copy)) n_located[copy]++;
        else begin
          failures++;
          $display("FAIL cycle %0d: single fault in M%0d flagged as %b", n, copy + 1, module_faulty);
        end
      end else if (scenario == 0) begin
        checks++;
        if (voted === golden(in_bits) && module_faulty === '0 && er === '0) n_fault_free++;
        else begin
          failures++;
          $display("FAIL cycle %0d: fault-free cycle reports an error", n);
        end
      end else n_multi++;
      prev = want;
      @(negedge clk);
      // A reset in the middle of the run must clear the result registers.
      if (n == NCYCLES / 2) begin
        rst_n = 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (observed() !== result_t'('0)) begin
          failures++;
          $display("FAIL outputs not cleared by mid-run reset");
        end else n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
        prev = '0;
      end
    end

    $display("cycles=%0d fault_free=%0d multi_copy=%0d resets=%0d latency_checked=%0d",
             cycles, n_fault_free, n_multi, n_reset, n_latency);
    for (int i = 0; i < N_REPLICAS; i++)
      $display("M%0d: faults masked=%0d located=%0d", i + 1, n_masked[i], n_located[i]);
    // Every mechanism must have been exercised.
    checks++;
    if (n_fault_free == 0 || n_multi == 0 || n_reset < 2 || n_latency == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    for (int i = 0; i < N_REPLICAS; i++) begin
      checks++;
      if (n_masked[i] == 0 || n_located[i] == 0) begin
        failures++;
        $display("FAIL single faults in M%0d never exercised", i + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

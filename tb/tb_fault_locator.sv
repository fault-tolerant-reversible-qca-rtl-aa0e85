// tb_fault_locator: exhaustive self-checking test of the fault locator.
// For every pattern of the three error signals the expected answer is worked out by
// asking, for each module, whether both error signals that involve it are 1 while the
// one that does not is 0; if exactly one module passes, it is the faulty one,
// otherwise no module is named.
module tb_fault_locator;
  import rqca_pkg::*;

  err_t      er;
  fault_id_t fault_id;
  int checks = 0, failures = 0;

  fault_locator dut (.er(er), .fault_id(fault_id));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m1, m2, m3;
    fault_id_t want;
    for (int v = 0; v < 8; v++) begin
      er = err_t'(v);
      #10;
      m1 = er.er12 && er.er13 && !er.er23;
      m2 = er.er12 && er.er23 && !er.er13;
      m3 = er.er13 && er.er23 && !er.er12;
      want = m1 ? FAULT_M1 : m2 ? FAULT_M2 : m3 ? FAULT_M3 : FAULT_NONE;
      checks++;
      if (fault_id !== want) begin
        failures++;
        $display("FAIL er=%03b got %s want %s", v[2:0], fault_id.name(), want.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

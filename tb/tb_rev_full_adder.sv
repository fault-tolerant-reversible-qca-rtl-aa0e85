// tb_rev_full_adder: exhaustive self-checking test of the reversible full adder.
// For all 16 input patterns {K, Cin, B, A}: with K = 0 the sum and carry must equal
// the arithmetic sum A + B + Cin; the garbage outputs must be A and A xor B; with
// K = 1 the carry line is inverted. All 16 outputs must be different (reversible).
module tb_rev_full_adder;
  import rqca_pkg::*;

  logic [RFA_WIDTH-1:0] d, q;
  int checks = 0, failures = 0;

  rev_full_adder dut (.d(d), .q(q));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    int unsigned total;
    logic want_sum, want_cout;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      d = 4'(v);
      #10;
      total     = 32'(d[0]) + 32'(d[1]) + 32'(d[2]);
      want_sum  = total[0];
      want_cout = total[1] ^ d[3];
      checks++;
      if (q[2] !== want_sum || q[3] !== want_cout) begin
        failures++;
        $display("FAIL d=%04b sum=%b cout=%b want %b %b", d, q[2], q[3], want_sum, want_cout);
      end
      checks++;
      if (q[0] !== d[0] || q[1] !== (d[0] ^ d[1])) begin
        failures++;
        $display("FAIL d=%04b garbage=%b%b", d, q[1], q[0]);
      end
      checks++;
      if (seen[q]) begin
        failures++;
        $display("FAIL output %04b repeats: not reversible", q);
      end
      seen[q] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

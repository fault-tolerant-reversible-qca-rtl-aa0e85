// tb_qca_xor: exhaustive self-checking test of the majority-gate XOR.
// Applies the four input pairs and expects 1 exactly when the inputs differ.
module tb_qca_xor;
  logic a, b, y;
  int checks = 0, failures = 0;

  qca_xor dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #10;
      checks++;
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

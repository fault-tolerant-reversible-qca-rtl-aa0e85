// tb_mv3: exhaustive self-checking test of the 3-input majority voter.
// All eight input patterns are applied; the expected output is 1 when at least two
// inputs are 1, counted independently of the gate's sum-of-products form.
module tb_mv3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  mv3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #10;
      checks++;
      if (y !== ((32'(a) + 32'(b) + 32'(c)) >= 2)) begin
        failures++;
        $display("FAIL abc=%b%b%b y=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

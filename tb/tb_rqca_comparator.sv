// tb_rqca_comparator: self-checking test of the reversible comparator and detector.
// With R = 1 every output is compared with the truth table of the comparator's
// reversible function (ER12, ER13, ER23, Gar for X1 X2 X3 = 000 ... 111), written out
// below as constants, and the eight output patterns are checked to be distinct, which
// is the bijection that makes the circuit reversible. With R = 0 (don't-care half)
// the error signals must still compare the inputs and the garbage AND must give 0.
module tb_rqca_comparator;
  import rqca_pkg::*;

  logic r, x1, x2, x3, gar;
  err_t er;
  int checks = 0, failures = 0;

  // {ER12, ER13, ER23, Gar} for X1X2X3 = 0..7 with R = 1.
  localparam logic [3:0] TABLE_R1 [8] = '{
    4'b0000, 4'b0111, 4'b1010, 4'b1101, 4'b1100, 4'b1011, 4'b0110, 4'b0001
  };

  rqca_comparator dut (.r(r), .x1(x1), .x2(x2), .x3(x3), .er(er), .gar(gar));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    logic [3:0]  outv;
    seen = '0;
    r = 1'b1;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #10;
      outv = {er.er12, er.er13, er.er23, gar};
      checks++;
      if (outv !== TABLE_R1[v]) begin
        failures++;
        $display("FAIL R=1 x=%03b got %04b want %04b", v[2:0], outv, TABLE_R1[v]);
      end
      checks++;
      if (seen[outv]) begin
        failures++;
        $display("FAIL R=1 output %04b repeats: not one-to-one", outv);
      end
      seen[outv] = 1'b1;
    end
    r = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #10;
      checks++;
      if (er.er12 !== (x1 != x2) || er.er13 !== (x1 != x3) || er.er23 !== (x2 != x3)
          || gar !== 1'b0) begin
        failures++;
        $display("FAIL R=0 x=%03b er=%03b gar=%b", v[2:0], er, gar);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

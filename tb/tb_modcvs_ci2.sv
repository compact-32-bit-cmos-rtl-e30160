// tb_modcvs_ci2: exhaustive self-checking test of cell CI.2.
//
// All 16 values of the four 2-bit propagate terms, in precharge and in
// evaluation; PPP(n+3) must be the AND of the lower two, PPP(n+7) the AND of
// all four.
module tb_modcvs_ci2;
  logic       r;
  logic [3:0] pp;
  logic       ppp3, ppp7;
  int checks = 0, failures = 0;

  modcvs_ci2 dut (.r, .pp, .ppp3, .ppp7);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {r, pp} = 5'(v);
      #1;
      checks++;
      if (ppp3 !== (r && pp[1:0] == 2'b11)) begin
        failures++;
        if (failures <= 20) $display("FAIL PPP3 r=%b pp=%b", r, pp);
      end
      checks++;
      if (ppp7 !== (r && pp == 4'b1111)) begin
        failures++;
        if (failures <= 20) $display("FAIL PPP7 r=%b pp=%b", r, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

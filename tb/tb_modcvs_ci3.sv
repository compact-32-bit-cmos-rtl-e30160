// tb_modcvs_ci3: exhaustive self-checking test of cell CI.3.
//
// For all 2^16 pairs of 8-bit operand slices the testbench forms the 2-bit
// terms GG, NN, PP from integer sums of each 2-bit slice, drives them into
// the gate and compares GGG/NNN with the carry out of the 4- and 8-bit
// integer sums: GGG = carry out of a+b, NNN = no carry out of a+b+1.
module tb_modcvs_ci3;
  logic       r;
  logic [3:1] pp;
  logic [3:0] gg, nn;
  logic       ggg3, nnn3, ggg7, nnn7;
  int checks = 0, failures = 0;

  modcvs_ci3 dut (.r, .pp, .gg, .nn, .ggg3, .nnn3, .ggg7, .nnn7);

  task automatic check(input bit ok, input string what, input int av, input int bv);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%02h b=%02h r=%b", what, av, bv, r);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 256; av++)
      for (int bv = 0; bv < 256; bv++) begin
        for (int j = 0; j < 4; j++) begin
          automatic int as = (av >> (2 * j)) & 3, bs = (bv >> (2 * j)) & 3;
          gg[j] = (as + bs) >= 4;
          nn[j] = (as + bs + 1) < 4;
          if (j > 0) pp[j] = (as ^ bs) == 3;
        end
        r = 1'b1;
        #1;
        check(ggg3 == (((av & 15) + (bv & 15)) >= 16), "GGG3", av, bv);
        check(nnn3 == (((av & 15) + (bv & 15) + 1) < 16), "NNN3", av, bv);
        check(ggg7 == ((av + bv) >= 256), "GGG7", av, bv);
        check(nnn7 == ((av + bv + 1) < 256), "NNN7", av, bv);
        if ((av & 7) == 0 && (bv & 7) == 0) begin
          r = 1'b0;
          #1;
          check({ggg3, nnn3, ggg7, nnn7} == '0, "precharge", av, bv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

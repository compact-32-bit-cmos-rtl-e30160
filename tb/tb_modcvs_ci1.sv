// tb_modcvs_ci1: exhaustive self-checking test of cell CI.1.
//
// For every valid value of the 2-bit operand slices it checks the bit
// generate, kill and dual-rail propagate and the 2-bit GG/NN/PP terms against
// values worked out from integer addition of the slices: GG is the carry out
// of a+b, NN is "no carry out of a+b+1", PP is "a xor b is all ones". It also
// checks that precharge (r low) gives all-low outputs and that a bit whose
// operand is still a spacer produces no bit term.
module tb_modcvs_ci1;
  import modcvs_pkg::*;

  logic       r;
  dr_t  [1:0] a, b;
  logic [1:0] g, n;
  dr_t  [1:0] p;
  logic       gg, nn, pp;
  int checks = 0, failures = 0;

  modcvs_ci1 dut (.r, .a, .b, .g, .n, .p, .gg, .nn, .pp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%b b=%b r=%b", what, a, b, r);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 4; av++)
      for (int bv = 0; bv < 4; bv++) begin
        for (int i = 0; i < 2; i++) begin
          a[i] = dr_enc(1'(av >> i));
          b[i] = dr_enc(1'(bv >> i));
        end
        // Precharge: every output low whatever the operands.
        r = 1'b0;
        #1;
        check({g, n, p, gg, nn, pp} == '0, "precharge");
        // Evaluate.
        r = 1'b1;
        #1;
        for (int i = 0; i < 2; i++) begin
          automatic int ai = (av >> i) & 1, bi = (bv >> i) & 1;
          check(g[i] == (ai + bi == 2), "G");
          check(n[i] == (ai + bi == 0), "N");
          check(p[i].t == (ai + bi == 1), "P");
          check(p[i].f == (ai + bi != 1), "P-bar");
          check(g[i] + n[i] + p[i].t == 1, "one-hot G/N/P");
        end
        check(gg == (av + bv >= 4), "GG");
        check(nn == (av + bv + 1 < 4), "NN");
        check(pp == ((av ^ bv) == 3), "PP");
        // Bit 1 operand still a spacer: bit 1 terms and the 2-bit terms that
        // need it stay low.
        a[1] = DR_SPACER;
        #1;
        check({g[1], n[1], p[1].t, p[1].f} == '0, "spacer bit 1");
        check(pp == 1'b0, "spacer PP");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

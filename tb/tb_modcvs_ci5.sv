// tb_modcvs_ci5: exhaustive self-checking test of cell CI.5.
//
// For all 7-bit operand pairs and both carry-in values the testbench forms
// the 4-bit group terms (from the integer sum of bits 0..3) and the bit
// terms of bits 4..6, and compares C(n+3..n+6) with the carries of the
// integer sum a+b+cin. Precharge and a spacer carry-in with an all-propagate
// lower half are checked too.
module tb_modcvs_ci5;
  import modcvs_pkg::*;

  logic       r;
  dr_t        cin;
  logic       ppp3, ggg3, nnn3;
  logic [2:0] p, g, n;
  dr_t  [3:0] c;
  int checks = 0, failures = 0;

  modcvs_ci5 dut (.r, .cin, .ppp3, .ggg3, .nnn3, .p, .g, .n, .c);

  task automatic check(input bit ok, input string what, input int av, input int bv);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%02h b=%02h cin=%b c=%b", what, av, bv, cin, c);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 128; av++)
      for (int bv = 0; bv < 128; bv++)
        for (int ci = 0; ci < 3; ci++) begin   // 0, 1, 2 = spacer
          ggg3 = ((av & 15) + (bv & 15)) >= 16;
          nnn3 = ((av & 15) + (bv & 15) + 1) < 16;
          ppp3 = ((av ^ bv) & 15) == 15;
          for (int i = 0; i < 3; i++) begin
            automatic int s = ((av >> (i + 4)) & 1) + ((bv >> (i + 4)) & 1);
            g[i] = s == 2;
            n[i] = s == 0;
            p[i] = s == 1;
          end
          cin = (ci == 2) ? DR_SPACER : dr_enc(1'(ci));
          r = 1'b1;
          #1;
          for (int k = 0; k < 4; k++) begin
            automatic int m = (1 << (k + 4)) - 1;
            if (ci < 2) begin
              automatic bit co = (((av & m) + (bv & m) + ci) >> (k + 4)) & 1;
              check(c[k] == dr_enc(co), "carry", av, bv);
            end else if (((av ^ bv) & m) == m) begin
              check(c[k] == DR_SPACER, "spacer propagates", av, bv);
            end else begin
              automatic bit co = (((av & m) + (bv & m)) >> (k + 4)) & 1;
              check(c[k] == dr_enc(co), "early carry", av, bv);
            end
          end
          if (bv == 0) begin
            r = 1'b0;
            #1;
            check(c == '0, "precharge", av, bv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_modcvs_ciii: exhaustive self-checking test of the sum cell CIII.
//
// Propagate and carry each take the values 0, 1 and spacer, in precharge and
// evaluation. With both inputs valid the sum must be their xor and Comp
// high; with either input a spacer (or in precharge) the sum must be a
// spacer and Comp low.
module tb_modcvs_ciii;
  import modcvs_pkg::*;

  logic r;
  dr_t  p, c, s;
  logic comp;
  int checks = 0, failures = 0;

  modcvs_ciii dut (.r, .p, .c, .s, .comp);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rv = 0; rv < 2; rv++)
      for (int pv = 0; pv < 3; pv++)
        for (int cv = 0; cv < 3; cv++) begin
          r = 1'(rv);
          p = (pv == 2) ? DR_SPACER : dr_enc(1'(pv));
          c = (cv == 2) ? DR_SPACER : dr_enc(1'(cv));
          #1;
          checks++;
          if (rv == 1 && pv < 2 && cv < 2) begin
            if (s != dr_enc(1'(pv ^ cv)) || !comp) begin
              failures++;
              if (failures <= 20) $display("FAIL sum p=%0d c=%0d s=%b comp=%b", pv, cv, s, comp);
            end
          end else if (s != DR_SPACER || comp) begin
            failures++;
            if (failures <= 20) $display("FAIL spacer r=%0d p=%0d c=%0d s=%b comp=%b", rv, pv, cv, s, comp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

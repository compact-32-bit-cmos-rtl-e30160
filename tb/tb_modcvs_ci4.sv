// tb_modcvs_ci4: exhaustive self-checking test of cell CI.4.
//
// For every 3-bit operand pair and every carry-in (0, 1 and spacer) the
// carries C(n..n+2) are compared with the carries of the integer sum
// a+b+cin. With the carry-in still a spacer, a carry must already be valid
// if a bit at or below it generates or kills, and must stay a spacer if every
// bit up to it propagates.
module tb_modcvs_ci4;
  import modcvs_pkg::*;

  logic       r;
  dr_t        cin;
  logic [2:0] p, g, n;
  dr_t  [2:0] c;
  int checks = 0, failures = 0;

  modcvs_ci4 dut (.r, .cin, .p, .g, .n, .c);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: p=%b g=%b n=%b cin=%b c=%b", what, p, g, n, cin, c);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 8; av++)
      for (int bv = 0; bv < 8; bv++)
        for (int ci = 0; ci < 3; ci++) begin   // 0, 1, 2 = spacer
          for (int i = 0; i < 3; i++) begin
            automatic int s = ((av >> i) & 1) + ((bv >> i) & 1);
            g[i] = s == 2;
            n[i] = s == 0;
            p[i] = s == 1;
          end
          cin = (ci == 2) ? DR_SPACER : dr_enc(1'(ci));
          r = 1'b0;
          #1;
          check(c == '0, "precharge");
          r = 1'b1;
          #1;
          for (int i = 0; i < 3; i++) begin
            automatic int m = (1 << (i + 1)) - 1;
            if (ci < 2) begin
              automatic bit co = (((av & m) + (bv & m) + ci) >> (i + 1)) & 1;
              check(c[i] == dr_enc(co), "carry");
            end else if (((av ^ bv) & m) == m) begin
              check(c[i] == DR_SPACER, "spacer propagates");
            end else begin
              // Known without the carry-in: same for cin 0 and 1.
              automatic bit co = (((av & m) + (bv & m)) >> (i + 1)) & 1;
              check(c[i] == dr_enc(co), "early carry");
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_modcvs_ci: self-checking test of the 8-bit group cell CI.
//
// Random and directed 8-bit operand pairs with carry-in 0, 1 and spacer.
// Reference values come from integer addition: P(i) = a(i) xor b(i), C(n+k)
// is bit k+1 of a+b+cin, GGG/NNN/PPP are "a+b carries out", "a+b+1 does not
// carry out" and "a xor b is all ones". With a spacer carry-in, a carry must
// be valid exactly when some bit at or below it does not propagate.
module tb_modcvs_ci;
  import modcvs_pkg::*;

  logic       r;
  dr_t  [7:0] a, b, p;
  dr_t        cin;
  dr_t  [6:0] c;
  logic       ppp, ggg, nnn;
  int checks = 0, failures = 0;

  modcvs_ci dut (.r, .a, .b, .cin, .p, .c, .ppp, .ggg, .nnn);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%h b=%h cin=%b", what, a, b, cin);
    end
  endtask

  function automatic dr_t [7:0] enc8(input logic [7:0] v);
    dr_t [7:0] x;
    for (int i = 0; i < 8; i++) x[i] = dr_enc(v[i]);
    return x;
  endfunction

  task automatic run(input int av, input int bv, input int ci);
    a = enc8(8'(av));
    b = enc8(8'(bv));
    cin = (ci == 2) ? DR_SPACER : dr_enc(1'(ci));
    r = 1'b0;
    #1;
    check({p, c, ppp, ggg, nnn} == '0, "precharge");
    r = 1'b1;
    #1;
    for (int i = 0; i < 8; i++)
      check(p[i] == dr_enc(1'(((av ^ bv) >> i) & 1)), "P");
    check(ppp == ((av ^ bv) == 255), "PPP");
    check(ggg == ((av + bv) >= 256), "GGG");
    check(nnn == ((av + bv + 1) < 256), "NNN");
    for (int k = 0; k < 7; k++) begin
      automatic int m = (1 << (k + 1)) - 1;
      if (ci < 2)
        check(c[k] == dr_enc(1'((((av & m) + (bv & m) + ci) >> (k + 1)) & 1)), "carry");
      else if (((av ^ bv) & m) == m)
        check(c[k] == DR_SPACER, "spacer propagates");
      else
        check(c[k] == dr_enc(1'((((av & m) + (bv & m)) >> (k + 1)) & 1)), "early carry");
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: full propagate, generate at each end, kill at each end.
    for (int ci = 0; ci < 3; ci++) begin
      run(8'hFF, 8'h00, ci);
      run(8'h55, 8'hAA, ci);
      run(8'hFF, 8'h01, ci);
      run(8'h7F, 8'h80, ci);
      run(8'h00, 8'h00, ci);
      run(8'hFF, 8'hFF, ci);
      run(8'h7F, 8'h00, ci);
    end
    for (int t = 0; t < 3000; t++)
      run(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

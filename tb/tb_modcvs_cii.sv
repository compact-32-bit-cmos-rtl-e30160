// tb_modcvs_cii: exhaustive self-checking test of cell CII.
//
// Each of the four 8-bit groups is set to generate, kill or propagate (81
// combinations), with carry-in 0, 1 or spacer. The group terms are derived
// from 8-bit operand slices (generate: FF+01, kill: 00+00, propagate:
// FF+00), and the expected carries C8..C32 are the carries of the 32-bit
// integer sum of those operands. Comp33 must be high exactly when C32 is
// valid.
module tb_modcvs_cii;
  import modcvs_pkg::*;

  logic       r;
  dr_t        c0;
  logic [3:0] ppp, ggg, nnn;
  dr_t  [3:0] c;
  logic       comp33;
  int checks = 0, failures = 0;

  modcvs_cii dut (.r, .c0, .ppp, .ggg, .nnn, .c, .comp33);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: ppp=%b ggg=%b nnn=%b c0=%b c=%b", what, ppp, ggg, nnn, c0, c);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 81; v++)
      for (int ci = 0; ci < 3; ci++) begin
        logic [32:0] av, bv;
        int code;
        av = '0;
        bv = '0;
        code = v;
        for (int k = 0; k < 4; k++) begin
          logic [7:0] as, bs;
          case (code % 3)
            0:       begin as = 8'hFF; bs = 8'h01; end  // generate
            1:       begin as = 8'h00; bs = 8'h00; end  // kill
            default: begin as = 8'hFF; bs = 8'h00; end  // propagate
          endcase
          code /= 3;
          av[8*k +: 8] = as;
          bv[8*k +: 8] = bs;
          ggg[k] = (9'(as) + 9'(bs)) >= 9'd256;
          nnn[k] = (9'(as) + 9'(bs) + 9'd1) < 9'd256;
          ppp[k] = (as ^ bs) == 8'hFF;
        end
        c0 = (ci == 2) ? DR_SPACER : dr_enc(1'(ci));
        r = 1'b0;
        #1;
        check(c == '0 && !comp33, "precharge");
        r = 1'b1;
        #1;
        for (int k = 0; k < 4; k++) begin
          logic [32:0] m;
          m = (33'd1 << (8 * (k + 1))) - 33'd1;
          if (ci < 2) begin
            logic [32:0] sum;
            sum = (av & m) + (bv & m) + 33'(ci);
            check(c[k] == dr_enc(sum[8 * (k + 1)]), "carry");
          end else if (((av ^ bv) & m) == m) begin
            check(c[k] == DR_SPACER, "spacer propagates");
          end else begin
            logic [32:0] sum;
            sum = (av & m) + (bv & m);
            check(c[k] == dr_enc(sum[8 * (k + 1)]), "early carry");
          end
        end
        check(comp33 == (c[3].t | c[3].f), "Comp33");
        check(comp33 == (ci < 2 || ppp != 4'b1111), "Comp33 timing");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

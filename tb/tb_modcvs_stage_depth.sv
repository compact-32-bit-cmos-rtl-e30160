// tb_modcvs_stage_depth: logic depth of the adder's gate levels.
//
// The adder's latency is stated in dynamic gate levels: the carry-out C32
// is three levels from the operands and carry-in (CI.1, CI.3, CII) and the
// top sum bit five (CI.1, CI.3, CII, CI.5, CIII). This testbench assembles
// the 32-bit adder from its cells exactly as modcvs_ci and modcvs_adder32
// wire them, but gives each gate level its own evaluate signal:
//   level 1  CI.1           level 2  CI.2, CI.3      level 3  CII
//   level 4  CI.4, CI.5     level 5  CIII
// It then raises the levels one at a time, one "stage" per step, and checks
// that no output completes before the level that produces it and that each
// completes, with the right value, as soon as its level evaluates:
//   after 3 stages  C8, C16, C24, C32 and Comp33 are valid
//   after 4 stages  every internal carry is valid, no sum yet
//   after 5 stages  every sum and GCo are valid
// for every operand pattern, which is why the addition time depends so
// little on the carry-propagate length. Independent checks against integer
// addition; random operands and all carry-propagate lengths 0..32.
module tb_modcvs_stage_depth;
  import modcvs_pkg::*;

  logic [5:1]  rl;                 // evaluate signal of each level
  dr_t  [31:0] a, b, p, cprev, s;
  dr_t         c0;
  dr_t  [3:0]  cg, cgin;
  logic [31:0] g, n, pt, comp;
  logic [15:0] gg, nn, pp;
  logic [3:0]  ppp, ggg, nnn, ppp3, ggg3, nnn3;
  logic        comp33, gco;
  int checks = 0, failures = 0;
  int stages_c32_hist[6], stages_gco_hist[6];

  for (genvar j = 0; j < 16; j++) begin : g_l1
    modcvs_ci1 u (.r(rl[1]), .a(a[2*j+1 -: 2]), .b(b[2*j+1 -: 2]), .g(g[2*j+1 -: 2]),
                  .n(n[2*j+1 -: 2]), .p(p[2*j+1 -: 2]), .gg(gg[j]), .nn(nn[j]), .pp(pp[j]));
  end

  always_comb
    for (int i = 0; i < 32; i++) pt[i] = p[i].t;

  for (genvar k = 0; k < 4; k++) begin : g_grp
    dr_t [6:0] cint;
    modcvs_ci2 u2 (.r(rl[2]), .pp(pp[4*k +: 4]), .ppp3(ppp3[k]), .ppp7(ppp[k]));
    modcvs_ci3 u3 (.r(rl[2]), .pp(pp[4*k+1 +: 3]), .gg(gg[4*k +: 4]), .nn(nn[4*k +: 4]),
                   .ggg3(ggg3[k]), .nnn3(nnn3[k]), .ggg7(ggg[k]), .nnn7(nnn[k]));
    modcvs_ci4 u4 (.r(rl[4]), .cin(cgin[k]), .p(pt[8*k +: 3]), .g(g[8*k +: 3]), .n(n[8*k +: 3]),
                   .c(cint[2:0]));
    modcvs_ci5 u5 (.r(rl[4]), .cin(cgin[k]), .ppp3(ppp3[k]), .ggg3(ggg3[k]), .nnn3(nnn3[k]),
                   .p(pt[8*k+4 +: 3]), .g(g[8*k+4 +: 3]), .n(n[8*k+4 +: 3]), .c(cint[6:3]));
    assign cprev[8*k +: 8] = {cint, cgin[k]};
  end

  assign cgin = {cg[2:0], c0};

  modcvs_cii u_cii (.r(rl[3]), .c0, .ppp, .ggg, .nnn, .c(cg), .comp33);

  for (genvar i = 0; i < 32; i++) begin : g_sum
    modcvs_ciii u (.r(rl[5]), .p(p[i]), .c(cprev[i]), .s(s[i]), .comp(comp[i]));
  end

  modcvs_gco #(.N(33)) u_gco (.comp({comp33, comp}), .gco);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%h b=%h c0=%b rl=%b", what, a, b, c0, rl);
    end
  endtask

  function automatic bit all_valid(input dr_t [31:0] x);
    for (int i = 0; i < 32; i++)
      if (!dr_done(x[i])) return 1'b0;
    return 1'b1;
  endfunction

  task automatic add_staged(input logic [31:0] av, input logic [31:0] bv, input logic cin);
    logic [32:0] sum;
    logic [31:0] st;
    int st_c32, st_gco;
    sum = 33'(av) + 33'(bv) + 33'(cin);
    rl = '0;
    #1;
    for (int i = 0; i < 32; i++) begin
      a[i] = dr_enc(av[i]);
      b[i] = dr_enc(bv[i]);
    end
    c0 = dr_enc(cin);
    st_c32 = 0;
    st_gco = 0;
    for (int k = 1; k <= 5; k++) begin
      rl[k] = 1'b1;
      #1;
      if (comp33 && st_c32 == 0) st_c32 = k;
      if (gco && st_gco == 0) st_gco = k;
      if (k < 3) check(!comp33 && cg == '0, "no group carry before level 3");
      if (k == 3) begin
        check(comp33 && cg[3] == dr_enc(sum[32]), "C32 after 3 levels");
        for (int j = 0; j < 3; j++)
          check(cg[j] == dr_enc(1'(((33'(av) & ((33'd1 << (8*j+8)) - 1)) +
                                    (33'(bv) & ((33'd1 << (8*j+8)) - 1)) + 33'(cin)) >> (8*j+8))),
                "group carry after 3 levels");
      end
      if (k < 4) check(cprev[1] == DR_SPACER, "no bit carry before level 4");
      if (k == 4) check(all_valid(cprev), "all carries after 4 levels");
      if (k < 5) check(comp == '0 && !gco, "no sum before level 5");
    end
    for (int i = 0; i < 32; i++) st[i] = s[i].t;
    check(gco && st == sum[31:0], "sum after 5 levels");
    stages_c32_hist[st_c32]++;
    stages_gco_hist[st_gco]++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rl = '0;
    a = '0;
    b = '0;
    c0 = DR_SPACER;
    for (int l = 0; l <= 32; l++)
      add_staged((l == 32) ? 32'hFFFF_FFFF : ((32'd1 << l) - 32'd1), 32'd0, 1'b1);
    for (int t = 0; t < 2000; t++)
      add_staged($urandom, $urandom, 1'($urandom));
    // Data-independent depth: every addition took 3 levels to C32 and 5 to GCo.
    check(stages_c32_hist[3] == 2033, "C32 always at level 3");
    check(stages_gco_hist[5] == 2033, "GCo always at level 5");
    $display("levels to C32: 3 in %0d additions; levels to GCo: 5 in %0d additions",
             stages_c32_hist[3], stages_gco_hist[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

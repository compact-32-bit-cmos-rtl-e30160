// tb_modcvs_adder32: end-to-end self-checking test of the 32-bit adder.
//
// The testbench plays the self-timed environment with a four-phase,
// return-to-zero handshake: lower R and check that every output is a spacer
// and GCo is low (precharge), apply dual-rail operands, raise R, wait for
// GCo and compare sum and carry-out with the integer sum A+B+C0.
//
// Workloads: carry-propagate lengths 0..32 (A = 2^L - 1, B = 0, C0 = 1, so
// the carry runs through L bits), operands with a generate at one bit and a
// propagate run above it, and random operands. Mechanisms that must occur
// at least once, counted in the summary:
//   precharge      all outputs return to spacer while R is low
//   complete       GCo rises with a correct result
//   carry_out      a carry-out of one
//   chain32        a carry that propagates through all 32 bits
//   early_c32      with C0 held as a spacer, C32 and Comp33 complete anyway
//                  because some bit generates or kills
//   withheld       with C0 held as a spacer and a full propagate chain, C32,
//                  Comp33 and GCo stay low until C0 arrives
//   partial_input  an operand bit held as a spacer keeps its sum bit and
//                  GCo from completing
// The adder has no parameters; this test runs it at its only size.
module tb_modcvs_adder32;
  import modcvs_pkg::*;

  logic        r;
  dr_t  [31:0] a, b, s;
  dr_t         c0, c32;
  logic [31:0] comp;
  logic        comp33, gco;
  int checks = 0, failures = 0;
  int n_precharge = 0, n_complete = 0, n_carry_out = 0, n_chain32 = 0;
  int n_early_c32 = 0, n_withheld = 0, n_partial_input = 0;
  bit [32:0] len_seen;

  modcvs_adder32 dut (.r, .a, .b, .c0, .s, .c32, .comp, .comp33, .gco);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: a=%h b=%h c0=%b", what, a, b, c0);
    end
  endtask

  function automatic dr_t [31:0] enc32(input logic [31:0] v);
    dr_t [31:0] x;
    for (int i = 0; i < 32; i++) x[i] = dr_enc(v[i]);
    return x;
  endfunction

  function automatic logic [31:0] rail_t(input dr_t [31:0] x);
    logic [31:0] v;
    for (int i = 0; i < 32; i++) v[i] = x[i].t;
    return v;
  endfunction

  function automatic logic [31:0] rail_f(input dr_t [31:0] x);
    logic [31:0] v;
    for (int i = 0; i < 32; i++) v[i] = x[i].f;
    return v;
  endfunction

  // Longest distance a carry travels: the longest run of propagate bits
  // entered by a carry (from a generate below it, or from C0 = 1).
  function automatic int carry_length(input logic [31:0] av, input logic [31:0] bv,
                                      input logic cin);
    int best = 0, run = 0;
    bit live = cin;
    for (int i = 0; i < 32; i++) begin
      if (av[i] ^ bv[i]) begin
        if (live) run++;
      end else begin
        live = av[i] & bv[i];
        run = 0;
      end
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic precharge();
    r = 1'b0;
    #1;
    check(s == '0 && c32 == DR_SPACER && comp == '0 && !comp33 && !gco, "precharge");
    if (s == '0 && !gco) n_precharge++;
  endtask

  // One complete handshake with valid operands.
  task automatic add(input logic [31:0] av, input logic [31:0] bv, input logic cin);
    logic [32:0] sum;
    precharge();
    a = enc32(av);
    b = enc32(bv);
    c0 = dr_enc(cin);
    #1;
    check(!gco && s == '0, "no evaluation before R");
    r = 1'b1;
    #1;
    sum = 33'(av) + 33'(bv) + 33'(cin);
    check(gco, "GCo");
    check(rail_t(s) == sum[31:0] && rail_f(s) == ~sum[31:0], "sum");
    check(c32 == dr_enc(sum[32]), "carry-out");
    check(comp == '1 && comp33, "partial completions");
    if (gco && rail_t(s) == sum[31:0]) n_complete++;
    if (sum[32]) n_carry_out++;
    if (carry_length(av, bv, cin) == 32) n_chain32++;
    len_seen[carry_length(av, bv, cin)] = 1'b1;
  endtask

  // Carry-in arrives late: evaluate with C0 as a spacer first.
  task automatic late_carry(input logic [31:0] av, input logic [31:0] bv, input logic cin);
    logic [32:0] sum, sum0;
    precharge();
    a = enc32(av);
    b = enc32(bv);
    c0 = DR_SPACER;
    r = 1'b1;
    #1;
    sum0 = 33'(av) + 33'(bv);
    check(!gco || (av ^ bv) == '0, "GCo waits for C0");
    if ((av ^ bv) == 32'hFFFF_FFFF) begin
      check(c32 == DR_SPACER && !comp33 && !gco, "withheld carry-out");
      if (c32 == DR_SPACER && !gco) n_withheld++;
    end else begin
      check(c32 == dr_enc(sum0[32]) && comp33, "early carry-out");
      if (comp33) n_early_c32++;
    end
    c0 = dr_enc(cin);
    #1;
    sum = 33'(av) + 33'(bv) + 33'(cin);
    check(gco && rail_t(s) == sum[31:0] && c32 == dr_enc(sum[32]), "late C0 result");
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 1'b0;
    a = '0;
    b = '0;
    c0 = DR_SPACER;

    // Carry-propagate lengths 0..32 driven by the carry-in.
    for (int l = 0; l <= 32; l++)
      add((l == 32) ? 32'hFFFF_FFFF : ((32'd1 << l) - 32'd1), 32'd0, 1'b1);
    // Generate at bit g followed by a propagate run.
    for (int g = 0; g < 32; g++)
      for (int l = 0; g + l < 32; l += 3) begin
        logic [31:0] run;
        run = (l == 0) ? 32'd0 : (((32'd1 << l) - 32'd1) << (g + 1));
        add((32'd1 << g) | run, 32'd1 << g, 1'b0);
      end
    // Random operands.
    for (int t = 0; t < 5000; t++)
      add($urandom, $urandom, 1'($urandom));
    // Late carry-in.
    late_carry(32'hFFFF_FFFF, 32'h0, 1'b1);
    late_carry(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    late_carry(32'h8000_0000, 32'h8000_0000, 1'b1);
    for (int t = 0; t < 200; t++)
      late_carry($urandom, $urandom, 1'($urandom));

    // One operand bit held as a spacer.
    precharge();
    a = enc32(32'h1234_5678);
    b = enc32(32'h0F0F_0F0F);
    a[20] = DR_SPACER;
    c0 = DR_ZERO;
    r = 1'b1;
    #1;
    check(!comp[20] && s[20] == DR_SPACER && !gco, "operand spacer");
    if (!comp[20] && !gco) n_partial_input++;
    a[20] = DR_ONE;
    #1;
    check(gco && rail_t(s) == (32'h1234_5678 | 32'h0010_0000) + 32'h0F0F_0F0F, "operand arrives");
    precharge();

    for (int l = 0; l <= 32; l++)
      check(len_seen[l], "carry-propagate length covered");
    check(n_precharge > 0, "precharge seen");
    check(n_complete > 0, "completion seen");
    check(n_carry_out > 0, "carry-out seen");
    check(n_chain32 > 0, "32-bit carry chain seen");
    check(n_early_c32 > 0, "early carry-out seen");
    check(n_withheld > 0, "withheld completion seen");
    check(n_partial_input > 0, "operand spacer seen");
    $display("mechanisms: precharge=%0d complete=%0d carry_out=%0d chain32=%0d early_c32=%0d withheld=%0d partial_input=%0d",
             n_precharge, n_complete, n_carry_out, n_chain32, n_early_c32, n_withheld, n_partial_input);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

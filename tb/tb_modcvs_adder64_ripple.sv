// tb_modcvs_adder64_ripple: two 32-bit adders chained into a 64-bit adder.
//
// The carry-out C32 of the low adder is the dual-rail carry-in of the high
// adder, both share R, and the 64-bit addition is complete when both global
// completions are high. Because the carry-out is itself dual rail, the high
// adder waits for it without any extra control: this is the ripple-carry
// configuration in which the 32-bit adder is also evaluated. Checked against
// 64-bit integer addition with random operands, full 64-bit propagate chains
// and carries crossing the 32-bit boundary; the four-phase handshake is
// played as in the 32-bit test, including precharge between additions.
module tb_modcvs_adder64_ripple;
  import modcvs_pkg::*;

  logic        r;
  dr_t  [63:0] a, b, s;
  dr_t         c0, cmid, c64;
  logic [63:0] comp;
  logic        comp33_lo, comp33_hi, gco_lo, gco_hi;
  int checks = 0, failures = 0;
  int n_cross = 0, n_chain64 = 0;

  modcvs_adder32 u_lo (.r, .a(a[31:0]), .b(b[31:0]), .c0, .s(s[31:0]), .c32(cmid),
                       .comp(comp[31:0]), .comp33(comp33_lo), .gco(gco_lo));
  modcvs_adder32 u_hi (.r, .a(a[63:32]), .b(b[63:32]), .c0(cmid), .s(s[63:32]), .c32(c64),
                       .comp(comp[63:32]), .comp33(comp33_hi), .gco(gco_hi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", what);
    end
  endtask

  task automatic add(input logic [63:0] av, input logic [63:0] bv, input logic cin);
    logic [64:0] sum;
    logic [63:0] st, sf;
    r = 1'b0;
    #1;
    check(s == '0 && !gco_lo && !gco_hi, "precharge");
    for (int i = 0; i < 64; i++) begin
      a[i] = dr_enc(av[i]);
      b[i] = dr_enc(bv[i]);
    end
    c0 = dr_enc(cin);
    r = 1'b1;
    #1;
    sum = 65'(av) + 65'(bv) + 65'(cin);
    for (int i = 0; i < 64; i++) begin
      st[i] = s[i].t;
      sf[i] = s[i].f;
    end
    check(gco_lo && gco_hi, "64-bit completion");
    check(st == sum[63:0] && sf == ~sum[63:0], "64-bit sum");
    check(c64 == dr_enc(sum[64]), "64-bit carry-out");
    if (cmid.t) n_cross++;
    if ((av ^ bv) == '1 && cin) n_chain64++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add(64'hFFFF_FFFF_FFFF_FFFF, 64'h0, 1'b1);
    add(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    add(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0);
    add(64'h7FFF_FFFF_8000_0000, 64'h0000_0000_8000_0000, 1'b0);
    for (int t = 0; t < 3000; t++)
      add({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    check(n_cross > 0, "carry across the 32-bit boundary seen");
    check(n_chain64 > 0, "64-bit propagate chain seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

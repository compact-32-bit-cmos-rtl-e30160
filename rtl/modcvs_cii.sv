// modcvs_cii: cell CII, the 8-bit group enhanced carry look-ahead gate.
//
// From the adder carry-in C0 and the 8-bit group terms PPP, GGG, NNN of the
// four CI cells it computes the group carries C8, C16, C24 and the carry-out
// C32, each dual rail:
//   C(8k)     = GGG(8k) + PPP(8k).C(8k-8)
//   C-bar(8k) = NNN(8k) + PPP(8k).C-bar(8k-8)
// The four carries are taps on one pair of series PPP chains, so a single
// gate replaces a ripple of four. Comp33 is the completion of the carry-out
// pair (high once C32 or C32-bar has risen).
//
// Interface: index 0..3 of the vectors is group 1..4 (bits 1-8, 9-16, 17-24,
// 25-32); c[0..3] is C8, C16, C24, C32. Timing: combinational; everything
// low while r (R) is low. Function and organisation follow the document.
module modcvs_cii
  import modcvs_pkg::*;
(
  input  logic       r,      // R: 0 = precharge, 1 = evaluate
  input  dr_t        c0,     // C0: adder carry-in
  input  logic [3:0] ppp,    // PPP8, PPP16, PPP24, PPP32
  input  logic [3:0] ggg,    // GGG8, GGG16, GGG24, GGG32
  input  logic [3:0] nnn,    // NNN8, NNN16, NNN24, NNN32
  output dr_t  [3:0] c,      // C8, C16, C24, C32
  output logic       comp33  // completion of C32
);

  always_comb begin
    logic ct, cf;  // carry node of the chain, true and complement rail
    ct = c0.t;
    cf = c0.f;
    for (int k = 0; k < 4; k++) begin
      ct     = r & (ggg[k] | (ppp[k] & ct));
      cf     = r & (nnn[k] | (ppp[k] & cf));
      c[k].t = ct;
      c[k].f = cf;
    end
    comp33 = dr_done(c[3]);
  end

endmodule

// modcvs_ciii: cell CIII, the dual-rail EXOR sum gate with completion.
//
// S(i) = C(i-1) xor P(i) on the true rail and its complement on the other
// rail, each formed from the dual-rail carry and propagate inputs:
//   S     = P.C-bar + P-bar.C
//   S-bar = P.C     + P-bar.C-bar
// so neither rail rises before both inputs are valid. Comp(i), the partial
// completion of this sum bit, is high once either rail has risen (the NAND on
// the two precharged nodes).
//
// Timing: combinational; s and comp are low while r (R) is low.
// The function is the document's sum equation; the complement rail is the
// inverse of S, as dual-rail coding requires.
module modcvs_ciii
  import modcvs_pkg::*;
(
  input  logic r,     // R: 0 = precharge, 1 = evaluate
  input  dr_t  p,     // P(i) / P-bar(i)
  input  dr_t  c,     // C(i-1) / C-bar(i-1)
  output dr_t  s,     // S(i) / S-bar(i)
  output logic comp   // Comp(i)
);

  always_comb begin
    s.t  = r & ((p.t & c.f) | (p.f & c.t));
    s.f  = r & ((p.t & c.t) | (p.f & c.f));
    comp = dr_done(s);
  end

endmodule

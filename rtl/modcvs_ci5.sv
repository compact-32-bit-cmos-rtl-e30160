// modcvs_ci5: cell CI.5, the 4-bit enhanced carry look-ahead gate.
//
// It computes the dual-rail carries C(n+3) .. C(n+6) of an 8-bit group. The
// first one skips the lower four bits with the 4-bit group terms of CI.2 and
// CI.3:
//   C(n+3)     = GGG(n+3) + PPP(n+3).C(n-1)
//   C-bar(n+3) = NNN(n+3) + PPP(n+3).C-bar(n-1)
// and the next three ripple through bits n+4 .. n+6 with the bit terms, as in
// CI.4. This gate lies on the adder's worst-case path (carry-in to the top
// sum bit).
//
// Interface: index 0..3 of c is C(n+3) .. C(n+6); index 0..2 of p/g/n is
// bit n+4 .. n+6. Timing: combinational; outputs low while r (R) is low.
// The document gives this gate's inputs and outputs but not its netlist; the
// recurrence is its eqn. 1 applied to the 4-bit group terms of eqn. 8.
module modcvs_ci5
  import modcvs_pkg::*;
(
  input  logic       r,     // R: 0 = precharge, 1 = evaluate
  input  dr_t        cin,   // C(n-1), the group carry-in
  input  logic       ppp3,  // PPP(n+3)
  input  logic       ggg3,  // GGG(n+3)
  input  logic       nnn3,  // NNN(n+3)
  input  logic [2:0] p,     // P(n+4..n+6)
  input  logic [2:0] g,     // G(n+4..n+6)
  input  logic [2:0] n,     // N(n+4..n+6)
  output dr_t  [3:0] c      // C(n+3..n+6)
);

  always_comb begin
    logic ct, cf;  // carry node of the chain, true and complement rail
    ct     = r & (ggg3 | (ppp3 & cin.t));
    cf     = r & (nnn3 | (ppp3 & cin.f));
    c[0].t = ct;
    c[0].f = cf;
    for (int i = 1; i < 4; i++) begin
      ct     = r & (g[i-1] | (p[i-1] & ct));
      cf     = r & (n[i-1] | (p[i-1] & cf));
      c[i].t = ct;
      c[i].f = cf;
    end
  end

endmodule

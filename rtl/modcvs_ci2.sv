// modcvs_ci2: cell CI.2, the 4- and 8-bit group propagate gate.
//
// A single multiple-output domino (MODL) stack: PPP(n+3) = PP(n+3).PP(n+1)
// is tapped from the middle of the series chain that also gives
// PPP(n+7) = PP(n+7).PP(n+5).PPP(n+3). Both outputs are single rail: the
// group "does not propagate" is never needed, because the kill and generate
// gates of CI.3 cover it.
//
// Interface: pp[0..3] are the 2-bit propagate terms PP(n+1), PP(n+3),
// PP(n+5), PP(n+7) from the four CI.1 gates.
// Timing: combinational; both outputs are low while r (R) is low.
// Equations follow the document.
module modcvs_ci2 (
  input  logic       r,     // R: 0 = precharge, 1 = evaluate
  input  logic [3:0] pp,    // PP(n+1), PP(n+3), PP(n+5), PP(n+7)
  output logic       ppp3,  // PPP(n+3)
  output logic       ppp7   // PPP(n+7)
);

  always_comb begin
    ppp3 = r & pp[0] & pp[1];
    ppp7 = ppp3 & pp[2] & pp[3];
  end

endmodule

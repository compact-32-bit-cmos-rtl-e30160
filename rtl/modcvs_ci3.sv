// modcvs_ci3: cell CI.3, the 4- and 8-bit group generate and kill gate.
//
// A MODCVS gate with two complementary trees. The generate tree gives
//   GGG(n+3) = GG(n+3) + PP(n+3).GG(n+1)
//   GGG(n+7) = GG(n+7) + PP(n+7).(GG(n+5) + PP(n+5).GGG(n+3))
// and the kill tree the same with NN in place of GG. The 4-bit result is a
// node inside the 8-bit tree, so one gate yields both. Sharing nodes this way
// is safe because PP and GG (and PP and NN) of the same slice are never high
// together.
//
// Interface: index 0..3 of gg/nn is slice n+1, n+3, n+5, n+7; pp[1..3] is
// PP(n+3), PP(n+5), PP(n+7) (pp[0] is not used by the equations and is not a
// port). Timing: combinational; all outputs low while r (R) is low.
// Equations follow the document.
module modcvs_ci3 (
  input  logic       r,     // R: 0 = precharge, 1 = evaluate
  input  logic [3:1] pp,    // PP(n+3), PP(n+5), PP(n+7)
  input  logic [3:0] gg,    // GG(n+1), GG(n+3), GG(n+5), GG(n+7)
  input  logic [3:0] nn,    // NN(n+1), NN(n+3), NN(n+5), NN(n+7)
  output logic       ggg3,  // GGG(n+3)
  output logic       nnn3,  // NNN(n+3)
  output logic       ggg7,  // GGG(n+7)
  output logic       nnn7   // NNN(n+7)
);

  always_comb begin
    ggg3 = r & (gg[1] | (pp[1] & gg[0]));
    nnn3 = r & (nn[1] | (pp[1] & nn[0]));
    ggg7 = r & (gg[3] | (pp[3] & (gg[2] | (pp[2] & ggg3))));
    nnn7 = r & (nn[3] | (pp[3] & (nn[2] | (pp[2] & nnn3))));
  end

endmodule

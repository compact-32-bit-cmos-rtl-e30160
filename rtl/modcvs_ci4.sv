// modcvs_ci4: cell CI.4, the 3-bit enhanced carry look-ahead gate.
//
// From the group carry-in C(n-1) (dual rail) and the bit terms G, N, P of
// bits n, n+1 and n+2 it computes the three dual-rail carries C(n), C(n+1),
// C(n+2) with the enhanced CLA recurrence
//   C(i)     = G(i) + P(i).C(i-1)
//   C-bar(i) = N(i) + P(i).C-bar(i-1)
// in one multiple-output gate: each carry is a node of the same pair of
// series chains. A carry rail rises only once the generate/kill terms and,
// where needed, the incoming carry rail have risen, so the outputs stay a
// spacer until they are known.
//
// Interface: index 0..2 is bit n, n+1, n+2. Timing: combinational; outputs
// low while r (R) is low. The document gives the function and the inputs of
// this gate but not its netlist; the recurrence is the document's eqn. 1.
module modcvs_ci4
  import modcvs_pkg::*;
(
  input  logic       r,     // R: 0 = precharge, 1 = evaluate
  input  dr_t        cin,   // C(n-1), the group carry-in
  input  logic [2:0] p,     // P(n..n+2)
  input  logic [2:0] g,     // G(n..n+2)
  input  logic [2:0] n,     // N(n..n+2)
  output dr_t  [2:0] c      // C(n..n+2)
);

  always_comb begin
    logic ct, cf;  // carry node of the chain, true and complement rail
    ct = cin.t;
    cf = cin.f;
    for (int i = 0; i < 3; i++) begin
      ct     = r & (g[i] | (p[i] & ct));
      cf     = r & (n[i] | (p[i] & cf));
      c[i].t = ct;
      c[i].f = cf;
    end
  end

endmodule

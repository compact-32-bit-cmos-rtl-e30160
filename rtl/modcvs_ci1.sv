// modcvs_ci1: cell CI.1, the 1- and 2-bit generate/kill/propagate gate.
//
// One compound MODCVS gate takes a 2-bit slice (bits n and n+1) of the
// dual-rail operands A and B and produces, for each bit, the generate
// G = A.B, the kill N = not(A + B) and the dual-rail propagate P / P-bar, and
// for the pair the 2-bit terms GG(n+1) = G(n+1) + P(n+1).G(n),
// NN(n+1) = N(n+1) + P(n+1).N(n) and PP(n+1) = P(n+1).P(n). P-bar is not a
// dynamic node of its own: it is G + N, the static NAND of the two precharged
// nodes, as in the document's gate. Per bit, exactly one of G, N and P rises
// in an evaluation; in precharge (r low) every output is low.
//
// Interface: index 0 of every vector is bit n, index 1 is bit n+1.
// Timing: purely combinational; r is the precharge/evaluate signal R, and
// every output is forced low while r is low, like the foot transistor of a
// dynamic gate. The equations are the document's; the transistor netlist is
// represented only by its logic function.
module modcvs_ci1
  import modcvs_pkg::*;
(
  input  logic       r,    // R: 0 = precharge, 1 = evaluate
  input  dr_t  [1:0] a,    // A(n+1:n), dual rail
  input  dr_t  [1:0] b,    // B(n+1:n), dual rail
  output logic [1:0] g,    // G: bit generate
  output logic [1:0] n,    // N: bit kill
  output dr_t  [1:0] p,    // P (true rail) and P-bar (complement rail)
  output logic       gg,   // GG(n+1)
  output logic       nn,   // NN(n+1)
  output logic       pp    // PP(n+1)
);

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      g[i]   = r & a[i].t & b[i].t;
      n[i]   = r & a[i].f & b[i].f;
      p[i].t = r & ((a[i].t & b[i].f) | (a[i].f & b[i].t));
      p[i].f = g[i] | n[i];
    end
    gg = g[1] | (p[1].t & g[0]);
    nn = n[1] | (p[1].t & n[0]);
    pp = p[1].t & p[0].t;
  end

endmodule

// modcvs_ci: cell CI, one 8-bit group of the adder.
//
// Three levels of dynamic gates:
//   level 1  four CI.1 gates, one per bit pair, give the bit terms G, N, P,
//            P-bar and the 2-bit terms GG, NN, PP;
//   level 2  CI.2 forms the 4- and 8-bit group propagate PPP, CI.3 the 4- and
//            8-bit group generate GGG and kill NNN;
//   level 3  CI.4 computes carries C(n..n+2) from the group carry-in, CI.5
//            carries C(n+3..n+6) from the group carry-in and the 4-bit terms.
// The group's own carry-out C(n+7) is not made here: the 8-bit terms go to
// the CII cell, which returns the carry-in of the next group.
//
// Interface: bit 0 of every 8-bit vector is bit n of the adder (n = 1, 9, 17
// or 25 in the document's 1-based numbering). c[k] is C(n+k), k = 0..6; the
// sum cells need C(n-1) .. C(n+6), of which C(n-1) is the carry-in itself.
// Timing: combinational; everything is low while r (R) is low.
// The bit generate and kill of bits n+3 and n+7, and the true-rail propagate
// of bit n+7, leave this cell only through the 2-bit terms and P; lint
// reports those bits of the internal vectors as unused, which is expected.
// The partition and equations follow the document.
module modcvs_ci
  import modcvs_pkg::*;
(
  input  logic       r,     // R: 0 = precharge, 1 = evaluate
  input  dr_t  [7:0] a,     // A(n+7..n)
  input  dr_t  [7:0] b,     // B(n+7..n)
  input  dr_t        cin,   // C(n-1): group carry-in
  output dr_t  [7:0] p,     // P / P-bar of each bit
  output dr_t  [6:0] c,     // C(n+6..n)
  output logic       ppp,   // PPP(n+7)
  output logic       ggg,   // GGG(n+7)
  output logic       nnn    // NNN(n+7)
);

  logic [7:0] g, n;
  logic [3:0] gg, nn, pp;
  logic       ppp3, ggg3, nnn3;

  // Level 1: one CI.1 gate per bit pair.
  for (genvar j = 0; j < 4; j++) begin : g_l1
    modcvs_ci1 u_ci1 (
      .r  (r),
      .a  (a[2*j+1 : 2*j]),
      .b  (b[2*j+1 : 2*j]),
      .g  (g[2*j+1 : 2*j]),
      .n  (n[2*j+1 : 2*j]),
      .p  (p[2*j+1 : 2*j]),
      .gg (gg[j]),
      .nn (nn[j]),
      .pp (pp[j])
    );
  end

  // Level 2: group propagate and group generate/kill.
  modcvs_ci2 u_ci2 (
    .r    (r),
    .pp   (pp),
    .ppp3 (ppp3),
    .ppp7 (ppp)
  );

  modcvs_ci3 u_ci3 (
    .r    (r),
    .pp   (pp[3:1]),
    .gg   (gg),
    .nn   (nn),
    .ggg3 (ggg3),
    .nnn3 (nnn3),
    .ggg7 (ggg),
    .nnn7 (nnn)
  );

  // Level 3: the seven internal carries.
  logic [7:0] pt;
  always_comb
    for (int i = 0; i < 8; i++) pt[i] = p[i].t;

  modcvs_ci4 u_ci4 (
    .r   (r),
    .cin (cin),
    .p   (pt[2:0]),
    .g   (g[2:0]),
    .n   (n[2:0]),
    .c   (c[2:0])
  );

  modcvs_ci5 u_ci5 (
    .r    (r),
    .cin  (cin),
    .ppp3 (ppp3),
    .ggg3 (ggg3),
    .nnn3 (nnn3),
    .p    (pt[6:4]),
    .g    (g[6:4]),
    .n    (n[6:4]),
    .c    (c[6:3])
  );

endmodule

// modcvs_adder32: 32-bit dual-rail self-timed carry look-ahead adder.
//
// The adder follows a dynamic Manchester carry chain organised in 2- and
// 8-bit groups. Four CI cells each take an 8-bit slice of the dual-rail
// operands and produce the bit propagate terms, seven carries and the 8-bit
// group terms PPP/GGG/NNN. The CII cell turns the group terms and the
// carry-in C0 into the group carries C8, C16, C24 (fed back to the CI cells
// of the next groups) and the carry-out C32 with its completion Comp33. 32
// CIII cells form the sums S(i) = C(i-1) xor P(i) and the per-bit completions
// Comp(i); GCo, the AND of all 33 completions, tells the environment that the
// addition is over.
//
// Handshake (four phase, return to zero): with R low every gate precharges
// and every output is a spacer (both rails low, all Comp and GCo low). The
// environment applies valid dual-rail A, B, C0 and raises R; the gates
// evaluate and GCo rises once every sum and the carry-out are valid. The
// environment then lowers R, and GCo falls. Every output rail is monotonic
// during evaluation and rises only once the inputs it depends on are valid,
// so an input still held as a spacer keeps exactly the outputs that depend
// on it from completing.
//
// Bit numbering: the document numbers operand bits 1..32 with C0 the
// carry-in; here vector index i is the document's bit i+1, and comp[i] is
// Comp(i+1). The worst-case path, C0 to S32, passes through CI.1, CI.3, CII,
// CI.5 and CIII; C0 to C32 through CI.1, CI.3 and CII.
// Organisation and equations follow the document; the dual-rail port bundling
// and the AND completion tree are this design's choices.
module modcvs_adder32
  import modcvs_pkg::*;
(
  input  logic        r,       // R: 0 = precharge, 1 = evaluate
  input  dr_t  [31:0] a,       // operand A, dual rail
  input  dr_t  [31:0] b,       // operand B, dual rail
  input  dr_t         c0,      // carry-in C0, dual rail
  output dr_t  [31:0] s,       // sum, dual rail
  output dr_t         c32,     // carry-out C32, dual rail
  output logic [31:0] comp,    // Comp(1..32), per-bit sum completion
  output logic        comp33,  // completion of the carry-out
  output logic        gco      // global completion
);

  dr_t  [NGROUP-1:0] cg;          // C8, C16, C24, C32 from CII
  dr_t  [NGROUP-1:0] cgin;        // group carry-in: C0, C8, C16, C24
  logic [NGROUP-1:0] ppp, ggg, nnn;
  dr_t  [WIDTH-1:0]  p;           // bit propagate P / P-bar
  dr_t  [WIDTH-1:0]  cprev;       // C(i-1) for sum bit i

  assign cgin = {cg[NGROUP-2:0], c0};

  for (genvar k = 0; k < NGROUP; k++) begin : g_grp
    dr_t [GROUP-2:0] cint;

    modcvs_ci u_ci (
      .r   (r),
      .a   (a[GROUP*k +: GROUP]),
      .b   (b[GROUP*k +: GROUP]),
      .cin (cgin[k]),
      .p   (p[GROUP*k +: GROUP]),
      .c   (cint),
      .ppp (ppp[k]),
      .ggg (ggg[k]),
      .nnn (nnn[k])
    );

    assign cprev[GROUP*k +: GROUP] = {cint, cgin[k]};
  end

  modcvs_cii u_cii (
    .r      (r),
    .c0     (c0),
    .ppp    (ppp),
    .ggg    (ggg),
    .nnn    (nnn),
    .c      (cg),
    .comp33 (comp33)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    modcvs_ciii u_ciii (
      .r    (r),
      .p    (p[i]),
      .c    (cprev[i]),
      .s    (s[i]),
      .comp (comp[i])
    );
  end

  assign c32 = cg[NGROUP-1];

  modcvs_gco #(.N(WIDTH + 1)) u_gco (
    .comp ({comp33, comp}),
    .gco  (gco)
  );

endmodule

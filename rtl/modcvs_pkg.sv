// modcvs_pkg: types and constants shared by the dual-rail MODCVS adder.
//
// Every logic value that travels between the cells of the adder is either a
// dual-rail pair (dr_t) or a single-rail, precharge-low signal. A dual-rail
// pair holds the "spacer" 00 while the evaluate signal R is low (all dynamic
// nodes precharged, all gate outputs low) and becomes 10 (logic one) or 01
// (logic zero) once its gate has evaluated. 11 never occurs in a fault-free
// circuit. The completion of a pair is the OR of its rails, which is what the
// NAND on the two precharged nodes of a DCVS gate computes.
//
// The adder width, the 8-bit group size and the four groups are the
// document's organisation; the encoding names are this design's own.
package modcvs_pkg;

  // Adder organisation.
  localparam int unsigned WIDTH  = 32;          // operand width
  localparam int unsigned GROUP  = 8;           // bits per CI cell
  localparam int unsigned NGROUP = WIDTH / GROUP;

  // Dual-rail bit: t is the true rail (F), f the complement rail (F-bar).
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_ONE    = '{t: 1'b1, f: 1'b0};
  localparam dr_t DR_ZERO   = '{t: 1'b0, f: 1'b1};

  // Encode a binary value as a valid dual-rail codeword.
  function automatic dr_t dr_enc(input logic v);
    return v ? DR_ONE : DR_ZERO;
  endfunction

  // Completion of one pair: high once either rail has switched.
  function automatic logic dr_done(input dr_t x);
    return x.t | x.f;
  endfunction

endpackage

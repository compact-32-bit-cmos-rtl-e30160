// modcvs_gco: global completion (GCo) of the adder.
//
// GCo rises when every partial completion signal is high: the 32 sum
// completions Comp(1..32) and the carry-out completion Comp33. Because every
// Comp falls as soon as R falls (precharge), GCo also returns low in
// precharge, ready for the next handshake. The document uses a completion
// circuit taken from earlier work and gives only its role; this design builds
// it as the simplest circuit with that role, an AND of all inputs.
//
// Parameter N: number of completion inputs (32 sums + carry-out = 33).
// Timing: combinational.
module modcvs_gco #(
  parameter int unsigned N = 33
) (
  input  logic [N-1:0] comp,  // partial completion signals
  output logic         gco    // global completion
);

  assign gco = &comp;

endmodule

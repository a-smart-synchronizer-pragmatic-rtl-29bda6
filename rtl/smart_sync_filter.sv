// smart_sync_filter: the multi-bit "filter layer" of the smart synchronizer.
//
// kind: behavioural model (event-driven, for simulation only; it has no
// hardware counterpart in the synchronized design).
//
// A bussed crossing such as a Gray-coded pointer relies on only the bits that
// changed in the latest source update being uncertain at the destination.
// This block watches the whole vector d; on every update it marks, in
// transition_vld, exactly the bits that differ from the previous value of the
// vector. Bits that stayed put in the most recent update have been stable for
// at least one source clock cycle and are therefore captured with certainty,
// so their candidacy is vetoed even if they changed earlier since the last
// destination edge. transition_vld feeds the transition_vld input of one
// smart_sync_bit per vector bit.
//
// Interface and timing: d is the source-domain vector (it must come straight
// from source flops, so that one source clock edge gives exactly one update);
// transition_vld changes in the same time step as d and holds until the next
// update. Starts with no bit marked.
//
// The marking rule follows the published filter; computing it as "bits that
// differ between the new value and the value before it" is how this design
// reads that rule.
module smart_sync_filter #(
  parameter int unsigned VEC_SIZE = 3
) (
  input  logic [VEC_SIZE-1:0] d,
  output logic [VEC_SIZE-1:0] transition_vld
);
  logic [VEC_SIZE-1:0] curr_d;

  initial begin
    curr_d         = d;
    transition_vld = '0;
  end

  always begin
    @(d);
    for (int idx = 0; idx < int'(VEC_SIZE); idx++)
      transition_vld[idx] = (curr_d[idx] !== d[idx]);
    curr_d = d;
  end

endmodule

// smart_sync: multi-bit smart synchronizer model for bussed clock-domain
// crossings (for example Gray-coded FIFO pointers).
//
// kind: behavioural model; in silicon it stands for VEC_SIZE independent
// STAGES-deep flip-flop synchronizers clocked by ck.
//
// It joins the two layers of the technique: a smart_sync_filter that marks
// the bits changed in the most recent update of d, and one smart_sync_bit per
// bit that randomizes its capture only if the bit changed since the last ck
// edge AND the filter marks it. For a Gray-coded count this keeps the
// modelled uncertainty to the single bit that moved last, so the output is
// always either the newest value or the one just before it; it never invents
// a value that the source never held, yet successive captures can still skip
// several counts, as a real synchronizer can.
//
// Interface and timing
//   ck, rst_n      destination clock, asynchronous active-low reset (q -> 0)
//   d              source-domain vector, straight from source flops
//   q              synchronized vector, STAGES ck edges after capture (one
//                  more for a bit that resolved late)
//   rand_evt, rand_late, blocked_evt
//                  per-bit event flags from the bit models (see smart_sync_bit)
//
// Per-bit seeds are derived from SEED; that and the flags are this design's
// own choices, the structure follows the published technique.
module smart_sync #(
  parameter int unsigned VEC_SIZE = 3,
  parameter int unsigned STAGES   = 2,
  parameter logic [31:0] SEED     = 32'h0000_0001
) (
  input  logic                ck,
  input  logic                rst_n,
  input  logic [VEC_SIZE-1:0] d,
  output logic [VEC_SIZE-1:0] q,
  output logic [VEC_SIZE-1:0] rand_evt,
  output logic [VEC_SIZE-1:0] rand_late,
  output logic [VEC_SIZE-1:0] blocked_evt
);
  import smart_sync_pkg::*;

  logic [VEC_SIZE-1:0] transition_vld;

  smart_sync_filter #(.VEC_SIZE(VEC_SIZE)) u_filter (
    .d              (d),
    .transition_vld (transition_vld)
  );

  for (genvar i = 0; i < int'(VEC_SIZE); i++) begin : g_bit
    smart_sync_bit #(
      .STAGES (STAGES),
      .SEED   (seed_mix(SEED, i))
    ) u_bit (
      .ck             (ck),
      .rst_n          (rst_n),
      .d              (d[i]),
      .transition_vld (transition_vld[i]),
      .q              (q[i]),
      .rand_evt       (rand_evt[i]),
      .rand_late      (rand_late[i]),
      .blocked_evt    (blocked_evt[i])
    );
  end

endmodule

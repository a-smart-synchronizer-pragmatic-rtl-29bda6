// smart_sync_bit: simulation model of a single-bit clock-domain-crossing
// synchronizer that models metastability (the "basic layer").
//
// kind: behavioural model. It is written for simulation, not synthesis: it
// watches every change of its data input with an event control, which infers
// the source clock domain without needing the source clock. In silicon it
// stands for a plain chain of STAGES flip-flops clocked by ck.
//
// How it works
//   * Every change of d is an "update". The model remembers the value before
//     the last change (prev_d) and the current value (curr_d), and marks the
//     bit a candidate for uncertainty because it changed since the last
//     capture edge (prevVld).
//   * On each rising edge of ck the first stage captures:
//       - if the bit is a candidate AND transition_vld is high, a random
//         choice between prev_d and curr_d (a metastable flop resolving late
//         or early; "late" costs one extra destination cycle);
//       - otherwise curr_d, which is certain to be captured.
//     The edge then clears the candidacy: earlier changes are settled by the
//     next sample.
//   * transition_vld is the hook through which a higher-level filter narrows
//     the candidates (see smart_sync_filter). Tied high, the model is the
//     plain aggressive one, randomizing every bit that changed.
//   * The random stream is a per-instance xorshift32 seeded by SEED and
//     stepped only when a random decision is taken, so runs are reproducible.
//   * Stages 2..STAGES are ordinary flops behind the modelled first stage.
//
// Interface and timing
//   ck, rst_n         destination clock, asynchronous active-low reset
//                     (clears all stages to 0 and the candidacy)
//   d                 asynchronous input, expected to come straight from a
//                     source-domain flop
//   transition_vld    filter qualifier for this bit, sampled at ck
//   q                 synchronized output: d appears STAGES ck edges after
//                     being captured, or STAGES+1 when resolved late
//   rand_evt          high for the cycle after an edge that took a random
//                     decision; rand_late marks that it chose prev_d;
//                     blocked_evt marks a candidate that the filter vetoed.
//
// The capture rule, the candidacy set by input changes and cleared by the
// clock, and the transition_vld hook follow the published technique. The
// reset, the number of stages, the random generator and the event outputs
// are this design's own choices.
//
// A synthesis tool reads the input-event process as combinational logic and
// reports a loop through the update counter d_evt; that process is a
// simulation-only observer of d, so the report does not apply.
module smart_sync_bit #(
  parameter int unsigned STAGES = 2,
  parameter logic [31:0] SEED   = 32'h0000_0001
) (
  input  logic ck,
  input  logic rst_n,
  input  logic d,
  input  logic transition_vld,
  output logic q,
  output logic rand_evt,
  output logic rand_late,
  output logic blocked_evt
);
  import smart_sync_pkg::*;

  // Input history, written only by the event process below.
  logic        curr_d;
  logic        prev_d;
  int unsigned d_evt;      // number of updates of d seen so far

  // Capture side.
  int unsigned seen_evt;   // d_evt at the last capture edge
  logic [31:0] rng;
  logic [31:0] rng_step;   // next random word, used only when a decision is due
  logic [STAGES-1:0] stage;

  assign rng_step = xorshift32(rng);

  initial begin
    curr_d = d;
    prev_d = d;
    d_evt  = 0;
  end

  always begin
    @(d);
    prev_d = curr_d;
    curr_d = d;
    d_evt  = d_evt + 1;
  end

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      stage       <= '0;
      seen_evt    <= d_evt;
      rng         <= (SEED == 32'd0) ? 32'h1 : SEED;
      rand_evt    <= 1'b0;
      rand_late   <= 1'b0;
      blocked_evt <= 1'b0;
    end else begin
      // prevVld: d changed since the previous capture edge.
      if ((d_evt != seen_evt) && transition_vld) begin
        rng         <= rng_step;
        stage[0]    <= rng_step[31] ? prev_d : curr_d;
        rand_evt    <= 1'b1;
        rand_late   <= rng_step[31] && (prev_d != curr_d);
        blocked_evt <= 1'b0;
      end else begin
        stage[0]    <= curr_d;
        rand_evt    <= 1'b0;
        rand_late   <= 1'b0;
        blocked_evt <= (d_evt != seen_evt);
      end
      for (int i = 1; i < int'(STAGES); i++) stage[i] <= stage[i-1];
      seen_evt <= d_evt;
    end
  end

  assign q = stage[STAGES-1];

  initial assert (STAGES >= 1) else $error("smart_sync_bit: STAGES must be at least 1");

endmodule

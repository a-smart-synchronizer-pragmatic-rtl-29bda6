// tb_smart_sync: self-checking test of the multi-bit smart synchronizer on
// the Gray-pointer crossing of the case study.
//
// The source clock (10 ns) runs exactly twice as fast as the destination
// clock (20 ns); source edges fall half a nanosecond after a multiple of
// 10 ns, so the two never coincide. Phase 1 advances a 3-bit Gray count on
// every source edge (the worst case of the case study: two updates per
// destination cycle); phase 2 advances it on random edges; phase 3 drives
// arbitrary multi-bit updates. A reference here keeps, per bit, the value
// before its last change and whether it changed since the last destination
// edge, plus the mask of bits changed by the most recent update. Checks:
//   * every output bit, STAGES edges after capture, is the current value,
//     or the previous one only if it changed since the last edge AND in the
//     latest update;
//   * in the Gray phases the whole output always decodes to the newest count
//     or the one before it (never a value the source never held);
//   * successive outputs may jump by three counts (the case-study hazard),
//     never more, and such a jump is seen, including the exact run
//     000, 001, 110 of successive outputs that the case study describes; a stale candidate bit that the
//     filter vetoes is seen; late and early resolutions are both seen.
`timescale 1ns/100ps
module tb_smart_sync;
  localparam int unsigned W      = 3;
  localparam int unsigned STAGES = 2;
  localparam int NEDGES = 4000;

  logic ck = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q, rand_evt, rand_late, blocked_evt;

  int checks = 0, failures = 0;
  int n_late = 0, n_early = 0, n_blocked = 0, n_jump3 = 0, n_example = 0;
  logic [W-1:0] q_hist1 = '0, q_hist2 = '0;

  smart_sync #(.VEC_SIZE(W), .STAGES(STAGES), .SEED(32'h1357_9BDF)) dut (
    .ck(ck), .rst_n(rst_n), .d(d), .q(q),
    .rand_evt(rand_evt), .rand_late(rand_late), .blocked_evt(blocked_evt)
  );

  always #10 ck = ~ck;   // destination: posedges at 10, 30, 50, ...

  function automatic logic [W-1:0] bin2gray(input logic [W-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [W-1:0] gray2bin(input logic [W-1:0] g);
    logic [W-1:0] b;
    b[W-1] = g[W-1];
    for (int i = W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // reference
  logic [W-1:0] r_curr = '0, r_prev = '0, r_chg = '0, r_last = '0;
  logic [W-1:0] cnt = '0;
  int phase = 1;
  logic [W-1:0] h_cand [NEDGES];
  logic [W-1:0] h_curr [NEDGES];
  logic [W-1:0] h_prev [NEDGES];
  logic [W-1:0] h_cnt  [NEDGES];
  logic [W-1:0] h_blk  [NEDGES];
  int           h_phase[NEDGES];
  int  edge_n = 0;
  bit  running = 1'b0;
  logic [W-1:0] last_q_bin;
  bit  have_last = 1'b0;

  task automatic update(input logic [W-1:0] nd);
    if (nd != d) begin
      r_last = nd ^ d;
      for (int i = 0; i < W; i++)
        if (r_last[i]) begin
          r_prev[i] = r_curr[i];
          r_curr[i] = nd[i];
          r_chg[i]  = 1'b1;
        end
      d = nd;
    end
  endtask

  // source side
  initial begin
    #0.5;
    forever begin
      #10;
      if (rst_n) begin
        if (phase == 1 || (phase == 2 && $urandom_range(0, 1) == 1)) begin
          cnt = cnt + 1'b1;
          update(bin2gray(cnt));
        end else if (phase == 3) begin
          update(W'($urandom));
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t edge %0d: %s (q=%b)", $time, edge_n, what, q);
    end
  endtask

  always @(posedge ck) begin
    if (running) begin
      h_cand[edge_n]  = r_chg & r_last;
      h_curr[edge_n]  = r_curr;
      h_prev[edge_n]  = r_prev;
      h_cnt[edge_n]   = cnt;
      h_phase[edge_n] = phase;
      h_blk[edge_n]   = r_chg & ~r_last;
      if (edge_n >= 1) begin
        // the event flags report the previous edge's decisions
        check(rand_evt == h_cand[edge_n-1], "rand_evt does not match the candidates");
        check(blocked_evt == h_blk[edge_n-1], "blocked_evt does not match the vetoed bits");
      end
      if (|h_blk[edge_n]) n_blocked++;
      r_chg = '0;
      if (edge_n >= int'(STAGES)) begin
        automatic int k = edge_n - int'(STAGES);
        for (int i = 0; i < W; i++) begin
          if (h_cand[k][i]) begin
            check(q[i] == h_curr[k][i] || q[i] == h_prev[k][i], "candidate bit outside {prev,curr}");
            if (q[i] == h_prev[k][i] && h_prev[k][i] != h_curr[k][i]) n_late++; else n_early++;
          end else
            check(q[i] == h_curr[k][i], "non-candidate bit differs from the current value");
        end
        if (h_phase[k] != 3) begin
          automatic logic [W-1:0] qb = gray2bin(q);
          check(qb == h_cnt[k] || qb == W'(h_cnt[k] - 1'b1), "Gray output is neither newest nor previous count");
          if (have_last && h_phase[k] == 1) begin
            automatic logic [W-1:0] step = W'(qb - last_q_bin);
            check(step <= 3, "Gray output jumped by more than three counts");
            if (step == 3) n_jump3++;
          end
          // the case study's example run: 000, 001, 110 on successive edges
          if (h_phase[k] == 1 && q_hist2 == 3'b000 && q_hist1 == 3'b001 && q == 3'b110) n_example++;
          q_hist2 = q_hist1;
          q_hist1 = q;
          last_q_bin = qb;
          have_last = 1'b1;
        end else have_last = 1'b0;
      end
      edge_n++;
      if (edge_n == NEDGES / 3) phase = 2;
      if (edge_n == 2 * NEDGES / 3) phase = 3;
      if (edge_n == NEDGES) begin
        check(n_late > 0, "no late resolution seen");
        check(n_early > 0, "no early resolution seen");
        check(n_blocked > 0, "no vetoed stale candidate seen");
        check(n_jump3 > 0, "no three-count jump seen");
        check(n_example > 0, "the sequence 000, 001, 110 never appeared");
        $display("late=%0d early=%0d blocked=%0d jump3=%0d example=%0d", n_late, n_early, n_blocked, n_jump3, n_example);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    // released so that the first count lands at 70.5 ns: destination edges
    // then see even counts, the alignment of the case-study example
    #65;
    rst_n = 1'b1;
    r_chg = '0;
    running = 1'b1;
  end

  initial begin
    #(20 * (NEDGES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

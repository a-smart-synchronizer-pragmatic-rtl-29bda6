// tb_smart_sync_bit: self-checking test of the single-bit synchronizer model.
//
// A source process toggles d at random on a 10 ns source clock whose edges
// fall half a nanosecond off the 14 ns destination clock edges, and drives
// transition_vld at random (the filter's veto). A reference written here
// tracks, per destination edge, whether the bit changed since the previous
// edge, its value before the last change and its current value. Checks:
//   * q, STAGES edges after a capture, is the current value, or the previous
//     value only if that capture was a candidate (changed and qualified);
//     a bit that was not a candidate arrives with exactly STAGES edges of
//     latency;
//   * rand_evt and blocked_evt flag exactly the candidate / vetoed captures;
//   * each behaviour (late resolution, early resolution, veto) happens.
`timescale 1ns/100ps
module tb_smart_sync_bit;
  localparam int unsigned STAGES = 2;
  localparam int NEDGES = 3000;

  logic ck = 1'b0, rst_n = 1'b0, d = 1'b0, tv = 1'b0;
  logic q, rand_evt, rand_late, blocked_evt;

  int checks = 0, failures = 0;
  int n_late = 0, n_early = 0, n_blocked = 0, n_certain = 0;

  smart_sync_bit #(.STAGES(STAGES), .SEED(32'hC0FF_EE01)) dut (
    .ck(ck), .rst_n(rst_n), .d(d), .transition_vld(tv),
    .q(q), .rand_evt(rand_evt), .rand_late(rand_late), .blocked_evt(blocked_evt)
  );

  always #7 ck = ~ck;

  // reference state
  logic r_curr = 1'b0, r_prev = 1'b0, r_chg = 1'b0;
  logic h_cand [NEDGES+1];
  logic h_curr [NEDGES+1];
  logic h_prev [NEDGES+1];
  logic h_chg  [NEDGES+1];
  int   edge_n = 0;
  bit   running = 1'b0;

  // source side: edges at 10k + 0.5 ns, never on a destination edge
  initial begin
    #0.5;
    forever begin
      #10;
      // quiet stretches give long stable periods as well as busy ones
      if (($urandom_range(0, 3) != 0) && (edge_n % 200 < 150)) begin
        d = ~d;
        r_prev = r_curr;
        r_curr = d;
        r_chg  = 1'b1;
      end
      tv = ($urandom_range(0, 2) != 0);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t edge %0d: %s", $time, edge_n, what);
    end
  endtask

  always @(posedge ck) begin
    if (running) begin
      h_cand[edge_n] = r_chg && tv;
      h_chg[edge_n]  = r_chg;
      h_curr[edge_n] = r_curr;
      h_prev[edge_n] = r_prev;
      r_chg = 1'b0;
      if (edge_n >= int'(STAGES)) begin
        automatic int k = edge_n - int'(STAGES);
        if (h_cand[k]) begin
          check((q == h_curr[k]) || (q == h_prev[k]), "candidate capture outside {prev,curr}");
          if (q == h_prev[k] && h_prev[k] != h_curr[k]) n_late++; else n_early++;
        end else begin
          check(q == h_curr[k], "certain capture not equal to current value after STAGES edges");
          n_certain++;
        end
      end
      if (edge_n >= 1) begin
        check(rand_evt == h_cand[edge_n-1], "rand_evt does not match candidacy");
        check(blocked_evt == (h_chg[edge_n-1] && !h_cand[edge_n-1]), "blocked_evt mismatch");
        check(!rand_late || rand_evt, "rand_late without rand_evt");
        if (blocked_evt) n_blocked++;
      end
      edge_n++;
      if (edge_n == NEDGES) begin
        check(n_late > 0, "no late resolution seen");
        check(n_early > 0, "no early resolution seen");
        check(n_blocked > 0, "no vetoed candidate seen");
        check(n_certain > 0, "no certain capture seen");
        $display("late=%0d early=%0d blocked=%0d certain=%0d", n_late, n_early, n_blocked, n_certain);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #60.2;
    rst_n = 1'b1;
    r_chg = 1'b0;
    @(posedge ck);   // first edge out of reset (changes before reset are moot)
    #1;
    r_chg = 1'b0;
    running = 1'b1;
  end

  // the DUT cleared its candidacy at the reset edges; align the reference
  always @(posedge ck) if (!rst_n) r_chg = 1'b0;

  initial begin
    #(14 * (NEDGES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

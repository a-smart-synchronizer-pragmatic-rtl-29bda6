// tb_async_fifo: end-to-end test of the Gray-pointer FIFO with smart
// synchronizers, at the design's default parameters (it also serves as the
// full-size run).
//
// The case-study situation: the read clock (20 ns) is exactly half the write
// clock (10 ns) and the writer writes on every cycle it can. Phases:
//   1. writer every cycle, reader every cycle: the FIFO fills and stalls the
//      writer (full);
//   2. writer idle, reader drains: empty;
//   3. single words written into an idle, empty FIFO: checks the write-to-
//      readable latency, 3 read-clock edges, or 4 when the synchronizer
//      resolves late;
//   4. random writes and reads.
// A scoreboard checks that every word comes out once, in order, unchanged.
// Coverage: full, empty, randomized pointer captures resolved late on both
// sides, a stale pointer bit vetoed by the filter, and a three-count jump of
// the write pointer as seen by the read side each must happen.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned PTR_W  = 3;

  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic winc = 1'b0, rinc = 1'b0, wfull, rempty;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [PTR_W-1:0] rq_wgray, wq_rgray;
  logic [PTR_W-1:0] r_rand_evt, r_rand_late, r_blocked_evt;
  logic [PTR_W-1:0] w_rand_evt, w_rand_late, w_blocked_evt;

  async_fifo dut (
    .wclk(wclk), .wrst_n(wrst_n), .winc(winc), .wdata(wdata), .wfull(wfull),
    .rclk(rclk), .rrst_n(rrst_n), .rinc(rinc), .rdata(rdata), .rempty(rempty),
    .rq_wgray(rq_wgray), .wq_rgray(wq_rgray),
    .r_rand_evt(r_rand_evt), .r_rand_late(r_rand_late), .r_blocked_evt(r_blocked_evt),
    .w_rand_evt(w_rand_evt), .w_rand_late(w_rand_late), .w_blocked_evt(w_blocked_evt)
  );

  always #5  wclk = ~wclk;   // posedges at 5, 15, 25, ...
  always #10 rclk = ~rclk;   // posedges at 10, 30, 50, ...

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_r_late = 0, n_w_late = 0, n_blocked = 0, n_jump3 = 0;
  int n_lat3 = 0, n_lat4 = 0, n_written = 0, n_read = 0;
  logic [DATA_W-1:0] sb [$];
  int phase = 0;
  logic [DATA_W-1:0] next_word = '0;

  function automatic logic [PTR_W-1:0] gray2bin(input logic [PTR_W-1:0] g);
    logic [PTR_W-1:0] b;
    b[PTR_W-1] = g[PTR_W-1];
    for (int i = PTR_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t phase %0d: %s", $time, phase, what);
    end
  endtask

  // write side: scoreboard push and coverage
  always @(posedge wclk) if (wrst_n) begin
    if (winc && !wfull) begin
      sb.push_back(wdata);
      n_written++;
    end
    if (winc && wfull) n_full++;
    if (|w_rand_late) n_w_late++;
  end

  // read side: scoreboard compare and coverage
  logic [PTR_W-1:0] last_rq = '0;
  always @(posedge rclk) if (rrst_n) begin
    if (rinc && !rempty) begin
      check(sb.size() > 0, "read from an empty scoreboard");
      if (sb.size() > 0) begin
        automatic logic [DATA_W-1:0] exp = sb.pop_front();
        check(rdata == exp, $sformatf("read %h expected %h", rdata, exp));
      end
      n_read++;
    end
    if (rinc && rempty) n_empty++;
    if (|r_rand_late) n_r_late++;
    if (|r_blocked_evt) n_blocked++;
    if (PTR_W'(gray2bin(rq_wgray) - gray2bin(last_rq)) == 3) n_jump3++;
    last_rq = rq_wgray;
  end

  initial begin
    #42;
    wrst_n = 1'b1;
    rrst_n = 1'b1;

    // 1. write every write cycle, read every read cycle
    phase = 1;
    fork
      repeat (800) begin
        @(negedge wclk);
        winc = 1'b1;
        wdata = next_word;
        @(posedge wclk);
        if (!wfull) next_word = next_word + 1'b1;
      end
      repeat (400) begin
        @(negedge rclk);
        rinc = 1'b1;
      end
    join
    @(negedge wclk) winc = 1'b0;

    // 2. drain
    phase = 2;
    repeat (40) @(negedge rclk);
    check(rempty, "FIFO not empty after draining");
    check(sb.size() == 0, "words left in the scoreboard after draining");
    rinc = 1'b0;

    // 3. write-to-readable latency into an idle FIFO
    phase = 3;
    repeat (60) begin
      int lat;
      repeat (6) @(negedge rclk);
      @(negedge wclk);
      winc = 1'b1;
      wdata = next_word;
      next_word = next_word + 1'b1;
      @(posedge wclk);
      #1 winc = 1'b0;
      lat = 0;
      while (rempty && lat < 10) begin
        @(posedge rclk);
        lat++;
        #1;
      end
      check(lat == 3 || lat == 4, $sformatf("write-to-readable latency %0d read edges", lat));
      if (lat == 3) n_lat3++;
      if (lat == 4) n_lat4++;
      @(negedge rclk) rinc = 1'b1;
      @(negedge rclk) rinc = 1'b0;
    end

    // 4. random traffic
    phase = 4;
    fork
      repeat (3000) begin
        @(negedge wclk);
        winc = ($urandom_range(0, 2) != 0);
        wdata = next_word;
        @(posedge wclk);
        if (winc && !wfull) next_word = next_word + 1'b1;
      end
      repeat (1500) begin
        @(negedge rclk);
        rinc = ($urandom_range(0, 3) != 0);
      end
    join
    @(negedge wclk) winc = 1'b0;
    rinc = 1'b1;
    repeat (40) @(negedge rclk);
    rinc = 1'b0;
    check(sb.size() == 0, "words lost: scoreboard not empty at the end");

    check(n_full > 0,    "full never happened");
    check(n_empty > 0,   "empty never happened");
    check(n_r_late > 0,  "no late resolution on the read side");
    check(n_w_late > 0,  "no late resolution on the write side");
    check(n_blocked > 0, "filter never vetoed a stale pointer bit");
    check(n_jump3 > 0,   "write pointer never jumped three counts");
    check(n_lat3 > 0 && n_lat4 > 0, "both latencies (3 and 4) not seen");
    $display("written=%0d read=%0d full=%0d empty=%0d r_late=%0d w_late=%0d blocked=%0d jump3=%0d lat3=%0d lat4=%0d",
             n_written, n_read, n_full, n_empty, n_r_late, n_w_late, n_blocked, n_jump3, n_lat3, n_lat4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

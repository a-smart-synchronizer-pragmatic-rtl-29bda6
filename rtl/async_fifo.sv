// async_fifo: dual-clock FIFO whose Gray-coded pointers cross between the
// write and read clock domains through smart synchronizer models.
//
// This is the case study for the smart synchronizer: a small FIFO carries
// multi-bit data from a write clock to an unrelated read clock. Each side
// keeps a binary pointer (to address the storage) and a Gray copy of it. The
// Gray write pointer is synchronized into the read clock and the Gray read
// pointer into the write clock, each through a smart_sync. Because the smart
// synchronizer only randomizes the bit that moved in the latest update, the
// synchronized pointer is always a value the other side really held, either
// the newest or the one before it, yet it may advance by several counts
// between two samples (three when the read clock runs at half the write
// clock and the write side writes every cycle). The FIFO logic below is
// written to be correct for any such jump.
//
// Pointers are PTR_W bits wide, one more than the address, so that full
// (pointers equal except the two top Gray bits) and empty (pointers equal)
// can be told apart. Full and empty are computed from the next pointer value
// and registered, so they are exact on the side that computes them and
// conservative (pessimistic) on the other.
//
// Interface and timing
//   write side (wclk, wrst_n): winc writes wdata at the rising edge of wclk
//       unless wfull; wfull is registered.
//   read side (rclk, rrst_n): rdata shows the oldest word whenever rempty is
//       low (first-word fall-through); rinc pops it at the rising edge of rclk
//       unless rempty; rempty is registered.
//   observation outputs: the synchronized Gray pointers and the smart
//       synchronizers' per-bit event flags, for coverage in a testbench.
//   Latency: a written word becomes readable 1 + SYNC_STAGES (+1 if the
//   synchronizer resolves late) rclk edges after the write edge.
//
// The Gray pointer width comes from the published 3-bit case-study counter;
// the data width, the first-word fall-through read, the registered flags and
// the resets are this design's own choices.
//
// Each reset is used both asynchronously by the flops and as the disable
// condition of the occupancy assertions; a linter may note that mix, which
// is intended: the checks are off while a side is in reset.
module async_fifo #(
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned PTR_W       = 3,
  parameter int unsigned SYNC_STAGES = 2,
  parameter logic [31:0] SEED        = 32'h0000_0001
) (
  // write domain
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,
  // read domain
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rinc,
  output logic [DATA_W-1:0] rdata,
  output logic              rempty,
  // observation
  output logic [PTR_W-1:0]  rq_wgray,      // write pointer as seen by the read side
  output logic [PTR_W-1:0]  wq_rgray,      // read pointer as seen by the write side
  output logic [PTR_W-1:0]  r_rand_evt,
  output logic [PTR_W-1:0]  r_rand_late,
  output logic [PTR_W-1:0]  r_blocked_evt,
  output logic [PTR_W-1:0]  w_rand_evt,
  output logic [PTR_W-1:0]  w_rand_late,
  output logic [PTR_W-1:0]  w_blocked_evt
);
  localparam int unsigned ADDR_W = PTR_W - 1;

  logic [PTR_W-1:0] wbin, wgray, wgray_next;
  logic [PTR_W-1:0] rbin, rgray, rgray_next;
  logic             wpush, rpop;

  assign wpush = winc && !wfull;
  assign rpop  = rinc && !rempty;

  // ---------------- write side ----------------
  gray_ptr #(.PTR_W(PTR_W)) u_wptr (
    .clk(wclk), .rst_n(wrst_n), .inc(wpush),
    .bin(wbin), .gray(wgray), .gray_next(wgray_next)
  );

  smart_sync #(.VEC_SIZE(PTR_W), .STAGES(SYNC_STAGES), .SEED(SEED ^ 32'h5A5A_0F0F)) u_sync_r2w (
    .ck(wclk), .rst_n(wrst_n), .d(rgray), .q(wq_rgray),
    .rand_evt(w_rand_evt), .rand_late(w_rand_late), .blocked_evt(w_blocked_evt)
  );

  // Full: the next write pointer has lapped the read pointer by DEPTH, which
  // in Gray code means the two top bits differ and the rest are equal.
  localparam logic [PTR_W-1:0] FULL_MASK = PTR_W'(3) << (PTR_W - 2);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) wfull <= 1'b0;
    else         wfull <= (wgray_next == (wq_rgray ^ FULL_MASK));
  end

  // ---------------- storage ----------------
  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .wclk(wclk), .we(wpush), .waddr(wbin[ADDR_W-1:0]), .wdata(wdata),
    .raddr(rbin[ADDR_W-1:0]), .rdata(rdata)
  );

  // ---------------- read side ----------------
  gray_ptr #(.PTR_W(PTR_W)) u_rptr (
    .clk(rclk), .rst_n(rrst_n), .inc(rpop),
    .bin(rbin), .gray(rgray), .gray_next(rgray_next)
  );

  smart_sync #(.VEC_SIZE(PTR_W), .STAGES(SYNC_STAGES), .SEED(SEED)) u_sync_w2r (
    .ck(rclk), .rst_n(rrst_n), .d(wgray), .q(rq_wgray),
    .rand_evt(r_rand_evt), .rand_late(r_rand_late), .blocked_evt(r_blocked_evt)
  );

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rempty <= 1'b1;
    else         rempty <= (rgray_next == rq_wgray);
  end

  // ---------------- checks ----------------
  function automatic logic [PTR_W-1:0] gray2bin(input logic [PTR_W-1:0] g);
    logic [PTR_W-1:0] b;
    b[PTR_W-1] = g[PTR_W-1];
    for (int i = int'(PTR_W) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  localparam logic [PTR_W-1:0] DEPTH = PTR_W'(1) << ADDR_W;

  // The read side may never believe that more than DEPTH words are stored,
  // and the write side never that fewer than zero are.
  a_rd_occupancy: assert property (@(posedge rclk) disable iff (!rrst_n)
    (PTR_W'(gray2bin(rq_wgray) - rbin) <= DEPTH));
  a_wr_occupancy: assert property (@(posedge wclk) disable iff (!wrst_n)
    (PTR_W'(wbin - gray2bin(wq_rgray)) <= DEPTH));

  initial assert (PTR_W >= 2) else $error("async_fifo: PTR_W must be at least 2");

endmodule

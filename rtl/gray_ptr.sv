// gray_ptr: FIFO pointer that counts in binary and publishes a Gray-coded copy.
//
// The binary count addresses the FIFO storage; the Gray copy is what crosses
// to the other clock domain, because consecutive Gray values differ in one bit
// only. Both are registered. The next Gray value is also
// output so the FIFO can compute its full/empty flag one cycle early and
// register it.
//
// Interface and timing
//   clk, rst_n   pointer's own clock, asynchronous active-low reset to 0
//   inc          advance by one at the next rising edge (the caller gates it
//                with full/empty)
//   bin, gray    current pointer, registered
//   gray_next    Gray value the pointer takes at the next edge
//
// Gray-coded pointers come from the published case study (a 3-bit reflected
// Gray sequence); the binary-plus-Gray register pair is this design's choice.
module gray_ptr #(
  parameter int unsigned PTR_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [PTR_W-1:0] bin,
  output logic [PTR_W-1:0] gray,
  output logic [PTR_W-1:0] gray_next
);
  logic [PTR_W-1:0] bin_next;

  always_comb begin
    bin_next  = bin + PTR_W'(inc);
    gray_next = (bin_next >> 1) ^ bin_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin_next;
      gray <= gray_next;
    end
  end

endmodule

// fifo_mem: storage of the dual-clock FIFO, DEPTH = 2**ADDR_W words.
//
// One write port clocked by the write domain and one asynchronous read port
// addressed from the read domain. The read port is combinational, so the
// word at the read pointer is visible (first-word fall-through) as soon as
// the FIFO is not empty. The array is written as a plain memory so a tool can
// map it to a register file or RAM.
//
// Interface and timing
//   wclk, we, waddr, wdata   word written at the rising edge of wclk when we
//   raddr, rdata             rdata = mem[raddr], no clock
//
// The document only names the FIFO; the storage organisation is this
// design's own choice. The array has no reset: the FIFO never reads an entry
// before writing it.
module fifo_mem #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 2
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule

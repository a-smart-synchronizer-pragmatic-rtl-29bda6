// tb_fifo_mem: self-checking test of the FIFO storage.
//
// Writes random words to random addresses on random cycles while reading
// random addresses, and checks the combinational read port against a shadow
// copy kept here: a word is visible right after its write edge, and an
// address is unchanged when we is low.
`timescale 1ns/1ps
module tb_fifo_mem;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic wclk = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] shadow [DEPTH];
  bit   valid [DEPTH];
  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (
    .wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 wclk = ~wclk;

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge wclk);
      we    = ($urandom_range(0, 2) != 0);
      waddr = ADDR_W'($urandom);
      wdata = DATA_W'($urandom);
      @(posedge wclk);
      if (we) begin
        shadow[waddr] = wdata;
        valid[waddr]  = 1'b1;
      end
      #1;
      for (int a = 0; a < DEPTH; a++) begin
        raddr = ADDR_W'(a);
        #0.1;
        if (valid[a]) begin
          checks++;
          if (rdata != shadow[a]) begin
            failures++;
            if (failures < 10) $display("FAIL @%0t: addr %0d read %h expected %h", $time, a, rdata, shadow[a]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gray_ptr: self-checking test of the binary/Gray FIFO pointer.
//
// Increments the pointer on random cycles and checks, against a counter kept
// here, the registered binary value, the registered Gray value (b ^ b>>1),
// the look-ahead gray_next, and that consecutive Gray values differ in at
// most one bit. Also checks the asynchronous reset to zero and the wrap.
`timescale 1ns/1ps
module tb_gray_ptr;
  localparam int unsigned PTR_W = 4;

  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0;
  logic [PTR_W-1:0] bin, gray, gray_next;
  logic [PTR_W-1:0] model = '0, last_gray = '0;
  int checks = 0, failures = 0, n_wrap = 0;

  gray_ptr #(.PTR_W(PTR_W)) dut (.clk(clk), .rst_n(rst_n), .inc(inc),
                                 .bin(bin), .gray(gray), .gray_next(gray_next));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s bin=%h gray=%h next=%h model=%h", $time, what, bin, gray, gray_next, model);
    end
  endtask

  initial begin
    #12;
    check(bin == '0 && gray == '0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      inc = ($urandom_range(0, 3) != 0);
      #1;
      check(gray_next == ((model + PTR_W'(inc)) ^ ((model + PTR_W'(inc)) >> 1)), "gray_next");
      @(posedge clk);
      if (inc) begin
        model = model + 1'b1;
        if (model == '0) n_wrap++;
      end
      #1;
      check(bin == model, "binary count");
      check(gray == (model ^ (model >> 1)), "Gray code of count");
      check($countones(gray ^ last_gray) <= 1, "more than one Gray bit changed");
      last_gray = gray;
    end
    check(n_wrap > 0, "pointer never wrapped");
    rst_n = 1'b0;
    #1;
    check(bin == '0 && gray == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

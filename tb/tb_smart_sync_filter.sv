// tb_smart_sync_filter: self-checking test of the multi-bit filter layer.
//
// Drives a sequence of vector updates (single-bit Gray steps, multi-bit
// jumps, and repeated writes of the same value, which are not updates) and
// checks after each that transition_vld marks exactly the bits that differ
// from the value before the update, and that it holds between updates.
`timescale 1ns/100ps
module tb_smart_sync_filter;
  localparam int unsigned W = 5;

  logic [W-1:0] d = '0;
  logic [W-1:0] tv;
  logic [W-1:0] expect_tv = '0;
  int checks = 0, failures = 0;
  int n_multi = 0, n_single = 0;

  smart_sync_filter #(.VEC_SIZE(W)) dut (.d(d), .transition_vld(tv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s (d=%b tv=%b expect=%b)", $time, what, d, tv, expect_tv);
    end
  endtask

  initial begin
    logic [W-1:0] nd;
    #5;
    check(tv == '0, "marks bits before any update");
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 2))
        0: nd = d ^ (W'(1) << $urandom_range(0, W - 1));   // Gray-like step
        1: nd = W'($urandom);                              // arbitrary jump
        default: nd = d;                                   // no update
      endcase
      if (nd != d) begin
        expect_tv = nd ^ d;
        if ($countones(expect_tv) > 1) n_multi++; else n_single++;
      end
      d = nd;
      #3;
      check(tv == expect_tv, "transition_vld after update");
      #4;
      check(tv == expect_tv, "transition_vld holds between updates");
    end
    check(n_multi > 0 && n_single > 0, "both single- and multi-bit updates seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

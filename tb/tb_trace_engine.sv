// tb_trace_engine: runs a 16-deep trace engine with separate write and read
// clocks. Writes a count sequence, raises the error on one value, checks that
// capture stops there and that the read side then returns the last 16 values
// in order, the error-marked one last, over and over.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_trace_engine;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic capture, err, stopped, radv, err_out;
  logic [35:0] din, dout;
  int marked, seen, first_marked_at;
  logic [35:0] got [64];
  logic        gerr [64];

  trace_engine #(.W(36), .DEPTH(16)) dut (.*);
  always #5 wclk = !wclk;
  always #7 rclk = !rclk;

  initial begin repeat (5000) @(posedge wclk); failures++; `TB_DONE end

  initial begin
    capture = 0; err = 0; din = 0; radv = 1;
    repeat (2) @(posedge wclk);
    #1 wrst = 0; rrst = 0;
    // capture every other cycle: values 100..139, error on value 137
    for (int v = 100; v < 140; v++) begin
      capture = 1; din = 36'(v); err = v == 137;
      @(posedge wclk); #1;
      capture = 0; err = 0;
      @(posedge wclk); #1;
    end
    `CHECK_EQ(stopped, 1'b1, "stopped after error")
    // read 64 entries after the write side stopped
    @(posedge rclk); @(posedge rclk); #1;
    for (int k = 0; k < 64; k++) begin
      @(posedge rclk); #1;
      got[k] = dout; gerr[k] = err_out;
    end
    marked = 0; first_marked_at = -1;
    for (int k = 0; k < 64; k++) if (gerr[k]) begin
      marked++;
      if (first_marked_at < 0) first_marked_at = k;
      `CHECK_EQ(got[k], 36'd137, "marked entry is the error value")
    end
    `CHECK_EQ(marked, 4, "one marked entry per 16 reads")
    // the 15 entries before the mark are 122..136 in order
    seen = 0;
    for (int k = first_marked_at + 1; k < first_marked_at + 16; k++) begin
      `CHECK_EQ(got[k], 36'(122 + (k - first_marked_at - 1)), "trace order")
      seen++;
    end
    `CHECK_EQ(seen, 15, "entries checked")
    `TB_DONE
  end
endmodule

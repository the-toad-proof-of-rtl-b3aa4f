// tb_uart: exercises the UART as the processor sees it, through the 16-bit
// control and data ports: transmits a character with the TX write enable
// pulse (held several clocks: only one character may go out), receives
// characters into the 16-entry buffer, reads them through control and data in,
// pops them with RX read pulses, and overflows the buffer.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_uart;
  localparam int F = 2, S = 4, BIT = F * S;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tx, rx = 1;
  logic [15:0] to_cpu_ctrl, to_cpu_data, from_cpu_ctrl, from_cpu_data;
  int falls;
  logic tx_q;

  uart #(.FIRST_BAUD_DIVISOR(F), .SECOND_BAUD_DIVISOR(S), .RX_DEPTH(16)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (100000) @(posedge clk); failures++; `TB_DONE end

  // count start bits on tx
  always @(posedge clk) begin tx_q <= tx; if (tx_q && !tx && !rst) falls++; end

  task automatic drive(logic [7:0] c);
    logic [9:0] frame = {1'b1, c, 1'b0};
    for (int b = 0; b < 10; b++) begin rx = frame[b]; repeat (BIT) @(posedge clk); end
    rx = 1; repeat (BIT) @(posedge clk);
  endtask

  // the tx line, sampled mid-bit, as a character
  task automatic capture_tx(output logic [7:0] c);
    while (tx) @(posedge clk);
    repeat (BIT / 2) @(posedge clk);
    for (int b = 0; b < 8; b++) begin repeat (BIT) @(posedge clk); c[b] = tx; end
    repeat (BIT) @(posedge clk);
  endtask

  initial begin
    logic [7:0] c;
    from_cpu_ctrl = 0; from_cpu_data = 0; falls = 0; tx_q = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    `CHECK_EQ(to_cpu_ctrl[9], 1'b1, "TX ready (word bit 26)")
    `CHECK_EQ(to_cpu_ctrl[8], 1'b0, "RX empty (word bit 27)")
    // transmit 'X' with a long write-enable pulse
    from_cpu_data = 16'h0058;
    from_cpu_ctrl = 16'h0800;            // port bit 4 = word bit 24
    fork
      capture_tx(c);
      begin repeat (5) @(posedge clk); #1;
            `CHECK_EQ(to_cpu_ctrl[11], 1'b1, "TX write enable reads back")
            `CHECK_EQ(to_cpu_ctrl[9], 1'b0, "not ready while sending")
            repeat (15 * BIT) @(posedge clk); #1 from_cpu_ctrl = 16'h0000; end
      begin
        // the enable is held well past the end of the frame: only one frame
        // may go out. "X" (58 hex) has three falling edges in its frame: the
        // start bit and after data bits 4 and 6.
        falls = 0;
        repeat (20 * BIT) @(posedge clk);
        `CHECK_EQ(falls, 3, "one character per write-enable pulse")
      end
    join
    `CHECK_EQ(c, 8'h58, "transmitted character")
    // receive three characters
    drive(8'h41); drive(8'h42); drive(8'h43);
    #1;
    `CHECK_EQ(to_cpu_ctrl[8], 1'b1, "RX not empty")
    `CHECK_EQ(to_cpu_ctrl[7:0], 8'h41, "front character in control in")
    `CHECK_EQ(to_cpu_data, 16'h0041, "front character in data in")
    for (int k = 0; k < 3; k++) begin
      `CHECK_EQ(to_cpu_data[7:0], 8'(8'h41 + k), "buffer order")
      from_cpu_ctrl = 16'h0400;          // port bit 5 = word bit 25
      repeat (6) @(posedge clk); #1;     // long pulse removes one character
      `CHECK_EQ(to_cpu_ctrl[10], 1'b1, "RX read reads back")
      from_cpu_ctrl = 16'h0000;
      @(posedge clk); #1;
    end
    `CHECK_EQ(to_cpu_ctrl[8], 1'b0, "empty after three pops")
    // overflow: 18 characters into a 16-entry buffer, the last two are lost
    for (int k = 0; k < 18; k++) drive(8'(8'h60 + k));
    for (int k = 0; k < 16; k++) begin
      #1 `CHECK_EQ(to_cpu_data[7:0], 8'(8'h60 + k), "full buffer order")
      from_cpu_ctrl = 16'h0400; @(posedge clk); #1 from_cpu_ctrl = 0; @(posedge clk);
    end
    #1 `CHECK_EQ(to_cpu_ctrl[8], 1'b0, "overflowed characters dropped")
    `TB_DONE
  end
endmodule

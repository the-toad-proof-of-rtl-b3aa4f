// tb_uart_transmitter: sends several characters and samples the tx line in
// the middle of every bit time, checking start bit, data bits (LSB first),
// stop bit, the bit time of FIRST*SECOND clocks and the ready flag.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_uart_transmitter;
  localparam int F = 3, S = 4, BIT = F * S;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start, ready, tx;
  logic [7:0] din;

  uart_transmitter #(.FIRST_BAUD_DIVISOR(F), .SECOND_BAUD_DIVISOR(S)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (20000) @(posedge clk); failures++; `TB_DONE end

  task automatic send_and_check(logic [7:0] c);
    logic [9:0] frame;
    int busy;
    frame = {1'b1, c, 1'b0};
    @(posedge clk); #1 start = 1; din = c;
    @(posedge clk); #1 start = 0; din = 8'hxx;
    `CHECK_EQ(ready, 1'b0, "busy after start")
    // now at the start of bit 0; sample each bit in its middle
    repeat (BIT / 2 - 1) @(posedge clk);
    #1;
    for (int b = 0; b < 10; b++) begin
      `CHECK_EQ(tx, frame[b], $sformatf("bit %0d of %h", b, c))
      repeat (BIT) @(posedge clk);
      #1;
    end
    busy = 0;
    while (!ready) begin @(posedge clk); #1; busy++; end
    `CHECK(busy <= BIT, "ready again within a bit time after the stop bit")
    `CHECK_EQ(tx, 1'b1, "line idles high")
  endtask

  initial begin
    start = 0; din = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    `CHECK_EQ(tx, 1'b1, "idle high")
    `CHECK_EQ(ready, 1'b1, "ready when idle")
    send_and_check(8'h58);
    send_and_check(8'hA5);
    send_and_check(8'h01);
    send_and_check(8'hFF);
    `TB_DONE
  end
endmodule

// tb_uart_receiver: drives 8N1 frames at FIRST*SECOND clocks per bit into the
// receiver and checks each character and its single valid pulse; a frame with
// a bad stop bit must not be delivered.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_uart_receiver;
  localparam int F = 3, S = 8, BIT = F * S;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rx = 1, valid;
  logic [7:0] dout;
  int nvalid;
  logic [7:0] lastc;

  uart_receiver #(.FIRST_BAUD_DIVISOR(F), .SECOND_BAUD_DIVISOR(S)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (50000) @(posedge clk); failures++; `TB_DONE end

  always @(posedge clk) if (valid) begin nvalid++; lastc = dout; end

  task automatic drive(logic [7:0] c, logic stopbit = 1'b1);
    logic [9:0] frame;
    frame = {stopbit, c, 1'b0};
    for (int b = 0; b < 10; b++) begin
      rx = frame[b];
      repeat (BIT) @(posedge clk);
    end
    rx = 1;
    repeat (2 * BIT) @(posedge clk);
  endtask

  initial begin
    nvalid = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (BIT) @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      automatic logic [7:0] c = n == 0 ? 8'h58 : 8'($urandom);
      automatic int n_prev = nvalid;
      drive(c);
      `CHECK_EQ(nvalid, n_prev + 1, "one valid pulse per character")
      `CHECK_EQ(lastc, c, "received character")
    end
    begin
      automatic int n_prev = nvalid;
      drive(8'h33, 1'b0);
      `CHECK_EQ(nvalid, n_prev, "framing error dropped")
    end
    drive(8'hC3);
    `CHECK_EQ(lastc, 8'hC3, "recovers after framing error")
    `TB_DONE
  end
endmodule

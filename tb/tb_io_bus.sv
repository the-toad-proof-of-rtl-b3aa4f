// tb_io_bus: checks that one IO bus captures its inputs one clock late,
// loads its output registers only when written (keeping the low bits) and
// clears on reset.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_io_bus;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [15:0] ctrl_pin_in, data_pin_in, ctrl_pin_out, data_pin_out, ctrl_q, data_q;
  logic ctrl_we, data_we;
  word_t wdata;

  io_bus #(.CTRL_W(16), .DATA_W(16)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (1000) @(posedge clk); failures++; `TB_DONE end

  initial begin
    ctrl_pin_in = 16'h1234; data_pin_in = 16'h5678; ctrl_we = 0; data_we = 0; wdata = '0;
    @(posedge clk); #1;
    `CHECK_EQ(ctrl_pin_out, 16'h0, "reset control out")
    `CHECK_EQ(ctrl_q, 16'h0, "reset control in")
    rst = 0;
    @(posedge clk); #1;
    `CHECK_EQ(ctrl_q, 16'h1234, "control in captured")
    `CHECK_EQ(data_q, 16'h5678, "data in captured")
    ctrl_pin_in = 16'hBEEF;
    `CHECK_EQ(ctrl_q, 16'h1234, "capture is registered")
    ctrl_we = 1; wdata = 36'o000000765432;
    @(posedge clk); #1 ctrl_we = 0;
    `CHECK_EQ(ctrl_q, 16'hBEEF, "new capture")
    `CHECK_EQ(ctrl_pin_out, 16'(36'o765432), "control out low 16 bits")
    `CHECK_EQ(data_pin_out, 16'h0, "data out untouched")
    data_we = 1; wdata = 36'h9_8765_4321;
    @(posedge clk); #1 data_we = 0; wdata = '1;
    `CHECK_EQ(data_pin_out, 16'h4321, "data out low 16 bits")
    @(posedge clk); #1;
    `CHECK_EQ(data_pin_out, 16'h4321, "data out holds")
    `CHECK_EQ(ctrl_pin_out, 16'(36'o765432), "control out holds")
    `TB_DONE
  end
endmodule

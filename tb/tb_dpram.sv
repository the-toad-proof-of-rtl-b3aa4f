// tb_dpram: writes random words through the data port of a small dual-port
// memory and reads them back through both ports, checking the one-clock read
// latency and the ready flags.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_dpram;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  half_t a_addr, b_addr;
  logic a_rd, b_rd, b_we, a_ready, b_ready;
  word_t a_dout, b_dout, b_din;
  word_t model [256];

  dpram #(.WORDS(256)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; `TB_DONE end

  initial begin
    a_rd = 0; b_rd = 0; b_we = 0; a_addr = 0; b_addr = 0; b_din = 0;
    @(posedge clk); #1;
    for (int k = 0; k < 256; k++) begin
      b_we = 1; b_addr = 18'(k); b_din = {4'($urandom), 32'($urandom)}; model[k] = b_din;
      @(posedge clk); #1;
    end
    b_we = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int i = $urandom_range(255), j = $urandom_range(255);
      a_rd = 1; a_addr = 18'(i); b_rd = 1; b_addr = 18'(j);
      @(posedge clk); #1;
      a_rd = 0; b_rd = 0;
      `CHECK_EQ(a_ready, 1'b1, "a ready after one clock")
      `CHECK_EQ(b_ready, 1'b1, "b ready after one clock")
      `CHECK_EQ(a_dout, model[i], "instruction port data")
      `CHECK_EQ(b_dout, model[j], "data port data")
      @(posedge clk); #1;
      `CHECK_EQ(a_ready, 1'b0, "a ready drops")
      `CHECK_EQ(a_dout, model[i], "a output holds")
    end
    // address wraps modulo the size
    a_rd = 1; a_addr = 18'(256 + 7); @(posedge clk); #1 a_rd = 0;
    `CHECK_EQ(a_dout, model[7], "address wraps")
    `TB_DONE
  end
endmodule

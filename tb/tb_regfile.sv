// tb_regfile: writes random values to the 16 accumulators and reads them back
// through all three read ports, against a copy kept in the testbench; also
// checks reset clears them.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_regfile;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] ac_addr, ix_addr, e_addr, waddr;
  word_t ac_data, ix_data, e_data, wdata;
  logic we;
  word_t model [16];

  regfile dut (.*);
  always #5 clk = !clk;

  initial begin repeat (10000) @(posedge clk); failures++; `TB_DONE end

  initial begin
    we = 0; waddr = 0; wdata = 0; ac_addr = 0; ix_addr = 0; e_addr = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 16; k++) begin
      model[k] = '0;
      ac_addr = 4'(k); #1;
      `CHECK_EQ(ac_data, 36'd0, "cleared by reset")
    end
    for (int n = 0; n < 200; n++) begin
      we = 1; waddr = 4'($urandom); wdata = {4'($urandom), 32'($urandom)};
      model[waddr] = wdata;
      @(posedge clk); #1 we = 0;
      ac_addr = waddr; ix_addr = 4'($urandom); e_addr = 4'($urandom); #1;
      `CHECK_EQ(ac_data, model[ac_addr], "AC port")
      `CHECK_EQ(ix_data, model[ix_addr], "index port")
      `CHECK_EQ(e_data,  model[e_addr], "E port")
    end
    `TB_DONE
  end
endmodule

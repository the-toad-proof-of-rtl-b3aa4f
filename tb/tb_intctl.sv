// tb_intctl: checks that the interrupt controller raises its output only for
// lines enabled in the mask, after the synchronizer delay, and that the mask
// and the lines read back on the control and data inputs.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_intctl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, irq_out;
  logic [15:0] irq_in, from_cpu_ctrl, to_cpu_ctrl, to_cpu_data;

  intctl #(.N_IO(16)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (1000) @(posedge clk); failures++; `TB_DONE end

  initial begin
    irq_in = 0; from_cpu_ctrl = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    irq_in = 16'h0010; from_cpu_ctrl = 16'h0001;
    repeat (4) @(posedge clk); #1;
    `CHECK_EQ(irq_out, 1'b0, "masked line ignored")
    `CHECK_EQ(to_cpu_data, 16'h0010, "lines read back")
    `CHECK_EQ(to_cpu_ctrl, 16'h0001, "mask reads back")
    from_cpu_ctrl = 16'h0011;
    @(posedge clk); #1;
    `CHECK_EQ(irq_out, 1'b1, "enabled line interrupts")
    irq_in = 16'h0000;
    @(posedge clk); #1;
    `CHECK_EQ(irq_out, 1'b1, "synchronizer delay")
    repeat (3) @(posedge clk); #1;
    `CHECK_EQ(irq_out, 1'b0, "drops after line drops")
    for (int n = 0; n < 50; n++) begin
      irq_in = 16'($urandom); from_cpu_ctrl = 16'($urandom);
      repeat (3) @(posedge clk); #1;
      `CHECK_EQ(irq_out, |(irq_in & from_cpu_ctrl), "random mask")
    end
    `TB_DONE
  end
endmodule

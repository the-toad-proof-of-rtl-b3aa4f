// intctl: interrupt controller, a peripheral on one uToad IO bus.
//
// Takes one interrupt line from each IO bus, passes them through a two-flop
// synchronizer, masks them with the mask register and raises `irq_out` (a
// register) while any unmasked line is high. The mask register is the bus's
// control output register, written with COUT; a CIN reads it back, and DIN
// reads the synchronized lines, so software can see which bus interrupts.
// The synchronizer and the read-back layout are this design's choice.
module intctl #(
  parameter int unsigned N_IO = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_IO-1:0] irq_in,
  input  logic [15:0]     from_cpu_ctrl,
  output logic [15:0]     to_cpu_ctrl,
  output logic [15:0]     to_cpu_data,
  output logic            irq_out
);
  logic [N_IO-1:0] s1, s2, mask;

  assign mask = N_IO'(from_cpu_ctrl);

  always_ff @(posedge clk) begin
    if (rst) begin
      s1      <= '0;
      s2      <= '0;
      irq_out <= 1'b0;
    end else begin
      s1      <= irq_in;
      s2      <= s1;
      irq_out <= |(s2 & mask);
    end
  end

  assign to_cpu_ctrl = from_cpu_ctrl;
  assign to_cpu_data = 16'(s2);
endmodule

// io_bus: the four registers of one uToad IO bus.
//
// Control In and Data In capture the peripheral's signals on every clock (the
// peripheral may be asynchronous; metastability is its side's concern). Control
// Out and Data Out are loaded by COUT and DOUT at the end of the Store/Fetch
// phase with the low CTRL_W / DATA_W bits of the value and hold it for the
// peripheral. All four clear on reset.
module io_bus
  import utoad_pkg::*;
#(
  parameter int unsigned CTRL_W = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CTRL_W-1:0] ctrl_pin_in,
  input  logic [DATA_W-1:0] data_pin_in,
  output logic [CTRL_W-1:0] ctrl_pin_out,
  output logic [DATA_W-1:0] data_pin_out,
  input  logic              ctrl_we,
  input  logic              data_we,
  input  word_t             wdata,
  output logic [CTRL_W-1:0] ctrl_q,
  output logic [DATA_W-1:0] data_q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_q       <= '0;
      data_q       <= '0;
      ctrl_pin_out <= '0;
      data_pin_out <= '0;
    end else begin
      ctrl_q <= ctrl_pin_in;
      data_q <= data_pin_in;
      if (ctrl_we) ctrl_pin_out <= wdata[CTRL_W-1:0];
      if (data_we) data_pin_out <= wdata[DATA_W-1:0];
    end
  end
endmodule

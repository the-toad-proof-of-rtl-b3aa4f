// uart_transmitter: 8N1 serial transmitter.
//
// A pulse on `start` while `ready` is high sends `din`: one start bit (low),
// eight data bits least significant first, one stop bit (high). One bit lasts
// FIRST_BAUD_DIVISOR * SECOND_BAUD_DIVISOR clocks: the first divisor makes an
// oversampling tick from the clock, the second counts ticks per bit (the
// receiver samples on the same ticks). `ready` is low from the clock after
// `start` until the stop bit has been sent. The line idles high. The frame
// format and the meaning of the two divisors are this design's choice.
module uart_transmitter #(
  parameter int unsigned FIRST_BAUD_DIVISOR  = 18,
  parameter int unsigned SECOND_BAUD_DIVISOR = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] din,
  output logic       ready,
  output logic       tx
);
  localparam int unsigned BIT_CLKS = FIRST_BAUD_DIVISOR * SECOND_BAUD_DIVISOR;
  localparam int unsigned CW = $clog2(BIT_CLKS + 1);

  logic [9:0]    shreg;
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = bits_left == 4'd0;
  assign tx    = ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (ready) begin
      if (start) begin
        shreg     <= {1'b1, din, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else if (cnt == CW'(BIT_CLKS - 1)) begin
      cnt       <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule

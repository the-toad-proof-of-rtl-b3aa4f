// uart: a serial port attached to one uToad IO bus.
//
// Bit assignments on the 16-bit ports (port bit k here is word bit 20+k of
// the 36-bit word a CIN/DIN returns; SV bit 15-k):
//   control out bit 4  (word bit 24)  TX write enable: a rising edge sends the
//                                     character in data out bits 8-15
//   control out bit 5  (word bit 25)  RX read: a rising edge drops one
//                                     character from the receive buffer
//   control in  bit 4, 5              read back the two bits above
//   control in  bit 6  (word bit 26)  TX ready
//   control in  bit 7  (word bit 27)  RX buffer not empty
//   control in  bits 8-15 (28-35)     character at the front of the buffer
//   data in     bits 8-15 (28-35)     the same character; other bits zero
// Rising-edge detectors on the two strobes make a pulse of any length act once.
// Received characters go into a RX_DEPTH-entry FIFO; a character that arrives
// while it is full is dropped, and a TX write while the transmitter is busy is
// ignored. The port layout, the edge detectors and the 16-byte buffer follow
// the document; the overflow handling is this design's.
module uart #(
  parameter int unsigned FIRST_BAUD_DIVISOR  = 18,
  parameter int unsigned SECOND_BAUD_DIVISOR = 16,
  parameter int unsigned RX_DEPTH            = 16
) (
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] to_cpu_ctrl,
  output logic [15:0] to_cpu_data,
  input  logic [15:0] from_cpu_ctrl,
  input  logic [15:0] from_cpu_data,
  output logic        tx,
  input  logic        rx
);
  localparam int unsigned AW = $clog2(RX_DEPTH);

  logic       txbufwe, rxread, txbufwe_q, rxread_q;
  logic       tx_start, rx_pop, txready;
  logic [7:0] rx_char, rxdata_out;
  logic       rx_valid;

  logic [7:0]  fifo [RX_DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          not_empty_buf, full;

  assign txbufwe = from_cpu_ctrl[11];   // port bit 4
  assign rxread  = from_cpu_ctrl[10];   // port bit 5

  always_ff @(posedge clk) begin
    if (rst) begin
      txbufwe_q <= 1'b0;
      rxread_q  <= 1'b0;
    end else begin
      txbufwe_q <= txbufwe;
      rxread_q  <= rxread;
    end
  end
  assign tx_start = txbufwe && !txbufwe_q;
  assign rx_pop   = rxread && !rxread_q && not_empty_buf;

  uart_transmitter #(
    .FIRST_BAUD_DIVISOR (FIRST_BAUD_DIVISOR),
    .SECOND_BAUD_DIVISOR(SECOND_BAUD_DIVISOR)
  ) u_tx (
    .clk, .rst, .start(tx_start), .din(from_cpu_data[7:0]), .ready(txready), .tx
  );

  uart_receiver #(
    .FIRST_BAUD_DIVISOR (FIRST_BAUD_DIVISOR),
    .SECOND_BAUD_DIVISOR(SECOND_BAUD_DIVISOR)
  ) u_rx (
    .clk, .rst, .rx, .dout(rx_char), .valid(rx_valid)
  );

  assign not_empty_buf = count != '0;
  assign full          = count == (AW+1)'(RX_DEPTH);
  assign rxdata_out    = not_empty_buf ? fifo[rd_ptr] : 8'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (rx_valid && !full) begin
        fifo[wr_ptr] <= rx_char;
        wr_ptr       <= wr_ptr + 1'b1;
      end
      if (rx_pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(rx_valid && !full) - (AW+1)'(rx_pop);
    end
  end

  assign to_cpu_ctrl = {4'b0000, txbufwe, rxread, txready, not_empty_buf, rxdata_out};
  assign to_cpu_data = {8'b0, rxdata_out};
endmodule

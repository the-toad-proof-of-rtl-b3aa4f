// uart_receiver: 8N1 serial receiver.
//
// The rx line passes a two-flop synchronizer. Every FIRST_BAUD_DIVISOR clocks
// an oversampling tick occurs; there are SECOND_BAUD_DIVISOR ticks per bit. A
// falling edge starts a frame; the start bit is checked at its middle, then the
// eight data bits (least significant first) and the stop bit are sampled one
// bit time apart. With a good stop bit the character appears on `dout` with a
// one-clock `valid` pulse; a frame with a low stop bit is dropped. The frame
// format and the divisors' meaning are this design's choice.
module uart_receiver #(
  parameter int unsigned FIRST_BAUD_DIVISOR  = 18,
  parameter int unsigned SECOND_BAUD_DIVISOR = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] dout,
  output logic       valid
);
  localparam int unsigned PW = $clog2(FIRST_BAUD_DIVISOR + 1);
  localparam int unsigned TW = $clog2(SECOND_BAUD_DIVISOR + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_e;

  rx_state_e     state;
  logic [1:0]    sync;
  logic [PW-1:0] pre;
  logic          tick;
  logic [TW-1:0] tcnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic          rxs;

  assign rxs  = sync[1];
  assign tick = pre == PW'(FIRST_BAUD_DIVISOR - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= 2'b11;
      pre   <= '0;
      state <= IDLE;
      tcnt  <= '0;
      bitn  <= '0;
      shreg <= '0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      pre   <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        unique case (state)
          IDLE: if (!rxs) begin
            state <= START;
            tcnt  <= '0;
          end
          START: if (tcnt == TW'(SECOND_BAUD_DIVISOR / 2 - 1)) begin
            tcnt  <= '0;
            state <= rxs ? IDLE : DATA;     // glitch: not a start bit
            bitn  <= '0;
          end else tcnt <= tcnt + 1'b1;
          DATA: if (tcnt == TW'(SECOND_BAUD_DIVISOR - 1)) begin
            tcnt  <= '0;
            shreg <= {rxs, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP;
          end else tcnt <= tcnt + 1'b1;
          STOP: if (tcnt == TW'(SECOND_BAUD_DIVISOR - 1)) begin
            tcnt  <= '0;
            state <= IDLE;
            if (rxs) begin
              dout  <= shreg;
              valid <= 1'b1;
            end
          end else tcnt <= tcnt + 1'b1;
        endcase
      end
    end
  end
endmodule

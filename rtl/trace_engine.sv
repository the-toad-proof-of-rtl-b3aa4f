// trace_engine: circular trace buffer that stops on an error.
//
// While running, every cycle with `capture` high writes {err, din} into the
// trace memory at the write counter and advances it, wrapping around. The
// first captured entry with `err` high is stored, marked, and then the write
// counter halts (the `stopped` register is the error detector's one-cycle
// delay), so the buffer holds the DEPTH entries leading up to and including
// the error. The read side runs on its own clock: a read counter that wraps
// around (advanced whenever `radv` is high) addresses the memory, and the word
// is registered on its way out as {err_out, dout}. Reading never disturbs the
// trace, so it can be read again and again. The structure (write counter, error
// detector, dual-port memory, read counter, output registers) follows the
// document; the exact error delay and the read-advance input are this design's.
module trace_engine #(
  parameter int unsigned W     = 36,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         capture,
  input  logic [W-1:0] din,
  input  logic         err,
  output logic         stopped,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         radv,
  output logic [W-1:0] dout,
  output logic         err_out
);
  localparam int unsigned AW = DEPTH > 1 ? $clog2(DEPTH) : 1;

  logic [W:0]    mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr    <= '0;
      stopped <= 1'b0;
    end else if (capture && !stopped) begin
      mem[wptr] <= {err, din};
      wptr      <= wptr == AW'(DEPTH - 1) ? '0 : wptr + 1'b1;
      stopped   <= err;
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rptr    <= '0;
      dout    <= '0;
      err_out <= 1'b0;
    end else begin
      {err_out, dout} <= mem[rptr];
      if (radv) rptr <= rptr == AW'(DEPTH - 1) ? '0 : rptr + 1'b1;
    end
  end
endmodule

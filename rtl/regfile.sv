// regfile: the sixteen 36-bit accumulators.
//
// Three asynchronous read ports and one synchronous write port. In the
// Decode/EAcalc phase the AC port reads the AC field and the index port the X
// field (for the effective address); in the Execute phase the E port reads the
// AC that E names when E is below 20 (octal), since memory locations 0-17 are
// the accumulators. One write per instruction, at the end of Store/Fetch.
// Reset clears all ACs; this is this design's own choice.
module regfile
  import utoad_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] ac_addr,
  output word_t      ac_data,
  input  logic [3:0] ix_addr,
  output word_t      ix_data,
  input  logic [3:0] e_addr,
  output word_t      e_data,
  input  logic       we,
  input  logic [3:0] waddr,
  input  word_t      wdata
);
  word_t r [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 16; k++) r[k] <= '0;
    end else if (we) begin
      r[waddr] <= wdata;
    end
  end

  assign ac_data = r[ac_addr];
  assign ix_data = r[ix_addr];
  assign e_data  = r[e_addr];
endmodule

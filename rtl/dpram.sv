// dpram: the dual-port memory shared by instruction fetch and data access.
//
// WORDS 36-bit words. Port A is the instruction port (read only), port B the
// data port (read and write). Both are synchronous: an address presented with
// the read strobe yields data on the next clock, flagged by the ready output,
// and the output holds until the next read. A write on port B happens at the
// clock edge. Addresses above WORDS-1 wrap (only the low address bits are
// used). The processor's separate ports could as well go to two memories.
module dpram
  import utoad_pkg::*;
#(
  parameter int unsigned WORDS = 32768
) (
  input  logic  clk,
  input  half_t a_addr,
  input  logic  a_rd,
  output word_t a_dout,
  output logic  a_ready,
  input  half_t b_addr,
  input  logic  b_rd,
  input  logic  b_we,
  input  word_t b_din,
  output word_t b_dout,
  output logic  b_ready
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    a_ready <= a_rd;
    if (a_rd) a_dout <= mem[a_addr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    b_ready <= b_rd;
    if (b_we) mem[b_addr[AW-1:0]] <= b_din;
    if (b_rd) b_dout <= mem[b_addr[AW-1:0]];
  end
endmodule

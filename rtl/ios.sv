// ios: functional unit for the uToad IO instructions, 770-775 (octal).
//
// The AC field is the IO bus number B. Each bus has a control and a data port;
// the inputs arrive here already captured in the bus input registers.
//   770 CIN    control input, right-justified and zero-filled -> C(E)
//   771 COUT   control output register <- E (always an immediate)
//   772 DIN    data input -> C(E)
//   773 DOUT   data output register <- C(E) (always a memory operand)
//   774 CINSZ  skip if (control input & E) is zero
//   775 CINSO  skip if (control input & E) is nonzero
// Output register writes leave as an io_wr_t request; the datapath applies it
// at the end of the Store/Fetch phase, together with the memory write. Ports
// narrower than the value keep its low bits. Combinational, Execute phase.
module ios
  import utoad_pkg::*;
#(
  parameter int unsigned N_IO      = 16,
  parameter int unsigned IO_CTRL_W = 16,
  parameter int unsigned IO_DATA_W = 16
) (
  input  fu_in_t                             fin,
  input  logic [N_IO-1:0][IO_CTRL_W-1:0]     ctrl_in,
  input  logic [N_IO-1:0][IO_DATA_W-1:0]     data_in,
  output fu_out_t                            fout,
  output io_wr_t                             io_wr
);
  logic  mine;
  word_t cin, din;
  logic  masked_zero;

  assign mine        = fin.ir.op[8:3] == 6'o77 && fin.ir.op[2:0] <= 3'd5;
  assign cin         = word_t'(ctrl_in[fin.ir.ac]);
  assign din         = word_t'(data_in[fin.ir.ac]);
  assign masked_zero = (cin[17:0] & fin.ea) == '0;

  always_comb begin
    fout  = FU_IDLE;
    io_wr = '0;
    io_wr.bus = fin.ir.ac;
    if (mine) begin
      unique case (fin.ir.op[2:0])
        3'd0: begin fout.writes_mem = 1'b1; fout.mem_result = cin; end
        3'd1: begin io_wr.ctrl_we = 1'b1; io_wr.value = {18'd0, fin.ea}; end
        3'd2: begin fout.writes_mem = 1'b1; fout.mem_result = din; end
        3'd3: begin io_wr.data_we = 1'b1; io_wr.value = fin.mem; end
        3'd4: fout.skip = masked_zero;
        default: fout.skip = !masked_zero;
      endcase
    end
  end
endmodule

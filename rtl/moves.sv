// moves: functional unit for the PDP-10 move class, opcodes 200-217 (octal).
//
// MOVE, MOVS (swap halves), MOVN (negate) and MOVM (magnitude), each in four
// modes selected by the low two opcode bits: basic C(E) -> AC, immediate
// 0,,E -> AC, memory AC -> E, and self C(E) -> E (and also -> AC when the AC
// field is nonzero). As in the document, the class runs without flags: no
// overflow or carry is recorded. Purely combinational; it is evaluated in the
// Execute phase and its outputs are registered by the datapath.
module moves
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  logic  mine;
  word_t src, res;

  assign mine = fin.ir.op[8:4] == 5'b01000;          // 200-217

  always_comb begin
    unique case (fin.ir.op[1:0])
      2'd1:    src = {18'd0, fin.ea};
      2'd2:    src = fin.ac;
      default: src = fin.mem;
    endcase
    unique case (fin.ir.op[3:2])
      2'd0: res = src;                                  // MOVE
      2'd1: res = swap(src);                            // MOVS
      2'd2: res = -src;                                 // MOVN
      default: res = src[35] ? -src : src;              // MOVM
    endcase
    fout = FU_IDLE;
    if (mine) begin
      fout.ac_result  = res;
      fout.mem_result = res;
      unique case (fin.ir.op[1:0])
        2'd0, 2'd1: fout.writes_ac = 1'b1;
        2'd2:       fout.writes_mem = 1'b1;
        default: begin
          fout.writes_mem = 1'b1;
          fout.writes_ac  = fin.ir.ac != 4'd0;
        end
      endcase
    end
  end
endmodule

// halfwords: functional unit for the halfword class, 500-577 (octal).
//
// Hxy[ZOE][ IMS]: one halfword of the source is moved into half y of the
// destination. In the low six opcode bits, bit 5 selects the destination half
// (0 left, 1 right), bit 2 takes the source from the other half, bits 4-3 say
// what happens to the other destination half (0 unchanged, 1 zeros, 2 ones,
// 3 copies of the moved half's sign bit), and bits 1-0 are the mode: basic
// C(E) -> AC, immediate 0,,E -> AC, memory AC -> E, self C(E) -> E (and to the
// AC when the AC field is nonzero). Combinational, Execute phase.
module halfwords
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  logic       to_right, from_other;
  logic [1:0] ext, mode;
  word_t      src, dst, res;
  half_t      h, other;

  assign to_right = fin.ir.op[5];
  assign from_other    = fin.ir.op[2];
  assign ext      = fin.ir.op[4:3];
  assign mode     = fin.ir.op[1:0];

  always_comb begin
    unique case (mode)
      2'd0:    begin src = fin.mem;            dst = fin.ac;  end
      2'd1:    begin src = {18'd0, fin.ea};    dst = fin.ac;  end
      2'd2:    begin src = fin.ac;             dst = fin.mem; end
      default: begin src = fin.mem;            dst = fin.mem; end
    endcase
    h = (to_right ^ from_other) ? rh(src) : lh(src);
    unique case (ext)
      2'd0:    other = to_right ? lh(dst) : rh(dst);
      2'd1:    other = '0;
      2'd2:    other = '1;
      default: other = {18{h[17]}};
    endcase
    res = to_right ? {other, h} : {h, other};

    fout = FU_IDLE;
    if (fin.ir.op[8:6] == 3'o5) begin
      fout.ac_result  = res;
      fout.mem_result = res;
      fout.writes_ac  = mode[1] ? (mode[0] && fin.ir.ac != 4'd0) : 1'b1;
      fout.writes_mem = mode[1];
    end
  end
endmodule

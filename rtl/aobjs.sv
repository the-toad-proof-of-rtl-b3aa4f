// aobjs: functional unit for AOBJP (252) and AOBJN (253).
//
// Adds one to each half of the AC and writes it back; AOBJP jumps to E when the
// new AC is non-negative, AOBJN when it is negative. The two halves are
// incremented independently (no carry from the right half into the left half),
// as on the KL10; this choice is this design's own. Combinational, Execute
// phase.
module aobjs
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  word_t nxt;
  assign nxt = {lh(fin.ac) + 18'd1, rh(fin.ac) + 18'd1};

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op == 9'o252 || fin.ir.op == 9'o253) begin
      fout.writes_ac = 1'b1;
      fout.ac_result = nxt;
      fout.jump      = fin.ir.op[0] ? nxt[35] : !nxt[35];
    end
  end
endmodule

// addsubs: functional unit for ADD (270-273) and SUB (274-277).
//
// AC + operand or AC - operand in 36-bit two's complement, with four modes in
// the low opcode bits: basic (C(E), result to AC), immediate (0,,E, to AC),
// memory (C(E), result to E) and both (to AC and E). No flags are kept, so
// overflow and carries are not recorded. Combinational, Execute phase.
module addsubs
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  word_t opnd, res;
  assign opnd = fin.ir.op[1:0] == 2'd1 ? {18'd0, fin.ea} : fin.mem;
  assign res  = fin.ir.op[2] ? fin.ac - opnd : fin.ac + opnd;

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op[8:3] == 6'o27) begin
      fout.ac_result  = res;
      fout.mem_result = res;
      fout.writes_ac  = fin.ir.op[1:0] != 2'd2;
      fout.writes_mem = fin.ir.op[1];
    end
  end
endmodule

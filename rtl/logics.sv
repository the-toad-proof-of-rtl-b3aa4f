// logics: functional unit for the Boolean class, 400-477 (octal).
//
// Opcode bits 3-6 (four bits f) are the truth table of the function of the AC
// bit a and the operand bit m: result = f[{~m,~a}], so 400 SETZ, 404 AND,
// 430 XOR, 434 IOR, 474 SETO and the other eleven fall out of one expression.
// The operand is C(E), or 0,,E in immediate mode. The low two bits are the mode:
// basic and immediate write the AC, memory writes E, both writes AC and E.
// Combinational, Execute phase.
module logics
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  logic [3:0] f;
  word_t      a, m, res;
  assign f = fin.ir.op[5:2];
  assign a = fin.ac;
  assign m = fin.ir.op[1:0] == 2'd1 ? {18'd0, fin.ea} : fin.mem;
  assign res = ({36{f[0]}} &  a &  m) | ({36{f[1]}} & ~a &  m)
             | ({36{f[2]}} &  a & ~m) | ({36{f[3]}} & ~a & ~m);

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op[8:6] == 3'o4) begin
      fout.ac_result  = res;
      fout.mem_result = res;
      fout.writes_ac  = fin.ir.op[1:0] != 2'd2;
      fout.writes_mem = fin.ir.op[1];
    end
  end
endmodule

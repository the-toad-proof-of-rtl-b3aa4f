// jrsts: functional unit for JRST (254 octal).
//
// JRST jumps to E. Only two forms exist: AC field 4 is HALT, which the illegal
// opcode and halt detector turns into a machine stop (this unit then requests
// nothing), and every other AC value behaves as plain JRST 0,E. Combinational,
// Execute phase.
module jrsts
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  always_comb begin
    fout = FU_IDLE;
    fout.jump = fin.ir.op == 9'o254 && fin.ir.ac != 4'd4;
  end
endmodule

// compares: functional unit for CAI (300-307) and CAM (310-317).
//
// Compares the AC, as a signed number, with 0,,E (CAI) or with C(E) (CAM) and
// requests a skip when the condition in the low three opcode bits holds
// (never, L, E, LE, always, GE, N, G). Nothing is written. Combinational,
// Execute phase.
module compares
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  word_t b;
  assign b = fin.ir.op[3] ? fin.mem : {18'd0, fin.ea};

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op[8:4] == 5'b01100)
      fout.skip = cond_true(fin.ir.op[2:0], fin.ac, b);
  end
endmodule

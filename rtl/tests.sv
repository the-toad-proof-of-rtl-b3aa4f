// tests: functional unit for the test class, 600-677 (octal).
//
// T[RLDS][NZCO][ EAN]: the AC is tested against a mask and the masked bits are
// then left alone (N), cleared (Z), complemented (C) or set (O). In the low six
// opcode bits, bits 5-4 are that modification, bit 3 takes the mask from memory
// (D, S) instead of E (R, L), bit 0 swaps the mask's halves (L, S), and bits 2-1
// are the skip condition on the AC before modification: never, all masked bits
// zero (E), always (A), some masked bit one (N). Only the AC is written.
// Combinational, Execute phase.
module tests
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  word_t mask, base;
  logic  zero;
  assign base = fin.ir.op[3] ? fin.mem : {18'd0, fin.ea};
  assign mask = fin.ir.op[0] ? swap(base) : base;
  assign zero = (fin.ac & mask) == '0;

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op[8:6] == 3'o6) begin
      unique case (fin.ir.op[2:1])
        2'd0: fout.skip = 1'b0;
        2'd1: fout.skip = zero;
        2'd2: fout.skip = 1'b1;
        default: fout.skip = !zero;
      endcase
      fout.writes_ac = fin.ir.op[5:4] != 2'd0;
      unique case (fin.ir.op[5:4])
        2'd1: fout.ac_result = fin.ac & ~mask;
        2'd2: fout.ac_result = fin.ac ^ mask;
        2'd3: fout.ac_result = fin.ac | mask;
        default: fout.ac_result = fin.ac;
      endcase
    end
  end
endmodule

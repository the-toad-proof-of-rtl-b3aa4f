// jsps: functional unit for JSP (265 octal), the subroutine call.
//
// Saves a PC word in the AC and jumps to E. The right half of the PC word is
// the address of the instruction after the JSP; the left half would hold the
// flags, and since this machine has none it is zero. Combinational, Execute
// phase.
module jsps
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op == 9'o265) begin
      fout.writes_ac = 1'b1;
      fout.ac_result = {18'd0, fin.pc + 18'd1};
      fout.jump      = 1'b1;
    end
  end
endmodule

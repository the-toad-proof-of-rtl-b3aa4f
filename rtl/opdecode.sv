// opdecode: the illegal opcode and halt detector.
//
// Looks at the instruction word in the Decode/EAcalc phase and raises:
//   illegal_opcode      the opcode is outside the supported set (200-217, 250,
//                       252-254, 265, 270-677, 770-775 octal)
//   uuo_detected        same condition: every illegal opcode is a UUO
//   illegal_indirection the indirect bit is set (indirect addressing is not
//                       implemented)
//   halt                JRST with AC field 4
// UUO trapping is disabled, so the datapath stops the machine on any of these.
// Purely combinational.
module opdecode
  import utoad_pkg::*;
(
  input  instr_t     ir,
  output dec_flags_t flags
);
  logic [8:0] op;
  logic       legal;
  assign op = ir.op;

  always_comb begin
    legal = (op >= 9'o200 && op <= 9'o217)
         || op == 9'o250 || op == 9'o252 || op == 9'o253 || op == 9'o254
         || op == 9'o265
         || (op >= 9'o270 && op <= 9'o677)
         || (op >= 9'o770 && op <= 9'o775);
    flags.illegal_opcode      = !legal;
    flags.uuo_detected        = !legal;
    flags.illegal_indirection = ir.i;
    flags.halt                = op == 9'o254 && ir.ac == 4'd4;
  end
endmodule

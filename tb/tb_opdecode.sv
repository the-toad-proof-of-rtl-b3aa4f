// tb_opdecode: checks the illegal opcode and halt detector over all 512
// opcodes against the supported list, plus the indirect bit and HALT.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_opdecode;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  instr_t     ir;
  dec_flags_t flags;
  int         nlegal;

  opdecode dut (.ir, .flags);

  function automatic bit supported(int op);
    if (op >= 'o200 && op <= 'o217) return 1;
    if (op inside {'o250, 'o252, 'o253, 'o254, 'o265}) return 1;
    if (op >= 'o270 && op <= 'o377) return 1;   // add/sub, compare/jump/skip
    if (op >= 'o400 && op <= 'o677) return 1;   // logic, halfword, test
    if (op >= 'o770 && op <= 'o775) return 1;
    return 0;
  endfunction

  initial begin #100000; failures++; `TB_DONE end

  initial begin
    nlegal = 0;
    for (int op = 0; op < 512; op++) begin
      ir = '{op: 9'(op), ac: 4'd1, i: 1'b0, x: 4'd0, y: 18'o100};
      #1;
      `CHECK_EQ(flags.illegal_opcode, !supported(op), $sformatf("illegal flag op %o", op))
      `CHECK_EQ(flags.uuo_detected, !supported(op), $sformatf("uuo flag op %o", op))
      if (!flags.illegal_opcode) nlegal++;
    end
    `CHECK_EQ(nlegal, 16 + 5 + 8 + 64 + 192 + 6, "number of legal opcodes")
    ir = '{op: 9'o200, ac: 4'd1, i: 1'b1, x: 4'd0, y: 18'o100}; #1;
    `CHECK_EQ(flags.illegal_indirection, 1'b1, "indirect bit")
    ir = '{op: 9'o254, ac: 4'd4, i: 1'b0, x: 4'd0, y: 18'o100}; #1;
    `CHECK_EQ(flags.halt, 1'b1, "JRST 4, halts")
    ir = '{op: 9'o254, ac: 4'd0, i: 1'b0, x: 4'd0, y: 18'o100}; #1;
    `CHECK_EQ(flags.halt, 1'b0, "JRST 0, does not halt")
    `CHECK_EQ(flags.illegal_indirection, 1'b0, "no indirect")
    `TB_DONE
  end
endmodule

// tb_logics: self-checking testbench for the logics functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_logics;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  logics dut (.fin, .fout);

  task automatic apply(logic [8:0] op, logic [3:0] acf, word_t acv, word_t memv, half_t ea,
                       half_t pc = 18'o1000);
    fin = '{ir: '{op: op, ac: acf, i: 1'b0, x: 4'd0, y: ea}, ac: acv, mem: memv, ea: ea, pc: pc};
    #1;
  endtask

  // expect: writes_ac, ac value, writes_mem, mem value, jump, skip
  task automatic expect_out(string what, logic wa, word_t av, logic wm, word_t mv, logic j, logic s);
    `CHECK_EQ(fout.writes_ac, wa, {what, " writes_ac"})
    if (wa) `CHECK_EQ(fout.ac_result, av, {what, " ac_result"})
    `CHECK_EQ(fout.writes_mem, wm, {what, " writes_mem"})
    if (wm) `CHECK_EQ(fout.mem_result, mv, {what, " mem_result"})
    `CHECK_EQ(fout.jump, j, {what, " jump"})
    `CHECK_EQ(fout.skip, s, {what, " skip"})
  endtask

  initial begin
    #100000;
    failures++;
    `TB_DONE
  end

  initial begin

    // AC = 0o707070707070, operand C(E) = 0o770077007700
    apply(9'o400, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETZ", 1,36'o0,0,0,0,0);
    apply(9'o404, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("AND", 1,36'o700070007000,0,0,0,0);
    apply(9'o410, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ANDCA", 1,36'o070007000700,0,0,0,0);
    apply(9'o414, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETM", 1,36'o770077007700,0,0,0,0);
    apply(9'o420, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ANDCM", 1,36'o007000700070,0,0,0,0);
    apply(9'o424, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETA", 1,36'o707070707070,0,0,0,0);
    apply(9'o430, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("XOR", 1,36'o077007700770,0,0,0,0);
    apply(9'o434, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("IOR", 1,36'o777077707770,0,0,0,0);
    apply(9'o440, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ANDCB", 1,36'o000700070007,0,0,0,0);
    apply(9'o444, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("EQV", 1,36'o700770077007,0,0,0,0);
    apply(9'o450, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETCA", 1,36'o070707070707,0,0,0,0);
    apply(9'o454, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ORCA", 1,36'o770777077707,0,0,0,0);
    apply(9'o460, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETCM", 1,36'o007700770077,0,0,0,0);
    apply(9'o464, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ORCM", 1,36'o707770777077,0,0,0,0);
    apply(9'o470, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("ORCB", 1,36'o077707770777,0,0,0,0);
    apply(9'o474, 4'd1, 36'o707070707070, 36'o770077007700, 18'o12); expect_out("SETO", 1,36'o777777777777,0,0,0,0);
    apply(9'o405, 4'd1, 36'o707070707070, 36'o770077007700, 18'o17); expect_out("ANDI", 1,36'o10,0,0,0,0);
    apply(9'o436, 4'd1, 36'o707070707070, 36'o770077007700, 18'o17); expect_out("IORM", 0,0,1,36'o777077707770,0,0);
    apply(9'o433, 4'd1, 36'o707070707070, 36'o770077007700, 18'o17); expect_out("XORB", 1,36'o077007700770,1,36'o077007700770,0,0);
    apply(9'o500, 4'd1, 36'o707070707070, 36'o770077007700, 18'o17); expect_out("HLL not mine", 0,0,0,0,0,0);
    `TB_DONE
  end
endmodule

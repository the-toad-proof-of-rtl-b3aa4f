// tb_moves: self-checking testbench for the moves functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_moves;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  moves dut (.fin, .fout);

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

    apply(9'o200, 4'd1, 36'o1, 36'o123456701234, 18'o100);
    expect_out("MOVE", 1, 36'o123456701234, 0, 0, 0, 0);
    apply(9'o201, 4'd1, 36'o1, 36'o5, 18'o777);
    expect_out("MOVEI", 1, 36'o777, 0, 0, 0, 0);
    apply(9'o202, 4'd1, 36'o5, 36'o7, 18'o100);
    expect_out("MOVEM", 0, 0, 1, 36'o5, 0, 0);
    apply(9'o203, 4'd0, 36'o5, 36'o7, 18'o100);
    expect_out("MOVES ac0", 0, 0, 1, 36'o7, 0, 0);
    apply(9'o203, 4'd3, 36'o5, 36'o7, 18'o100);
    expect_out("MOVES ac3", 1, 36'o7, 1, 36'o7, 0, 0);
    apply(9'o204, 4'd1, 36'o0, 36'o000001000002, 18'o100);
    expect_out("MOVS", 1, 36'o000002000001, 0, 0, 0, 0);
    apply(9'o205, 4'd1, 36'o0, 36'o0, 18'o1234);
    expect_out("MOVSI", 1, 36'o001234000000, 0, 0, 0, 0);
    apply(9'o210, 4'd1, 36'o0, 36'o5, 18'o100);
    expect_out("MOVN", 1, 36'o777777777773, 0, 0, 0, 0);
    apply(9'o211, 4'd1, 36'o0, 36'o5, 18'o1);
    expect_out("MOVNI", 1, 36'o777777777777, 0, 0, 0, 0);
    apply(9'o214, 4'd1, 36'o0, 36'o777777777771, 18'o100);
    expect_out("MOVM neg", 1, 36'o7, 0, 0, 0, 0);
    apply(9'o214, 4'd1, 36'o0, 36'o11, 18'o100);
    expect_out("MOVM pos", 1, 36'o11, 0, 0, 0, 0);
    apply(9'o216, 4'd1, 36'o777777777770, 36'o0, 18'o100);
    expect_out("MOVMM", 0, 0, 1, 36'o10, 0, 0);
    apply(9'o220, 4'd1, 36'o1, 36'o2, 18'o100);
    expect_out("not mine", 0, 0, 0, 0, 0, 0);
    `TB_DONE
  end
endmodule

// tb_halfwords: self-checking testbench for the halfwords functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_halfwords;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  halfwords dut (.fin, .fout);

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

    // AC = 111111,,222222   C(E) = 433333,,544444
    apply(9'o500, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLL",  1,36'o433333222222,0,0,0,0);
    apply(9'o540, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRR",  1,36'o111111544444,0,0,0,0);
    apply(9'o504, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRL",  1,36'o544444222222,0,0,0,0);
    apply(9'o544, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLR",  1,36'o111111433333,0,0,0,0);
    apply(9'o510, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLLZ", 1,36'o433333000000,0,0,0,0);
    apply(9'o554, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLRZ", 1,36'o000000433333,0,0,0,0);
    apply(9'o560, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRRO", 1,36'o777777544444,0,0,0,0);
    apply(9'o520, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLLO", 1,36'o433333777777,0,0,0,0);
    apply(9'o570, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRRE neg", 1,36'o777777544444,0,0,0,0);
    apply(9'o574, 4'd1, 36'o111111222222, 36'o033333544444, 18'o12); expect_out("HLRE pos", 1,36'o000000033333,0,0,0,0);
    apply(9'o534, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRLE neg", 1,36'o544444777777,0,0,0,0);
    apply(9'o505, 4'd1, 36'o111111222222, 36'o433333544444, 18'o1234); expect_out("HRLI", 1,36'o001234222222,0,0,0,0);
    apply(9'o551, 4'd1, 36'o111111222222, 36'o433333544444, 18'o1234); expect_out("HRRZI", 1,36'o000000001234,0,0,0,0);
    apply(9'o542, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRRM", 0,0,1,36'o433333222222,0,0);
    apply(9'o512, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLLZM", 0,0,1,36'o111111000000,0,0);
    apply(9'o513, 4'd0, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HLLZS ac0", 0,0,1,36'o433333000000,0,0);
    apply(9'o553, 4'd2, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("HRRZS ac2", 1,36'o000000544444,1,36'o000000544444,0,0);
    apply(9'o600, 4'd1, 36'o111111222222, 36'o433333544444, 18'o12); expect_out("TRN not mine", 0,0,0,0,0,0);
    `TB_DONE
  end
endmodule

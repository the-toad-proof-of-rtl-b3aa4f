// tb_tests: self-checking testbench for the tests functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_tests;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  tests dut (.fin, .fout);

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

    // AC = 000017,,000360
    apply(9'o602, 4'd1, 36'o000017000360, 36'o0, 18'o7);   expect_out("TRNE zero", 0,0,0,0,0,1);
    apply(9'o602, 4'd1, 36'o000017000360, 36'o0, 18'o20);  expect_out("TRNE set", 0,0,0,0,0,0);
    apply(9'o606, 4'd1, 36'o000017000360, 36'o0, 18'o20);  expect_out("TRNN", 0,0,0,0,0,1);
    apply(9'o603, 4'd1, 36'o000017000360, 36'o0, 18'o20);  expect_out("TLNE", 0,0,0,0,0,1);
    apply(9'o607, 4'd1, 36'o000017000360, 36'o0, 18'o1);   expect_out("TLNN", 0,0,0,0,0,1);
    apply(9'o604, 4'd1, 36'o000017000360, 36'o0, 18'o1);   expect_out("TRNA", 0,0,0,0,0,1);
    apply(9'o600, 4'd1, 36'o000017000360, 36'o0, 18'o1);   expect_out("TRN", 0,0,0,0,0,0);
    apply(9'o620, 4'd1, 36'o000017000360, 36'o0, 18'o60);  expect_out("TRZ", 1,36'o000017000300,0,0,0,0);
    apply(9'o626, 4'd1, 36'o000017000360, 36'o0, 18'o60);  expect_out("TRZN", 1,36'o000017000300,0,0,0,1);
    apply(9'o641, 4'd1, 36'o000017000360, 36'o0, 18'o3);   expect_out("TLC", 1,36'o000014000360,0,0,0,0);
    apply(9'o662, 4'd1, 36'o000017000360, 36'o0, 18'o1);   expect_out("TROE", 1,36'o000017000361,0,0,0,1);
    apply(9'o610, 4'd1, 36'o000017000360, 36'o000001000000, 18'o0); expect_out("TDN", 0,0,0,0,0,0);
    apply(9'o616, 4'd1, 36'o000017000360, 36'o000001000000, 18'o0); expect_out("TDNN", 0,0,0,0,0,1);
    apply(9'o613, 4'd1, 36'o000017000360, 36'o000001000000, 18'o0); expect_out("TSNE", 0,0,0,0,0,1);
    apply(9'o671, 4'd1, 36'o000017000360, 36'o000001000000, 18'o0); expect_out("TSO", 1,36'o000017000361,0,0,0,0);
    apply(9'o650, 4'd1, 36'o000017000360, 36'o777777777777, 18'o0); expect_out("TDC", 1,36'o777760777417,0,0,0,0);
    apply(9'o700, 4'd1, 36'o000017000360, 36'o0, 18'o1);   expect_out("700 not mine", 0,0,0,0,0,0);
    `TB_DONE
  end
endmodule

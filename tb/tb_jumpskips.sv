// tb_jumpskips: self-checking testbench for the jumpskips functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_jumpskips;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  jumpskips dut (.fin, .fout);

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

    apply(9'o322, 4'd1, 36'o0, 36'o5, 18'o400); expect_out("JUMPE 0", 0,0,0,0,1,0);
    apply(9'o322, 4'd1, 36'o3, 36'o5, 18'o400); expect_out("JUMPE 3", 0,0,0,0,0,0);
    apply(9'o321, 4'd1, 36'o400000000000, 36'o5, 18'o400); expect_out("JUMPL neg", 0,0,0,0,1,0);
    apply(9'o327, 4'd1, 36'o1, 36'o5, 18'o400); expect_out("JUMPG", 0,0,0,0,1,0);
    apply(9'o332, 4'd0, 36'o1, 36'o0, 18'o400); expect_out("SKIPE ac0", 0,0,0,0,0,1);
    apply(9'o336, 4'd2, 36'o1, 36'o7, 18'o400); expect_out("SKIPN ac2", 1,36'o7,0,0,0,1);
    apply(9'o330, 4'd2, 36'o1, 36'o7, 18'o400); expect_out("SKIP ac2", 1,36'o7,0,0,0,0);
    apply(9'o342, 4'd2, 36'o777777777777, 36'o7, 18'o400); expect_out("AOJE", 1,36'o0,0,0,1,0);
    apply(9'o341, 4'd2, 36'o777777777777, 36'o7, 18'o400); expect_out("AOJL", 1,36'o0,0,0,0,0);
    apply(9'o356, 4'd0, 36'o5, 36'o7, 18'o400); expect_out("AOSN ac0", 0,0,1,36'o10,0,1);
    apply(9'o352, 4'd3, 36'o5, 36'o7, 18'o400); expect_out("AOSE ac3", 1,36'o10,1,36'o10,0,0);
    apply(9'o366, 4'd3, 36'o1, 36'o7, 18'o400); expect_out("SOJN", 1,36'o0,0,0,0,0);
    apply(9'o365, 4'd3, 36'o1, 36'o7, 18'o400); expect_out("SOJGE", 1,36'o0,0,0,1,0);
    apply(9'o371, 4'd0, 36'o1, 36'o0, 18'o400); expect_out("SOSL", 0,0,1,36'o777777777777,0,1);
    apply(9'o374, 4'd5, 36'o1, 36'o0, 18'o400); expect_out("SOSA ac5", 1,36'o777777777777,1,36'o777777777777,0,1);
    apply(9'o312, 4'd1, 36'o0, 36'o0, 18'o400); expect_out("CAME not mine", 0,0,0,0,0,0);
    apply(9'o400, 4'd1, 36'o0, 36'o0, 18'o400); expect_out("SETZ not mine", 0,0,0,0,0,0);
    `TB_DONE
  end
endmodule

// tb_exchs: self-checking testbench for the exchs functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_exchs;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  exchs dut (.fin, .fout);

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

    apply(9'o250, 4'd2, 36'o111, 36'o222, 18'o100);
    expect_out("EXCH", 1, 36'o222, 1, 36'o111, 0, 0);
    apply(9'o251, 4'd2, 36'o111, 36'o222, 18'o100);
    expect_out("251", 0, 0, 0, 0, 0, 0);
    `TB_DONE
  end
endmodule

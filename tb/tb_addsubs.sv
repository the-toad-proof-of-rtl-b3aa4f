// tb_addsubs: self-checking testbench for the addsubs functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_addsubs;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  addsubs dut (.fin, .fout);

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

    apply(9'o270, 4'd1, 36'o5, 36'o7, 18'o100);
    expect_out("ADD", 1, 36'o14, 0, 0, 0, 0);
    apply(9'o271, 4'd1, 36'o5, 36'o7, 18'o3);
    expect_out("ADDI", 1, 36'o10, 0, 0, 0, 0);
    apply(9'o272, 4'd1, 36'o777777777777, 36'o2, 18'o100);
    expect_out("ADDM", 0, 0, 1, 36'o1, 0, 0);
    apply(9'o273, 4'd1, 36'o377777777777, 36'o1, 18'o100);
    expect_out("ADDB overflow wraps", 1, 36'o400000000000, 1, 36'o400000000000, 0, 0);
    apply(9'o274, 4'd1, 36'o5, 36'o7, 18'o100);
    expect_out("SUB", 1, 36'o777777777776, 0, 0, 0, 0);
    apply(9'o275, 4'd1, 36'o5, 36'o7, 18'o1);
    expect_out("SUBI", 1, 36'o4, 0, 0, 0, 0);
    apply(9'o276, 4'd1, 36'o20, 36'o7, 18'o1);
    expect_out("SUBM", 0, 0, 1, 36'o11, 0, 0);
    apply(9'o277, 4'd1, 36'o20, 36'o7, 18'o1);
    expect_out("SUBB", 1, 36'o11, 1, 36'o11, 0, 0);
    apply(9'o267, 4'd1, 36'o20, 36'o7, 18'o1);
    expect_out("267", 0, 0, 0, 0, 0, 0);
    `TB_DONE
  end
endmodule

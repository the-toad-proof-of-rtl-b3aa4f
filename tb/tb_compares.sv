// tb_compares: self-checking testbench for the compares functional unit. Each case
// applies one instruction with chosen operands and compares the unit's
// requests with values worked out by hand from the PDP-10 definitions.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_compares;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;

  compares dut (.fin, .fout);

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

    // CAI against E, AC = 5 (E = 5, 4, 6)
    apply(9'o300, 4'd1, 36'o5, 36'o0, 18'o5); expect_out("CAI", 0,0,0,0,0,0);
    apply(9'o301, 4'd1, 36'o5, 36'o0, 18'o6); expect_out("CAIL 5<6", 0,0,0,0,0,1);
    apply(9'o301, 4'd1, 36'o5, 36'o0, 18'o5); expect_out("CAIL 5<5", 0,0,0,0,0,0);
    apply(9'o302, 4'd1, 36'o5, 36'o0, 18'o5); expect_out("CAIE", 0,0,0,0,0,1);
    apply(9'o303, 4'd1, 36'o5, 36'o0, 18'o4); expect_out("CAILE 5<=4", 0,0,0,0,0,0);
    apply(9'o304, 4'd1, 36'o5, 36'o0, 18'o4); expect_out("CAIA", 0,0,0,0,0,1);
    apply(9'o305, 4'd1, 36'o5, 36'o0, 18'o5); expect_out("CAIGE", 0,0,0,0,0,1);
    apply(9'o306, 4'd1, 36'o5, 36'o0, 18'o5); expect_out("CAIN", 0,0,0,0,0,0);
    apply(9'o307, 4'd1, 36'o5, 36'o0, 18'o4); expect_out("CAIG", 0,0,0,0,0,1);
    // CAM: signed compare with memory, AC = -1
    apply(9'o311, 4'd1, 36'o777777777777, 36'o1, 18'o100); expect_out("CAML -1<1", 0,0,0,0,0,1);
    apply(9'o317, 4'd1, 36'o777777777777, 36'o1, 18'o100); expect_out("CAMG -1>1", 0,0,0,0,0,0);
    apply(9'o312, 4'd1, 36'o123, 36'o123, 18'o100); expect_out("CAME", 0,0,0,0,0,1);
    apply(9'o316, 4'd1, 36'o123, 36'o124, 18'o100); expect_out("CAMN", 0,0,0,0,0,1);
    apply(9'o321, 4'd1, 36'o777777777777, 36'o1, 18'o100); expect_out("JUMPL not mine", 0,0,0,0,0,0);
    `TB_DONE
  end
endmodule

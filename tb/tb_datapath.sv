// tb_datapath: runs programs on the processor against a behavioural memory
// with a configurable read latency, and checks the results worked out by hand.
//
// Program A (41 instructions, starting at 40 octal) uses moves, add with E in
// an AC, indexed addressing, CAIE skip, JSP call and indexed JRST return,
// an AOBJN loop around AOS, COUT/CIN/CINSO/CINSZ/DOUT/DIN on the looped-back
// IO bus 0, SETO/TRZ/EXCH, a SOJG loop, SKIPE, HLRZ, XOR, a MOVEM into an AC,
// and ends with HALT. It runs with one-clock memory (3 clocks per instruction)
// and with three-clock memory (wait states, 7 clocks per instruction). Three
// short programs then stop on an illegal opcode, a set indirect bit and an
// EXCH whose E is an AC (two register writes). After program A the trace
// buffers are read out and their error-marked entries checked.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_datapath;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  int latency = 1;

  half_t instruction_address, data_address, error_address_out;
  word_t instruction_in, data_in, data_out, debug_data_out;
  logic  instruction_read, instruction_ready, data_read, data_write, data_ready;
  logic  error_out, halt_out, debug_error_out;
  logic [8:0] error_opcode_out;
  logic [2:0] debug_cycle_out, cycle_out;
  logic [15:0][15:0] io_ctrl_in, io_data_in, io_ctrl_out, io_data_out;

  word_t mem [1024];

  datapath dut (
    .clk, .reset,
    .instruction_address, .instruction_in, .instruction_read, .instruction_ready,
    .data_address, .data_in, .data_read, .data_out, .data_write, .data_ready,
    .console_interrupt_in(1'b0), .io_interrupt_in(1'b0),
    .io_ctrl_in, .io_data_in, .io_ctrl_out, .io_data_out,
    .error_opcode_out, .error_address_out, .error_out, .halt_out,
    .debug_clk(clk), .debug_data_out, .debug_error_out, .debug_cycle_out, .cycle_out
  );

  always #5 clk = !clk;

  // IO bus 0 looped back, other buses fixed patterns
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      io_ctrl_in[b] = 16'(16'h100 * b);
      io_data_in[b] = 16'(16'h200 * b);
    end
    io_ctrl_in[0] = io_ctrl_out[0];
    io_data_in[0] = io_data_out[0];
  end

  // behavioural memory: read data and ready appear `latency` clocks after the
  // read strobe, and the data stays until the next read
  half_t ia, da;
  int    icnt, dcnt;
  always_ff @(posedge clk) begin
    instruction_ready <= 1'b0;
    data_ready        <= 1'b0;
    if (data_write) mem[data_address[9:0]] <= data_out;
    if (reset) begin
      icnt <= 0;
      dcnt <= 0;
    end else begin
      if (instruction_read) begin
        ia <= instruction_address;
        if (latency == 1) begin
          instruction_ready <= 1'b1;
          instruction_in    <= mem[instruction_address[9:0]];
        end else icnt <= latency - 1;
      end else if (icnt != 0) begin
        icnt <= icnt - 1;
        if (icnt == 1) begin
          instruction_ready <= 1'b1;
          instruction_in    <= mem[ia[9:0]];
        end
      end
      if (data_read) begin
        da <= data_address;
        if (latency == 1) begin
          data_ready <= 1'b1;
          data_in    <= mem[data_address[9:0]];
        end else dcnt <= latency - 1;
      end else if (dcnt != 0) begin
        dcnt <= dcnt - 1;
        if (dcnt == 1) begin
          data_ready <= 1'b1;
          data_in    <= mem[da[9:0]];
        end
      end
    end
  end

  function automatic word_t ins(logic [8:0] op, logic [3:0] ac, half_t y, logic [3:0] x = 0,
                                logic i = 0);
    return {op, ac, i, x, y};
  endfunction

  // mechanism counters
  int n_instr, n_skip, n_jump, n_ea_in_ac, n_indexed, n_wait_d, n_wait_e, n_io_write;
  int cyc, last_d, per_instr_bad;
  logic [2:0] cyc_q;
  always @(posedge clk) if (!reset) begin
    cyc++;
    cyc_q <= cycle_out;
    if (cycle_out == 3'b001 && cyc_q != 3'b001) begin
      n_instr++;
      if (last_d >= 0 && cyc - last_d != 3 + 2 * (latency - 1)) per_instr_bad++;
      last_d = cyc;
    end
    if (cycle_out == 3'b001 && !instruction_ready) n_wait_d++;
    if (cycle_out == 3'b010 && !data_ready) n_wait_e++;
    if (cycle_out == 3'b100 && dut.valid_s && !dut.stop_s) begin
      if (dut.skip_s) n_skip++;
      if (dut.jump_s) n_jump++;
      if (dut.ea_in_ac_s) n_ea_in_ac++;
      if (dut.iow_s.ctrl_we || dut.iow_s.data_we) n_io_write++;
    end
    if (cycle_out == 3'b001 && instruction_ready && instruction_in[21:18] != 0) n_indexed++;
  end

  task automatic run_until_stop(int max_cycles);
    reset = 1; cyc = 0; last_d = -1; per_instr_bad = 0; n_instr = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int k = 0; k < max_cycles && !(error_out || halt_out); k++) @(posedge clk);
    #1;
  endtask

  task automatic load_program_a();
    for (int k = 0; k < 1024; k++) mem[k] = '0;
    mem['o40]  = ins(9'o201, 1, 'o5);          // MOVEI 1,5
    mem['o41]  = ins(9'o201, 2, 'o7);          // MOVEI 2,7
    mem['o42]  = ins(9'o270, 1, 'o2);          // ADD 1,2      (E is AC 2)
    mem['o43]  = ins(9'o202, 1, 'o200);        // MOVEM 1,200
    mem['o44]  = ins(9'o200, 3, 'o200);        // MOVE 3,200
    mem['o45]  = ins(9'o205, 4, 'o1);          // MOVSI 4,1
    mem['o46]  = ins(9'o541, 4, 'o3);          // HRRI 4,3
    mem['o47]  = ins(9'o270, 3, 'o400, 4);     // ADD 3,400(4)
    mem['o50]  = ins(9'o302, 3, 'o1014);       // CAIE 3,1014
    mem['o51]  = ins(9'o254, 4, 'o0);          // HALT (skipped)
    mem['o52]  = ins(9'o265, 5, 'o300);        // JSP 5,300
    mem['o53]  = ins(9'o202, 6, 'o201);        // MOVEM 6,201
    mem['o54]  = ins(9'o205, 7, 'o777775);     // MOVSI 7,-3
    mem['o55]  = ins(9'o350, 0, 'o210);        // AOS 210
    mem['o56]  = ins(9'o253, 7, 'o55);         // AOBJN 7,55
    mem['o57]  = ins(9'o771, 0, 'o1234);       // COUT 0,1234
    mem['o60]  = ins(9'o770, 0, 'o202);        // CIN 0,202
    mem['o61]  = ins(9'o775, 0, 'o4);          // CINSO 0,4
    mem['o62]  = ins(9'o254, 4, 'o0);          // HALT (skipped)
    mem['o63]  = ins(9'o774, 0, 'o1);          // CINSZ 0,1
    mem['o64]  = ins(9'o254, 4, 'o0);          // HALT (skipped)
    mem['o65]  = ins(9'o773, 0, 'o200);        // DOUT 0,200
    mem['o66]  = ins(9'o772, 0, 'o203);        // DIN 0,203
    mem['o67]  = ins(9'o474, 8, 'o0);          // SETO 10,
    mem['o70]  = ins(9'o620, 8, 'o17);         // TRZ 10,17
    mem['o71]  = ins(9'o250, 8, 'o204);        // EXCH 10,204
    mem['o72]  = ins(9'o201, 9, 'o3);          // MOVEI 11,3
    mem['o73]  = ins(9'o367, 9, 'o73);         // SOJG 11,.
    mem['o74]  = ins(9'o332, 10, 'o205);       // SKIPE 12,205
    mem['o75]  = ins(9'o254, 4, 'o0);          // HALT (skipped)
    mem['o76]  = ins(9'o554, 11, 'o206);       // HLRZ 13,206
    mem['o77]  = ins(9'o254, 0, 'o101);        // JRST 101
    mem['o100] = ins(9'o254, 4, 'o0);          // HALT (jumped over)
    mem['o101] = ins(9'o430, 11, 'o206);       // XOR 13,206
    mem['o102] = ins(9'o202, 11, 'o207);       // MOVEM 13,207
    mem['o103] = ins(9'o202, 2, 'o5);          // MOVEM 2,5    (E is AC 5)
    mem['o104] = ins(9'o202, 5, 'o211);        // MOVEM 5,211
    mem['o105] = ins(9'o254, 4, 'o0);          // HALT
    mem['o300] = ins(9'o201, 6, 'o42);         // MOVEI 6,42
    mem['o301] = ins(9'o254, 0, 'o0, 5);       // JRST (5)
    mem['o403] = 36'o1000;
    mem['o204] = 36'o55;
    mem['o206] = 36'o123456654321;
  endtask

  task automatic check_program_a(string tag);
    `CHECK_EQ(halt_out, 1'b1, {tag, " halted"})
    `CHECK_EQ(error_out, 1'b0, {tag, " no error"})
    `CHECK_EQ(error_address_out, 18'o105, {tag, " halt address"})
    `CHECK_EQ(error_opcode_out, 9'o254, {tag, " halt opcode"})
    `CHECK_EQ(n_instr, 41, {tag, " instructions executed"})
    `CHECK_EQ(per_instr_bad, 0, {tag, " clocks per instruction"})
    `CHECK_EQ(mem['o200], 36'o14, {tag, " mem 200"})
    `CHECK_EQ(mem['o201], 36'o42, {tag, " mem 201 (JSP subroutine)"})
    `CHECK_EQ(mem['o202], 36'o1234, {tag, " mem 202 (CIN loopback)"})
    `CHECK_EQ(mem['o203], 36'o14, {tag, " mem 203 (DIN loopback)"})
    `CHECK_EQ(mem['o204], 36'o777777777760, {tag, " mem 204 (EXCH)"})
    `CHECK_EQ(mem['o207], 36'o123456777777, {tag, " mem 207 (XOR)"})
    `CHECK_EQ(mem['o210], 36'o3, {tag, " mem 210 (AOBJN loop)"})
    `CHECK_EQ(mem['o211], 36'o7, {tag, " mem 211 (MOVEM to AC)"})
    `CHECK_EQ(dut.u_rf.r[1], 36'o14, {tag, " AC1"})
    `CHECK_EQ(dut.u_rf.r[3], 36'o1014, {tag, " AC3 (indexed)"})
    `CHECK_EQ(dut.u_rf.r[4], 36'o000001000003, {tag, " AC4"})
    `CHECK_EQ(dut.u_rf.r[7], 36'o000000000003, {tag, " AC7"})
    `CHECK_EQ(dut.u_rf.r[8], 36'o55, {tag, " AC10"})
    `CHECK_EQ(dut.u_rf.r[9], 36'o0, {tag, " AC11"})
    `CHECK_EQ(dut.u_rf.r[11], 36'o123456777777, {tag, " AC13"})
    `CHECK_EQ(io_ctrl_out[0], 16'(18'o1234), {tag, " bus 0 control out"})
    `CHECK_EQ(io_data_out[0], 16'o14, {tag, " bus 0 data out"})
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    `TB_DONE
  end

  initial begin
    n_skip = 0; n_jump = 0; n_ea_in_ac = 0; n_indexed = 0; n_wait_d = 0; n_wait_e = 0;
    n_io_write = 0; cyc = 0;
    // ---- program A, single-clock memory
    latency = 1;
    load_program_a();
    run_until_stop(1000);
    check_program_a("A/latency 1");
    `CHECK_EQ(cyc, 2 + 41 * 3, "A/latency 1 total clocks")
    // trace read-out: find the error-marked entry of each buffer
    begin
      word_t dtr [$];
      word_t etr [$];
      word_t str [$];
      int dmark, emark, smark;
      logic dbit [$];
      dmark = -1; emark = -1; smark = -1;
      for (int k = 0; k < 3 * 40; k++) begin
        @(posedge clk); #1;
        unique case (debug_cycle_out)
          3'b001: begin if (debug_error_out && dmark < 0) dmark = dtr.size(); dtr.push_back(debug_data_out); end
          3'b010: begin if (debug_error_out && emark < 0) emark = etr.size(); etr.push_back(debug_data_out); end
          default: begin if (debug_error_out && smark < 0) smark = str.size(); str.push_back(debug_data_out); end
        endcase
      end
      `CHECK(dmark > 0 && emark >= 0 && smark >= 0, "trace error marks found")
      if (dmark > 0) begin
        `CHECK_EQ(dtr[dmark], 36'o000105000000, "decode trace: PC,,E of HALT")
        `CHECK_EQ(dtr[dmark - 1], 36'o000104000211, "decode trace: previous instruction")
      end
      if (emark >= 0) `CHECK_EQ(etr[emark][35-8], 1'b1, "execute trace: halt bit 8")
      if (emark > 0) `CHECK_EQ(etr[emark - 1][35-29], 1'b1, "execute trace: MOVEM writes memory bit 29")
    end
    // ---- program A again with three-clock memory: wait states
    latency = 3;
    load_program_a();
    run_until_stop(2000);
    check_program_a("A/latency 3");
    `CHECK_EQ(cyc, 2 + 41 * 7, "A/latency 3 total clocks")
    latency = 1;
    // ---- illegal opcode
    for (int k = 0; k < 1024; k++) mem[k] = '0;
    mem['o40] = ins(9'o201, 1, 'o1);
    mem['o41] = ins(9'o100, 2, 'o3);            // UUO 100
    mem['o42] = ins(9'o201, 1, 'o2);
    run_until_stop(200);
    `CHECK_EQ(error_out, 1'b1, "illegal opcode stops")
    `CHECK_EQ(halt_out, 1'b0, "illegal opcode is not a halt")
    `CHECK_EQ(error_opcode_out, 9'o100, "illegal opcode reported")
    `CHECK_EQ(error_address_out, 18'o41, "illegal opcode address")
    `CHECK_EQ(dut.u_rf.r[1], 36'o1, "nothing after the illegal opcode")
    // ---- indirect bit
    mem['o41] = ins(9'o200, 2, 'o3, 0, 1);      // MOVE 2,@3
    run_until_stop(200);
    `CHECK_EQ(error_out, 1'b1, "indirection stops")
    `CHECK_EQ(error_address_out, 18'o41, "indirection address")
    `CHECK_EQ(dut.u_rf.r[2], 36'o0, "indirect MOVE has no effect")
    // ---- dual register write
    mem['o41] = ins(9'o201, 2, 'o6);            // MOVEI 2,6
    mem['o42] = ins(9'o250, 1, 'o2);            // EXCH 1,2
    run_until_stop(200);
    `CHECK_EQ(error_out, 1'b1, "dual register write stops")
    `CHECK_EQ(error_address_out, 18'o42, "dual write address")
    `CHECK_EQ(dut.u_rf.r[1], 36'o1, "dual write: AC1 unchanged")
    `CHECK_EQ(dut.u_rf.r[2], 36'o6, "dual write: AC2 unchanged")
    // ---- mechanisms
    $display("skips=%0d jumps=%0d ea_in_ac=%0d indexed=%0d waitD=%0d waitE=%0d io_writes=%0d",
             n_skip, n_jump, n_ea_in_ac, n_indexed, n_wait_d, n_wait_e, n_io_write);
    `CHECK(n_skip > 0, "skip happened")
    `CHECK(n_jump > 0, "jump happened")
    `CHECK(n_ea_in_ac > 0, "E in AC happened")
    `CHECK(n_indexed > 0, "indexing happened")
    `CHECK(n_wait_d > 0, "instruction wait happened")
    `CHECK(n_wait_e > 0, "data wait happened")
    `CHECK(n_io_write > 0, "IO write happened")
    `TB_DONE
  end
endmodule

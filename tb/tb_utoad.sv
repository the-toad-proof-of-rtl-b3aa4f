// tb_utoad: end-to-end test of the whole system at its default parameters
// (32K-word memory, start at 40 octal, 288 clocks per serial bit).
//
// The program polls UART A until it may transmit, sends "X", polls until a
// character arrives, stores it, removes it from the receive buffer, echoes it
// on UART B, enables bus 4 in the interrupt controller's mask and polls the
// controller's line register until bus 4 interrupts, loops a value through
// IO bus 0, and halts. The testbench plays the serial terminals and the
// interrupting peripheral, then checks the characters on both tx lines, the
// memory words the program stored, irq_out, the halt, the three-clock
// instruction cycle, and that each mechanism (both polling loops, the bus 0
// loopback, the interrupt, the halt) happened.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_utoad;
  import utoad_pkg::*;
  localparam int BIT = 18 * 16;
  int checks = 0, failures = 0;
  logic clk = 0, reset_in = 1;
  logic console_a_rx = 1, console_a_tx, console_b_rx = 1, console_b_tx;
  logic [15:0][15:0] io_ctrl_in, io_data_in, io_ctrl_out, io_data_out;
  logic [15:0] io_irq_in;
  logic irq_out, error_out, halt_out, debug_error_out;
  logic [8:0] error_opcode_out;
  half_t error_address_out;
  word_t debug_data_out;
  logic [2:0] debug_cycle_out, cycle_out;

  utoad dut (.*);

  always #5 clk = !clk;

  function automatic word_t ins(logic [8:0] op, logic [3:0] ac, half_t y);
    return {op, ac, 1'b0, 4'd0, y};
  endfunction

  task automatic serial_send(ref logic line, input logic [7:0] c);
    logic [9:0] frame = {1'b1, c, 1'b0};
    for (int b = 0; b < 10; b++) begin line = frame[b]; repeat (BIT) @(posedge clk); end
    line = 1'b1;
  endtask

  task automatic serial_get(ref logic line, output logic [7:0] c);
    while (line) @(posedge clk);
    repeat (BIT / 2) @(posedge clk);
    for (int b = 0; b < 8; b++) begin repeat (BIT) @(posedge clk); c[b] = line; end
    repeat (BIT) @(posedge clk);
  endtask

  // mechanism counters and the instruction-cycle check
  int n_instr, n_tx_poll, n_rx_poll, n_irq_poll, cyc, last_d, bad_cycle;
  logic [2:0] cyc_q;
  always @(posedge clk) if (!dut.datapath_reset) begin
    cyc++;
    cyc_q <= cycle_out;
    if (cycle_out == 3'b001 && cyc_q != 3'b001) begin
      n_instr++;
      if (last_d >= 0 && cyc - last_d != 3) bad_cycle++;
      last_d = cyc;
      if (dut.the_datapath.pc == 18'o41) n_tx_poll++;
      if (dut.the_datapath.pc == 18'o46) n_rx_poll++;
      if (dut.the_datapath.pc == 18'o64) n_irq_poll++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    `TB_DONE
  end

  logic [7:0] got_a, got_b;
  logic       irq_seen;

  initial begin
    n_instr = 0; n_tx_poll = 0; n_rx_poll = 0; n_irq_poll = 0; cyc = 0; last_d = -1;
    bad_cycle = 0; irq_seen = 0;
    io_ctrl_in = '0; io_data_in = '0; io_irq_in = '0;
    for (int k = 0; k < 'o2000; k++) dut.the_memory.mem[k] = '0;
    dut.the_memory.mem['o40] = ins(9'o775, 1, 'o1000);   // UART A: skip when TX ready
    dut.the_memory.mem['o41] = ins(9'o254, 0, 'o40);     // back to the poll
    dut.the_memory.mem['o42] = ins(9'o773, 1, 'o100);    // data out <- the character at 100
    dut.the_memory.mem['o43] = ins(9'o771, 1, 'o4000);   // raise TX write enable
    dut.the_memory.mem['o44] = ins(9'o771, 1, 'o0);      // and drop it
    dut.the_memory.mem['o45] = ins(9'o775, 1, 'o400);    // UART A: skip when a character waits
    dut.the_memory.mem['o46] = ins(9'o254, 0, 'o45);     // back to the poll
    dut.the_memory.mem['o47] = ins(9'o772, 1, 'o1234);   // character -> 1234
    dut.the_memory.mem['o50] = ins(9'o771, 1, 'o2000);   // raise RX read
    dut.the_memory.mem['o51] = ins(9'o771, 1, 'o0);      // and drop it
    dut.the_memory.mem['o52] = ins(9'o775, 2, 'o1000);   // UART B: skip when TX ready
    dut.the_memory.mem['o53] = ins(9'o254, 0, 'o52);     // back to the poll
    dut.the_memory.mem['o54] = ins(9'o773, 2, 'o1234);   // echo the received character
    dut.the_memory.mem['o55] = ins(9'o771, 2, 'o4000);   // raise TX write enable
    dut.the_memory.mem['o56] = ins(9'o771, 2, 'o0);      // and drop it
    dut.the_memory.mem['o57] = ins(9'o771, 3, 'o20);     // COUT 3,20  mask bus 4
    dut.the_memory.mem['o60] = ins(9'o770, 3, 'o1237);   // CIN 3,1237 mask read-back
    dut.the_memory.mem['o61] = ins(9'o772, 3, 'o1235);   // DIN 3,1235
    dut.the_memory.mem['o62] = ins(9'o200, 5, 'o1235);   // MOVE 5,1235
    dut.the_memory.mem['o63] = ins(9'o606, 5, 'o20);     // TRNN 5,20  bus 4 line?
    dut.the_memory.mem['o64] = ins(9'o254, 0, 'o61);     // JRST .-3
    dut.the_memory.mem['o65] = ins(9'o771, 0, 'o777);    // COUT 0,777
    dut.the_memory.mem['o66] = ins(9'o770, 0, 'o1236);   // CIN 0,1236
    dut.the_memory.mem['o67] = ins(9'o254, 4, 'o0);      // HALT
    dut.the_memory.mem['o100] = 36'o130;                 // "X"
    repeat (4) @(posedge clk);
    #1 reset_in = 0;
    fork
      serial_get(console_a_tx, got_a);
      begin repeat (20 * BIT) @(posedge clk); serial_send(console_a_rx, 8'h41); end
      serial_get(console_b_tx, got_b);
    join
    `CHECK_EQ(got_a, 8'h58, "UART A sent X")
    `CHECK_EQ(got_b, 8'h41, "UART B echoed the received character")
    repeat (200) @(posedge clk);
    `CHECK_EQ(halt_out, 1'b0, "still polling the interrupt controller")
    `CHECK_EQ(irq_out, 1'b0, "no interrupt yet")
    io_irq_in[9] = 1'b1;                 // masked line: no interrupt
    repeat (20) @(posedge clk);
    `CHECK_EQ(irq_out, 1'b0, "masked bus 9 line ignored")
    io_irq_in[4] = 1'b1;
    repeat (6) @(posedge clk);
    `CHECK_EQ(irq_out, 1'b1, "bus 4 interrupt reaches irq_out")
    irq_seen = irq_out;
    for (int k = 0; k < 200 && !halt_out; k++) @(posedge clk);
    #1;
    `CHECK_EQ(halt_out, 1'b1, "program halted")
    `CHECK_EQ(error_out, 1'b0, "no error")
    `CHECK_EQ(error_address_out, 18'o67, "halt address")
    `CHECK_EQ(dut.the_memory.mem['o1234], 36'o101, "received character stored")
    `CHECK_EQ(dut.the_memory.mem['o1235], 36'o1020, "bus 4 and bus 9 lines seen by DIN")
    `CHECK_EQ(dut.the_memory.mem['o1236], 36'o777, "bus 0 loopback")
    `CHECK_EQ(dut.the_memory.mem['o1237], 36'o20, "interrupt mask read back")
    `CHECK_EQ(io_ctrl_out[0], 16'o777, "bus 0 control out")
    `CHECK_EQ(dut.first_uart.not_empty_buf, 1'b0, "character removed from UART A buffer")
    `CHECK_EQ(bad_cycle, 0, "three clocks per instruction")
    $display("instructions=%0d tx_poll=%0d rx_poll=%0d irq_poll=%0d", n_instr, n_tx_poll,
             n_rx_poll, n_irq_poll);
    `CHECK(n_rx_poll > 0, "RX polling loop ran")
    `CHECK(n_tx_poll == 0, "UART A ready at once (no TX poll)")
    `CHECK(n_irq_poll > 0, "interrupt polling loop ran")
    `CHECK(irq_seen, "interrupt happened")
    `TB_DONE
  end
endmodule

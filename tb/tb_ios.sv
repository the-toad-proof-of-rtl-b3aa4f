// tb_ios: self-checking testbench for the IO instruction unit. Drives each of
// CIN, COUT, DIN, DOUT, CINSZ and CINSO against chosen bus input values and
// checks the memory writes, skips and output-register requests by hand.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ios;
  import utoad_pkg::*;
  int checks = 0, failures = 0;
  fu_in_t  fin;
  fu_out_t fout;
  io_wr_t  io_wr;
  logic [15:0][15:0] ctrl_in, data_in;

  ios #(.N_IO(16), .IO_CTRL_W(16), .IO_DATA_W(16)) dut (.fin, .ctrl_in, .data_in, .fout, .io_wr);

  task automatic apply(logic [8:0] op, logic [3:0] b, word_t memv, half_t ea);
    fin = '{ir: '{op: op, ac: b, i: 1'b0, x: 4'd0, y: ea}, ac: '0, mem: memv, ea: ea, pc: 18'o1000};
    #1;
  endtask

  initial begin #100000; failures++; `TB_DONE end

  initial begin
    for (int b = 0; b < 16; b++) begin
      ctrl_in[b] = 16'(16'h1000 + b);
      data_in[b] = 16'(16'hA000 + 3 * b);
    end
    ctrl_in[1] = 16'b0000_0010_0101_1000;  // TX ready, char 130 (octal)
    apply(9'o770, 4'd1, '0, 18'o1234);
    `CHECK_EQ(fout.writes_mem, 1'b1, "CIN writes memory")
    `CHECK_EQ(fout.mem_result, 36'o000000001130, "CIN value right-justified")
    `CHECK_EQ(io_wr.ctrl_we | io_wr.data_we, 1'b0, "CIN no output write")
    apply(9'o772, 4'd5, '0, 18'o1234);
    `CHECK_EQ(fout.mem_result, 36'(16'hA00F), "DIN bus 5 value")
    `CHECK_EQ(fout.writes_mem, 1'b1, "DIN writes memory")
    apply(9'o771, 4'd3, 36'o777, 18'o200);
    `CHECK_EQ(io_wr.ctrl_we, 1'b1, "COUT control write")
    `CHECK_EQ(io_wr.data_we, 1'b0, "COUT no data write")
    `CHECK_EQ(io_wr.bus, 4'd3, "COUT bus")
    `CHECK_EQ(io_wr.value, 36'o200, "COUT takes E as immediate")
    `CHECK_EQ(fout.writes_mem, 1'b0, "COUT no memory write")
    apply(9'o773, 4'd9, 36'o123, 18'o200);
    `CHECK_EQ(io_wr.data_we, 1'b1, "DOUT data write")
    `CHECK_EQ(io_wr.bus, 4'd9, "DOUT bus")
    `CHECK_EQ(io_wr.value, 36'o123, "DOUT takes C(E)")
    // CINSO 1,1B26: TX ready is word bit 26 = 1000 octal
    apply(9'o775, 4'd1, '0, 18'o1000);
    `CHECK_EQ(fout.skip, 1'b1, "CINSO ready set skips")
    apply(9'o774, 4'd1, '0, 18'o1000);
    `CHECK_EQ(fout.skip, 1'b0, "CINSZ ready set no skip")
    // CINSO 1,1B27: RX not empty = 400 octal, clear here
    apply(9'o775, 4'd1, '0, 18'o400);
    `CHECK_EQ(fout.skip, 1'b0, "CINSO clear bit no skip")
    apply(9'o774, 4'd1, '0, 18'o400);
    `CHECK_EQ(fout.skip, 1'b1, "CINSZ clear bit skips")
    apply(9'o776, 4'd1, '0, 18'o400);
    `CHECK_EQ({fout.skip, fout.writes_mem, io_wr.ctrl_we, io_wr.data_we}, 4'b0, "776 not mine")
    `TB_DONE
  end
endmodule

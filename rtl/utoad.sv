// utoad: the uToad proof-of-concept system.
//
// The processor (datapath) with one dual-port memory of MEM_WORDS 36-bit words
// serving both its instruction and its data port, and its sixteen IO buses:
//   bus 0   control outputs looped back to control inputs, data outputs to
//           data inputs (for testing IO software without a peripheral)
//   bus 1   console UART A
//   bus 2   UART B
//   bus 3   interrupt controller (mask in control out; its output is brought
//           out on irq_out, since the processor's interrupts are disabled)
//   4-15    brought out to the io_* ports
// The processor starts at START_ADDRESS (40 octal, the console handler) after
// reset. reset_in is registered once (the reset tree register) before it
// reaches the logic. The clock comes in directly; on the original board it
// came from a clock manager. The bus assignment of UART B and of the interrupt
// controller, the baud divisors and the memory contents at power-up (whatever
// the memory holds; programs are loaded into it) are this design's choices.
module utoad
  import utoad_pkg::*;
#(
  parameter int unsigned MEM_WORDS           = 32768,
  parameter half_t       START_ADDRESS       = 18'o40,
  parameter int unsigned FIRST_BAUD_DIVISOR  = 18,
  parameter int unsigned SECOND_BAUD_DIVISOR = 16
) (
  input  logic              clk,
  input  logic              reset_in,
  // serial consoles
  input  logic              console_a_rx,
  output logic              console_a_tx,
  input  logic              console_b_rx,
  output logic              console_b_tx,
  // IO buses 4..15 (entries 0..3 of the inputs are unused)
  input  logic [15:0][15:0] io_ctrl_in,
  input  logic [15:0][15:0] io_data_in,
  output logic [15:0][15:0] io_ctrl_out,
  output logic [15:0][15:0] io_data_out,
  input  logic [15:0]       io_irq_in,
  output logic              irq_out,
  // status
  output logic              error_out,
  output logic              halt_out,
  output logic [8:0]        error_opcode_out,
  output half_t             error_address_out,
  output word_t             debug_data_out,
  output logic              debug_error_out,
  output logic [2:0]        debug_cycle_out,
  output logic [2:0]        cycle_out
);
  logic  datapath_reset;
  half_t instruction_address, data_address;
  word_t instruction_in, data_in, data_out;
  logic  instruction_read, instruction_ready, data_read, data_write, data_ready;
  logic  uart_a_rx_ne, uart_b_rx_ne;
  logic [15:0][15:0] cpu_ctrl_in, cpu_data_in, cpu_ctrl_out, cpu_data_out;

  always_ff @(posedge clk) datapath_reset <= reset_in;

  datapath #(.START_ADDRESS(START_ADDRESS)) the_datapath (
    .clk, .reset(datapath_reset),
    .instruction_address, .instruction_in, .instruction_read, .instruction_ready,
    .data_address, .data_in, .data_read, .data_out, .data_write, .data_ready,
    .console_interrupt_in(1'b0), .io_interrupt_in(1'b0),
    .io_ctrl_in(cpu_ctrl_in), .io_data_in(cpu_data_in),
    .io_ctrl_out(cpu_ctrl_out), .io_data_out(cpu_data_out),
    .error_opcode_out, .error_address_out, .error_out, .halt_out,
    .debug_clk(clk), .debug_data_out, .debug_error_out, .debug_cycle_out, .cycle_out
  );

  dpram #(.WORDS(MEM_WORDS)) the_memory (
    .clk,
    .a_addr(instruction_address), .a_rd(instruction_read),
    .a_dout(instruction_in), .a_ready(instruction_ready),
    .b_addr(data_address), .b_rd(data_read), .b_we(data_write), .b_din(data_out),
    .b_dout(data_in), .b_ready(data_ready)
  );

  uart #(.FIRST_BAUD_DIVISOR(FIRST_BAUD_DIVISOR), .SECOND_BAUD_DIVISOR(SECOND_BAUD_DIVISOR))
  first_uart (
    .clk, .rst(datapath_reset),
    .to_cpu_ctrl(cpu_ctrl_in[1]), .to_cpu_data(cpu_data_in[1]),
    .from_cpu_ctrl(cpu_ctrl_out[1]), .from_cpu_data(cpu_data_out[1]),
    .tx(console_a_tx), .rx(console_a_rx)
  );

  uart #(.FIRST_BAUD_DIVISOR(FIRST_BAUD_DIVISOR), .SECOND_BAUD_DIVISOR(SECOND_BAUD_DIVISOR))
  second_uart (
    .clk, .rst(datapath_reset),
    .to_cpu_ctrl(cpu_ctrl_in[2]), .to_cpu_data(cpu_data_in[2]),
    .from_cpu_ctrl(cpu_ctrl_out[2]), .from_cpu_data(cpu_data_out[2]),
    .tx(console_b_tx), .rx(console_b_rx)
  );

  // RX-not-empty of the UARTs are the interrupt lines of buses 1 and 2.
  assign uart_a_rx_ne = cpu_ctrl_in[1][8];
  assign uart_b_rx_ne = cpu_ctrl_in[2][8];

  intctl #(.N_IO(16)) the_intctl (
    .clk, .rst(datapath_reset),
    .irq_in({io_irq_in[15:4], 1'b0, uart_b_rx_ne, uart_a_rx_ne, 1'b0}),
    .from_cpu_ctrl(cpu_ctrl_out[3]),
    .to_cpu_ctrl(cpu_ctrl_in[3]), .to_cpu_data(cpu_data_in[3]),
    .irq_out
  );

  // bus 0 loopback; buses 4..15 from the pins
  assign cpu_ctrl_in[0] = cpu_ctrl_out[0];
  assign cpu_data_in[0] = cpu_data_out[0];
  for (genvar b = 4; b < 16; b++) begin : g_pins
    assign cpu_ctrl_in[b] = io_ctrl_in[b];
    assign cpu_data_in[b] = io_data_in[b];
  end

  assign io_ctrl_out = cpu_ctrl_out;
  assign io_data_out = cpu_data_out;
endmodule

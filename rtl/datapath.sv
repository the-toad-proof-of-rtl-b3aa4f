// datapath: the uToad processor, a PDP-10 subset executed in three phases.
//
// A one-hot phase shift register steps each instruction through
//   Decode/EAcalc  the fetched word arrives from the instruction port; the AC
//                  named by the AC field and the index register named by X are
//                  read; E = Y + right half of C(X) (just Y when X is 0) is
//                  sent to the data port as a read address and kept.
//   Execute        every instruction-class unit looks at the instruction, the
//                  AC, C(E) (from memory, or from the register file when E is
//                  below 20 octal) and E, and states whether it writes the AC,
//                  writes memory, jumps or skips. The requests are registered.
//   Store/Fetch    the requests are combined: next PC = E on a jump, PC+2 on a
//                  skip, else PC+1, and is sent to the instruction port; the AC
//                  result goes to the register file, the memory result to the
//                  data port (or to the register file when E names an AC), and
//                  COUT/DOUT load the IO output registers, all at the clock edge
//                  ending the phase.
// The PC only advances once an instruction has been through all three phases,
// so an instruction takes three clocks. The Decode phase waits for
// instruction_ready and the Execute phase for data_ready, so slower memories
// can be attached. An illegal opcode, a set indirect bit, HALT (JRST 4,) or an
// instruction that would write two registers (AC and E both an AC) stops the
// machine at the end of its Store/Fetch phase with no effect; error_out or
// halt_out then stays high until reset, with the opcode and PC of the
// instruction on error_opcode_out and error_address_out. Interrupts and UUO
// traps are not enabled: the two interrupt inputs only appear in the trace.
//
// Three trace buffers, one per phase, record the last TRACE_DEPTH instructions
// and stop at the error: Decode stores PC,,E; Execute stores the condition
// word below; Store/Fetch stores the AC result if the AC is written, otherwise
// the memory result. On the debug_clk side a three-phase counter shows the
// three buffers' entries in turn on debug_data_out (debug_cycle_out says which
// one) and steps all three read counters after the third. cycle_out shows the
// processor's current phase. Execute condition word, PDP bit numbering:
//   0-3 zero, 4 console_interrupt, 5 uuo_detected, 6 io_interrupt,
//   7 E is an AC, 8 halt, 9 illegal indirection, 10 illegal dual register
//   write, 11 illegal opcode, 12-15 skips (compare, jump/skip, test, IO),
//   16-19 jumps (JRST, JSP, AOBJ, jump/skip), 20-28 AC writes (move, EXCH,
//   AOBJ, JSP, add/sub, jump/skip, logic, halfword, test), 29-35 memory writes
//   (move, EXCH, add/sub, jump/skip, logic, halfword, IO).
// The phases, units, E-in-AC handling, IO registers and the condition word
// follow the document; the ready handshake details, the stop sequence and the
// read-side phase counter are this design's.
module datapath
  import utoad_pkg::*;
#(
  parameter half_t       START_ADDRESS = 18'o40,
  parameter int unsigned N_IO          = 16,
  parameter int unsigned IO_CTRL_W     = 16,
  parameter int unsigned IO_DATA_W     = 16,
  parameter int unsigned TRACE_DEPTH   = 16
) (
  input  logic                          clk,
  input  logic                          reset,
  // instruction memory
  output half_t                         instruction_address,
  input  word_t                         instruction_in,
  output logic                          instruction_read,
  input  logic                          instruction_ready,
  // data memory
  output half_t                         data_address,
  input  word_t                         data_in,
  output logic                          data_read,
  output word_t                         data_out,
  output logic                          data_write,
  input  logic                          data_ready,
  // interrupts (not enabled)
  input  logic                          console_interrupt_in,
  input  logic                          io_interrupt_in,
  // IO buses
  input  logic [N_IO-1:0][IO_CTRL_W-1:0] io_ctrl_in,
  input  logic [N_IO-1:0][IO_DATA_W-1:0] io_data_in,
  output logic [N_IO-1:0][IO_CTRL_W-1:0] io_ctrl_out,
  output logic [N_IO-1:0][IO_DATA_W-1:0] io_data_out,
  // stop reporting
  output logic [8:0]                    error_opcode_out,
  output half_t                         error_address_out,
  output logic                          error_out,
  output logic                          halt_out,
  // trace read-out
  input  logic                          debug_clk,
  output word_t                         debug_data_out,
  output logic                          debug_error_out,
  output logic [2:0]                    debug_cycle_out,
  output logic [2:0]                    cycle_out
);
  localparam int NU = 12;   // functional units

  phase_e phase;
  half_t  pc;
  logic   halted;

  // ---------------- Decode/EAcalc ----------------
  instr_t     ir_d;
  word_t      ac_rd, ix_rd, e_rd;
  half_t      ea_d;
  dec_flags_t flags_d;
  logic       go_d, stop_d;

  assign ir_d = instr_t'(instruction_in);
  assign ea_d = ir_d.y + (ir_d.x != 4'd0 ? rh(ix_rd) : 18'd0);
  assign go_d = phase == PH_DECODE && instruction_ready && !halted;

  opdecode u_dec (.ir(ir_d), .flags(flags_d));
  assign stop_d = flags_d.illegal_opcode | flags_d.illegal_indirection | flags_d.halt;

  // Decode -> Execute register
  instr_t     ir_e;
  word_t      ac_e;
  half_t      ea_e, pc_e;
  dec_flags_t flags_e;
  logic       valid_e, ea_in_ac_e;

  // ---------------- Execute ----------------
  fu_in_t  fin;
  fu_out_t fo [NU];
  io_wr_t  iow_e;
  logic [N_IO-1:0][IO_CTRL_W-1:0] ctrl_q;
  logic [N_IO-1:0][IO_DATA_W-1:0] data_q;
  logic    go_e, any_wac, any_wmem, dual_write, stop_e;
  logic [0:35] cond_word;

  assign ea_in_ac_e = ea_e < 18'o20;
  assign fin = '{ir: ir_e, ac: ac_e, mem: ea_in_ac_e ? e_rd : data_in, ea: ea_e, pc: pc_e};
  assign go_e = phase == PH_EXECUTE && data_ready;

  moves     u_moves     (.fin, .fout(fo[0]));
  exchs     u_exchs     (.fin, .fout(fo[1]));
  aobjs     u_aobjs     (.fin, .fout(fo[2]));
  jrsts     u_jrsts     (.fin, .fout(fo[3]));
  jsps      u_jsps      (.fin, .fout(fo[4]));
  addsubs   u_addsubs   (.fin, .fout(fo[5]));
  compares  u_compares  (.fin, .fout(fo[6]));
  jumpskips u_jumpskips (.fin, .fout(fo[7]));
  logics    u_logics    (.fin, .fout(fo[8]));
  halfwords u_halfwords (.fin, .fout(fo[9]));
  tests     u_tests     (.fin, .fout(fo[10]));
  ios #(.N_IO(N_IO), .IO_CTRL_W(IO_CTRL_W), .IO_DATA_W(IO_DATA_W)) u_ios (
    .fin, .ctrl_in(ctrl_q), .data_in(data_q), .fout(fo[11]), .io_wr(iow_e)
  );

  always_comb begin
    any_wac  = 1'b0;
    any_wmem = 1'b0;
    for (int k = 0; k < NU; k++) begin
      any_wac  |= fo[k].writes_ac;
      any_wmem |= fo[k].writes_mem;
    end
  end
  assign dual_write = any_wac && any_wmem && ea_in_ac_e;
  assign stop_e = flags_e.illegal_opcode | flags_e.illegal_indirection | flags_e.halt | dual_write;

  assign cond_word = {3'b000, 1'b0, console_interrupt_in, flags_e.uuo_detected,
                      io_interrupt_in, ea_in_ac_e, flags_e.halt,
                      flags_e.illegal_indirection, dual_write, flags_e.illegal_opcode,
                      fo[6].skip, fo[7].skip, fo[10].skip, fo[11].skip,
                      fo[3].jump, fo[4].jump, fo[2].jump, fo[7].jump,
                      fo[0].writes_ac, fo[1].writes_ac, fo[2].writes_ac, fo[4].writes_ac,
                      fo[5].writes_ac, fo[7].writes_ac, fo[8].writes_ac, fo[9].writes_ac,
                      fo[10].writes_ac,
                      fo[0].writes_mem, fo[1].writes_mem, fo[5].writes_mem, fo[7].writes_mem,
                      fo[8].writes_mem, fo[9].writes_mem, fo[11].writes_mem};

  // Execute -> Store register
  fu_out_t fo_s [NU];
  io_wr_t  iow_s;
  instr_t  ir_s;
  half_t   ea_s;
  logic    valid_s, stop_s, error_s, ea_in_ac_s;

  // ---------------- Store/Fetch ----------------
  logic  wac_s, wmem_s, jump_s, skip_s, commit;
  word_t acres_s, memres_s;
  half_t next_pc;

  always_comb begin
    wac_s = 1'b0; wmem_s = 1'b0; jump_s = 1'b0; skip_s = 1'b0;
    acres_s = '0; memres_s = '0;
    for (int k = 0; k < NU; k++) begin
      wac_s    |= fo_s[k].writes_ac;
      wmem_s   |= fo_s[k].writes_mem;
      jump_s   |= fo_s[k].jump;
      skip_s   |= fo_s[k].skip;
      acres_s  |= fo_s[k].ac_result  & {36{fo_s[k].writes_ac}};
      memres_s |= fo_s[k].mem_result & {36{fo_s[k].writes_mem}};
    end
  end

  assign commit  = phase == PH_STORE && valid_s && !stop_s;
  assign next_pc = !commit ? pc : jump_s ? ea_s : pc + (skip_s ? 18'd2 : 18'd1);

  assign instruction_address = next_pc;
  assign instruction_read    = phase == PH_STORE && !halted && !(valid_s && stop_s);

  assign data_address = phase == PH_DECODE ? ea_d : ea_s;
  assign data_read    = go_d;
  assign data_write   = commit && wmem_s && !ea_in_ac_s;
  assign data_out     = memres_s;

  regfile u_rf (
    .clk, .rst(reset),
    .ac_addr(ir_d.ac), .ac_data(ac_rd),
    .ix_addr(ir_d.x),  .ix_data(ix_rd),
    .e_addr(ea_e[3:0]), .e_data(e_rd),
    .we(commit && (wac_s || (wmem_s && ea_in_ac_s))),
    .waddr(wac_s ? ir_s.ac : ea_s[3:0]),
    .wdata(wac_s ? acres_s : memres_s)
  );

  for (genvar b = 0; b < N_IO; b++) begin : g_bus
    io_bus #(.CTRL_W(IO_CTRL_W), .DATA_W(IO_DATA_W)) u_bus (
      .clk, .rst(reset),
      .ctrl_pin_in(io_ctrl_in[b]), .data_pin_in(io_data_in[b]),
      .ctrl_pin_out(io_ctrl_out[b]), .data_pin_out(io_data_out[b]),
      .ctrl_we(commit && iow_s.ctrl_we && iow_s.bus == 4'(b)),
      .data_we(commit && iow_s.data_we && iow_s.bus == 4'(b)),
      .wdata(iow_s.value),
      .ctrl_q(ctrl_q[b]), .data_q(data_q[b])
    );
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      phase             <= PH_STORE;   // first Store/Fetch only fetches START_ADDRESS
      pc                <= START_ADDRESS;
      halted            <= 1'b0;
      error_out         <= 1'b0;
      halt_out          <= 1'b0;
      error_opcode_out  <= '0;
      error_address_out <= '0;
      valid_e           <= 1'b0;
      valid_s           <= 1'b0;
      ir_e <= '0; ac_e <= '0; ea_e <= '0; pc_e <= '0; flags_e <= '0;
      ir_s <= '0; ea_s <= '0; iow_s <= '0; stop_s <= 1'b0; error_s <= 1'b0;
      ea_in_ac_s <= 1'b0;
      for (int k = 0; k < NU; k++) fo_s[k] <= FU_IDLE;
    end else begin
      unique case (phase)
        PH_DECODE: if (go_d) begin
          ir_e    <= ir_d;
          ac_e    <= ac_rd;
          ea_e    <= ea_d;
          pc_e    <= pc;
          flags_e <= flags_d;
          valid_e <= 1'b1;
          phase   <= PH_EXECUTE;
        end
        PH_EXECUTE: if (go_e) begin
          for (int k = 0; k < NU; k++) fo_s[k] <= stop_e ? FU_IDLE : fo[k];
          iow_s      <= stop_e ? '0 : iow_e;
          ir_s       <= ir_e;
          ea_s       <= ea_e;
          ea_in_ac_s <= ea_in_ac_e;
          stop_s     <= stop_e;
          error_s    <= stop_e && !flags_e.halt;
          valid_s    <= valid_e;
          phase      <= PH_STORE;
        end
        default: if (!halted) begin
          pc <= next_pc;
          if (valid_s && stop_s) begin
            halted            <= 1'b1;
            error_out         <= error_s;
            halt_out          <= !error_s;
            error_opcode_out  <= ir_s.op;
            error_address_out <= pc;
          end else begin
            phase <= PH_DECODE;
          end
        end
      endcase
    end
  end

  assign cycle_out = phase;

  // ---------------- trace buffers ----------------
  logic [2:0] rphase;
  word_t      tr_dout [3];
  logic [2:0] tr_err, tr_stopped;

  always_ff @(posedge debug_clk) begin
    if (reset) rphase <= 3'b001;
    else       rphase <= {rphase[1:0], rphase[2]};
  end

  trace_engine #(.W(36), .DEPTH(TRACE_DEPTH)) u_trace_d (
    .wclk(clk), .wrst(reset), .capture(go_d), .din({pc, ea_d}), .err(stop_d),
    .stopped(tr_stopped[0]),
    .rclk(debug_clk), .rrst(reset), .radv(rphase[2]), .dout(tr_dout[0]), .err_out(tr_err[0])
  );
  trace_engine #(.W(36), .DEPTH(TRACE_DEPTH)) u_trace_e (
    .wclk(clk), .wrst(reset), .capture(go_e && valid_e), .din(cond_word), .err(stop_e),
    .stopped(tr_stopped[1]),
    .rclk(debug_clk), .rrst(reset), .radv(rphase[2]), .dout(tr_dout[1]), .err_out(tr_err[1])
  );
  trace_engine #(.W(36), .DEPTH(TRACE_DEPTH)) u_trace_s (
    .wclk(clk), .wrst(reset), .capture(phase == PH_STORE && valid_s && !halted),
    .din(wac_s ? acres_s : memres_s), .err(stop_s),
    .stopped(tr_stopped[2]),
    .rclk(debug_clk), .rrst(reset), .radv(rphase[2]), .dout(tr_dout[2]), .err_out(tr_err[2])
  );

  always_comb begin
    unique case (rphase)
      3'b001:  begin debug_data_out = tr_dout[0]; debug_error_out = tr_err[0]; end
      3'b010:  begin debug_data_out = tr_dout[1]; debug_error_out = tr_err[1]; end
      default: begin debug_data_out = tr_dout[2]; debug_error_out = tr_err[2]; end
    endcase
  end
  assign debug_cycle_out = rphase;

  // A functional unit answers only for its own opcodes: at most one writes.
  always_ff @(posedge clk) begin
    if (!reset && phase == PH_EXECUTE) begin
      assert ($countones({fo[0].writes_ac, fo[1].writes_ac, fo[2].writes_ac, fo[4].writes_ac,
                          fo[5].writes_ac, fo[7].writes_ac, fo[8].writes_ac, fo[9].writes_ac,
                          fo[10].writes_ac}) <= 1)
        else $error("two functional units write the AC");
    end
  end
endmodule

// utoad_pkg: types and helpers shared by the uToad processor.
//
// A machine word is 36 bits. PDP-10 documentation numbers bits from 0 (the most
// significant) to 35 (the least significant); here a word is a logic [35:0], so
// PDP bit n is SV bit 35-n. The instruction word is laid out as the PDP-10
// defines it: opcode in bits 0-8, AC (or IO bus B) in 9-12, indirect bit I in 13,
// index register X in 14-17 and address Y in 18-35.
//
// Every functional unit receives an fu_in_t (the instruction and its operands in
// the Execute phase) and returns an fu_out_t: write enables and results for the
// AC and for memory, and jump/skip requests. A unit drives all zeros when the
// opcode is not its own, so the datapath can OR the requests together.
package utoad_pkg;

  typedef logic [35:0] word_t;
  typedef logic [17:0] half_t;

  typedef struct packed {
    logic [8:0] op;   // PDP bits 0-8
    logic [3:0] ac;   // PDP bits 9-12 (IO bus number B for IO instructions)
    logic       i;    // PDP bit 13, indirect
    logic [3:0] x;    // PDP bits 14-17, index register
    logic [17:0] y;   // PDP bits 18-35
  } instr_t;

  typedef struct packed {
    instr_t ir;       // instruction being executed
    word_t  ac;       // contents of the AC named by the AC field
    word_t  mem;      // C(E): data memory word, or AC E when E < 16
    half_t  ea;       // effective address E
    half_t  pc;       // address of the instruction
  } fu_in_t;

  typedef struct packed {
    logic  writes_ac;
    word_t ac_result;
    logic  writes_mem;
    word_t mem_result;
    logic  jump;      // next PC is E
    logic  skip;      // next PC is PC+2
  } fu_out_t;

  localparam fu_out_t FU_IDLE = '0;

  // Output-register write request from the IO unit.
  typedef struct packed {
    logic       ctrl_we;
    logic       data_we;
    logic [3:0] bus;
    word_t      value;
  } io_wr_t;

  // Flags from the illegal opcode and halt detector.
  typedef struct packed {
    logic illegal_opcode;
    logic uuo_detected;
    logic illegal_indirection;
    logic halt;
  } dec_flags_t;

  // Phases of the instruction cycle, one-hot in the phase shift register.
  typedef enum logic [2:0] {
    PH_DECODE  = 3'b001,
    PH_EXECUTE = 3'b010,
    PH_STORE   = 3'b100
  } phase_e;

  function automatic half_t lh(word_t w); return w[35:18]; endfunction
  function automatic half_t rh(word_t w); return w[17:0];  endfunction
  function automatic word_t swap(word_t w); return {w[17:0], w[35:18]}; endfunction

  // PDP-10 skip/jump condition field (low three opcode bits):
  // 0 never, 1 L, 2 E, 3 LE, 4 always, 5 GE, 6 N, 7 G; a compared with b, signed.
  function automatic logic cond_true(logic [2:0] c, word_t a, word_t b);
    logic lt, eq;
    lt = $signed(a) < $signed(b);
    eq = a == b;
    unique case (c)
      3'd0: return 1'b0;
      3'd1: return lt;
      3'd2: return eq;
      3'd3: return lt | eq;
      3'd4: return 1'b1;
      3'd5: return !lt;
      3'd6: return !eq;
      default: return !(lt | eq);
    endcase
  endfunction

endpackage

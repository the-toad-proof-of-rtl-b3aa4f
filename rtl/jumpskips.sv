// jumpskips: functional unit for the jump and skip class, 320-377 (octal).
//
// The middle opcode digit picks the instruction, the last one the condition
// (never, L, E, LE, always, GE, N, G against zero):
//   32x JUMP  jump if AC meets the condition
//   33x SKIP  skip if C(E) meets it; C(E) -> AC when the AC field is nonzero
//   34x AOJ   AC+1 -> AC, jump on the new AC
//   35x AOS   C(E)+1 -> E (and -> AC if AC field nonzero), skip on the result
//   36x SOJ   as AOJ with AC-1
//   37x SOS   as AOS with C(E)-1
// No flags are kept. Combinational, Execute phase.
module jumpskips
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  logic [2:0] kind, c;
  word_t      delta, acv, memv;
  assign kind  = fin.ir.op[5:3];
  assign c     = fin.ir.op[2:0];
  assign delta = kind[1] ? '1 : 36'd1;               // SOJ/SOS add -1
  assign acv   = fin.ac + delta;
  assign memv  = fin.mem + delta;

  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op[8:6] == 3'o3 && kind >= 3'd2) begin
      unique case (kind)
        3'd2: fout.jump = cond_true(c, fin.ac, '0);          // JUMP
        3'd3: begin                                          // SKIP
          fout.skip      = cond_true(c, fin.mem, '0);
          fout.writes_ac = fin.ir.ac != 4'd0;
          fout.ac_result = fin.mem;
        end
        3'd4, 3'd6: begin                                    // AOJ, SOJ
          fout.writes_ac = 1'b1;
          fout.ac_result = acv;
          fout.jump      = cond_true(c, acv, '0);
        end
        default: begin                                       // AOS, SOS
          fout.writes_mem = 1'b1;
          fout.mem_result = memv;
          fout.writes_ac  = fin.ir.ac != 4'd0;
          fout.ac_result  = memv;
          fout.skip       = cond_true(c, memv, '0);
        end
      endcase
    end
  end
endmodule

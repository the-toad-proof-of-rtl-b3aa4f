// exchs: functional unit for EXCH (250 octal).
//
// Exchanges the AC with C(E): the old C(E) is written to the AC and the old AC
// to location E, both in the same Store/Fetch phase. Combinational, Execute
// phase. When E names an AC this is two register-file writes, which the
// datapath reports as an illegal dual register write.
module exchs
  import utoad_pkg::*;
(
  input  fu_in_t  fin,
  output fu_out_t fout
);
  always_comb begin
    fout = FU_IDLE;
    if (fin.ir.op == 9'o250) begin
      fout.writes_ac  = 1'b1;
      fout.ac_result  = fin.mem;
      fout.writes_mem = 1'b1;
      fout.mem_result = fin.ac;
    end
  end
endmodule

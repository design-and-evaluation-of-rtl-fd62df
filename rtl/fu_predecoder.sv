// fu_predecoder: pre-decode of the instruction in the fetch stage.
//
// As soon as the instruction cache returns an instruction word, this block
// looks at its opcode and funct fields and reports which of the four
// power-gated functional units the instruction will execute on. The sleep
// controller uses this one-hot vector to start waking the unit while the
// instruction is still in fetch, so that the one-cycle wake-up latency is
// spent during decode and the unit is powered when the instruction reaches
// execute. The block also extracts the PG-cancel flag (see frpg_pkg for its
// encoding, which is this design's choice).
//
// Interface: purely combinational. instr/instr_valid in, fu_use (at most one
// bit set, all zero when instr_valid is low) and pg_cancel out.
module fu_predecoder
  import frpg_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        instr_valid,
  output fu_vec_t     fu_use,
  output logic        pg_cancel
);

  fu_class_t cls;

  always_comb begin
    cls       = classify_instr(instr);
    fu_use    = instr_valid ? cls.fu_use : '0;
    pg_cancel = instr_valid & cls.pg_cancel;
  end

endmodule

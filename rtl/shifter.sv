// shifter: the barrel shifter, one of the four power-gated functional units.
//
// Shifts a 32-bit operand left logically, right logically or right
// arithmetically by 0 to 31 places in one cycle, as the MIPS SLL/SRL/SRA and
// SLLV/SRLV/SRAV instructions need. The shift amount comes from the
// instruction (shamt) or from a register, chosen by the decoder.
//
// Interface: combinational; op, value d, amount sa in, result y out.
module shifter
  import frpg_pkg::*;
(
  input  shift_op_e   op,
  input  logic [31:0] d,
  input  logic [4:0]  sa,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      SH_SLL:  y = d << sa;
      SH_SRL:  y = d >> sa;
      SH_SRA:  y = $unsigned($signed(d) >>> sa);
      default: y = '0;
    endcase
  end

endmodule

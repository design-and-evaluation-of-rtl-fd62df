// alu: the integer ALU, one of the four power-gated functional units.
//
// Computes add, subtract, the bitwise operations, set-less-than (signed and
// unsigned) and load-upper-immediate on 32-bit operands in one cycle. The
// MIPS overflow trap of ADD/ADDI/SUB is not raised: the core has no
// exception logic, so ADD behaves as ADDU (this design's choice).
//
// Interface: combinational; op selects the operation, a and b are the
// operands (b holds the extended immediate for immediate forms), y is the
// result.
module alu
  import frpg_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end

endmodule

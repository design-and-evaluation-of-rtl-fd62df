// tb_alu: random and corner operands for every ALU operation, compared with
// SystemVerilog operators.
module tb_alu;
  import frpg_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y, exp;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < z) ? 32'd1 : 32'd0;
      ALU_LUI:  return z << 16;
      default:  return '0;
    endcase
  endfunction

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          op = alu_op_e'(o); a = corner[i]; b = corner[j]; #1;
          exp = model(op, a, b); checks++;
          if (y !== exp) begin failures++; $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp); end
        end
      for (int i = 0; i < 300; i++) begin
        op = alu_op_e'(o); a = $urandom; b = $urandom; #1;
        exp = model(op, a, b); checks++;
        if (y !== exp) begin failures++; $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

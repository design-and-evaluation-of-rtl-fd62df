// tb_shifter: every shift amount for each operation on random and corner
// values, compared with a bit-by-bit reference loop.
module tb_shifter;
  import frpg_pkg::*;
  shift_op_e   op;
  logic [31:0] d, y, exp;
  logic [4:0]  sa;
  int checks = 0, failures = 0;

  shifter dut (.op, .d, .sa, .y);

  function automatic logic [31:0] model(shift_op_e o, logic [31:0] x, int n);
    logic [31:0] r = x;
    for (int k = 0; k < n; k++)
      case (o)
        SH_SLL:  r = {r[30:0], 1'b0};
        SH_SRL:  r = {1'b0, r[31:1]};
        default: r = {r[31], r[31:1]};
      endcase
    return r;
  endfunction

  initial begin
    shift_op_e ops [3] = '{SH_SLL, SH_SRL, SH_SRA};
    foreach (ops[o])
      for (int n = 0; n < 32; n++)
        for (int i = 0; i < 20; i++) begin
          op = ops[o]; sa = 5'(n);
          d = (i == 0) ? 32'h8000_0001 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
          #1; exp = model(op, d, n); checks++;
          if (y !== exp) begin failures++; $display("FAIL %s d=%h sa=%0d y=%h exp=%h", op.name(), d, sa, y, exp); end
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

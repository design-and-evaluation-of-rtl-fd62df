// tb_fu_predecoder: one instruction of every class with and without the
// PG-cancel flag; the expected unit is written out per instruction here.
module tb_fu_predecoder;
  import frpg_pkg::*;
  logic [31:0] instr;
  logic        instr_valid, pg_cancel;
  fu_vec_t     fu_use;
  int checks = 0, failures = 0;

  fu_predecoder dut (.instr, .instr_valid, .fu_use, .pg_cancel);

  task automatic t(input logic [31:0] w, input fu_vec_t eu, input bit ec, input string nm);
    instr = w; instr_valid = 1'b1; #1;
    checks++;
    if (fu_use !== eu || pg_cancel !== ec) begin
      failures++; $display("FAIL %s: use=%b cancel=%b exp %b %b", nm, fu_use, pg_cancel, eu, ec);
    end
    instr_valid = 1'b0; #1;
    checks++;
    if (fu_use !== '0 || pg_cancel !== 1'b0) begin failures++; $display("FAIL %s: not gated by valid", nm); end
  endtask

  function automatic logic [31:0] r(input logic [5:0] op, input logic [5:0] fn);
    return {op, 5'd1, 5'd2, 5'd3, 5'd4, fn};
  endfunction

  initial begin
    t(r(6'h00, 6'h21), 4'b0001, 0, "addu");
    t(r(6'h14, 6'h21), 4'b0001, 1, "addu+pgc");
    t(r(6'h00, 6'h2A), 4'b0001, 0, "slt");
    t(r(6'h00, 6'h27), 4'b0001, 0, "nor");
    t(r(6'h00, 6'h00), 4'b0010, 0, "sll");
    t(r(6'h00, 6'h07), 4'b0010, 0, "srav");
    t(r(6'h14, 6'h03), 4'b0010, 1, "sra+pgc");
    t(r(6'h00, 6'h18), 4'b0100, 0, "mult");
    t(r(6'h14, 6'h19), 4'b0100, 1, "multu+pgc");
    t(r(6'h00, 6'h1A), 4'b1000, 0, "div");
    t(r(6'h14, 6'h1B), 4'b1000, 1, "divu+pgc");
    t(r(6'h00, 6'h10), 4'b0000, 0, "mfhi");
    t(r(6'h14, 6'h12), 4'b0000, 0, "mflo flagged: no unit, no flag");
    t(r(6'h00, 6'h08), 4'b0001, 0, "jr");
    t(r(6'h14, 6'h09), 4'b0001, 0, "jalr flagged: ALU, no flag");
    t(32'd0,           4'b0000, 0, "nop");
    t({6'h09, 26'h12345}, 4'b0001, 0, "addiu");
    t({6'h19, 26'h12345}, 4'b0001, 1, "addiu+pgc");
    t({6'h0F, 26'h12345}, 4'b0001, 0, "lui");
    t({6'h1D, 26'h12345}, 4'b0001, 1, "ori+pgc");
    t({6'h23, 26'h12345}, 4'b0000, 0, "lw");
    t({6'h2B, 26'h12345}, 4'b0000, 0, "sw");
    t({6'h04, 26'h12345}, 4'b0001, 0, "beq");
    t({6'h01, 26'h12345}, 4'b0001, 0, "bltz/bgez");
    t({6'h07, 26'h12345}, 4'b0001, 0, "bgtz");
    t({6'h02, 26'h12345}, 4'b0000, 0, "j");
    t({6'h03, 26'h12345}, 4'b0000, 0, "jal");
    t({6'h10, 26'h12345}, 4'b0000, 0, "cop0");
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

// tb_pg_mode_reg: reset value (all units gated), writes take effect at the
// clock edge, and the value holds while we is low.
module tb_pg_mode_reg;
  import frpg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  fu_vec_t wdata = '0, pg_enable, model;
  int checks = 0, failures = 0;

  pg_mode_reg dut (.clk, .rst_n, .we, .wdata, .pg_enable);

  initial begin
    @(posedge clk); #1; checks++;
    if (pg_enable !== 4'hF) begin failures++; $display("FAIL reset value %b", pg_enable); end
    rst_n = 1'b1;
    model = 4'hF;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = $urandom_range(1); wdata = 4'($urandom);
      checks++;
      if (pg_enable !== model) begin failures++; $display("FAIL before edge %b exp %b", pg_enable, model); end
      @(posedge clk);
      if (we) model = wdata;
      @(posedge clk); #1; checks++;
      if (pg_enable !== model) begin failures++; $display("FAIL after edge %b exp %b", pg_enable, model); end
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

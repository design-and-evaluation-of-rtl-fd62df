// tb_regfile: random writes and reads against a reference array; register 0
// stays zero and a same-cycle write is visible on the read ports.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] ref_r [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  initial begin
    foreach (ref_r[i]) ref_r[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (i % 5 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ((we && wa == ra1 && ra1 != 0) ? wd : ref_r[ra1])) begin failures++; $display("FAIL rd1 r%0d", ra1); end
      if (rd2 !== ((we && wa == ra2 && ra2 != 0) ? wd : ref_r[ra2])) begin failures++; $display("FAIL rd2 r%0d", ra2); end
      @(posedge clk);
      if (we && wa != 0) ref_r[wa] = wd;
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

// tb_divider: signed and unsigned divisions of random and corner operands;
// checks quotient, remainder (MIPS sign rules) and the 33-cycle latency
// from start to done, and that busy covers exactly the 32 steps.
module tb_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        start = 1'b0, is_signed, busy, done;
  logic [31:0] a, b, quot, rem;
  int checks = 0, failures = 0;

  divider dut (.clk, .rst_n, .start, .is_signed, .a, .b, .busy, .done, .quot, .rem);

  task automatic one(input bit sgn, input logic [31:0] x, input logic [31:0] z);
    int n = 0, nbusy = 0;
    logic [31:0] eq, er;
    @(negedge clk); is_signed = sgn; a = x; b = z; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done && n < 100) begin
      if (busy) nbusy++;
      n++;
      @(negedge clk);
    end
    n++;
    if (sgn) begin
      eq = $unsigned($signed(x) / $signed(z));
      er = $unsigned($signed(x) % $signed(z));
    end else begin
      eq = x / z; er = x % z;
    end
    checks += 2;
    if (quot !== eq || rem !== er) begin
      failures++; $display("FAIL s=%0d %h/%h -> q=%h r=%h exp q=%h r=%h", sgn, x, z, quot, rem, eq, er);
    end
    if (n != 33 || nbusy != 32) begin
      failures++; $display("FAIL latency %0d busy %0d", n, nbusy);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    one(1, 32'h1234_5678, 32'hFFFF_FFF9);
    one(1, 32'h8000_0001, 32'h0000_0003);
    one(1, 32'hFFFF_FFF9, 32'h0000_0002);
    one(0, 32'hFFFF_FFFF, 32'h0000_0001);
    one(0, 32'h0000_0005, 32'h0000_0007);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] z;
      z = $urandom >> $urandom_range(31);
      if (z == 0) z = 1;
      one(i[0], $urandom, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

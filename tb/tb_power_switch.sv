// tb_power_switch: the rail comes up exactly WAKE_CYCLES cycles after sleep
// falls (checked for the default of 1 and for 3) and goes down one cycle
// after sleep rises.
module tb_power_switch;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sleep = 1'b1, ok1, ok3;
  int checks = 0, failures = 0;

  power_switch              d1 (.clk, .rst_n, .sleep, .vdd_ok(ok1));
  power_switch #(.WAKE_CYCLES(3)) d3 (.clk, .rst_n, .sleep, .vdd_ok(ok3));

  // reference: cycles since sleep fell
  int awake = 0;
  always @(posedge clk) awake <= sleep ? 0 : awake + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks += 2;
      if (ok1 !== (awake >= 1)) begin failures++; $display("FAIL ok1=%b awake=%0d", ok1, awake); end
      if (ok3 !== (awake >= 3)) begin failures++; $display("FAIL ok3=%b awake=%0d", ok3, awake); end
      if ($urandom_range(3) == 0) sleep = ~sleep;
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

// tb_sleep_controller: directed scenarios (pre-decode wake-up one cycle
// after fetch, shutdown after execute, PG-cancel hold and release, mode
// register disable, forced switch-off on a cache miss with a busy divider
// kept on) followed by random stimulus compared with a reference model
// written from the rules: a unit is off when gating is enabled and, on a
// miss, it is not a busy divider, otherwise no stage needs it and no
// PG-cancel hold is set.
module tb_sleep_controller;
  import frpg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  fu_vec_t pg_enable, if_use, id_use, ex_use, sleep, hold;
  logic    ex_fire, ex_cancel, div_busy, cache_miss;
  fu_vec_t m_sleep, m_hold;
  int checks = 0, failures = 0;

  sleep_controller dut (.clk, .rst_n, .pg_enable, .if_use, .id_use, .ex_use, .ex_fire,
                        .ex_cancel, .div_busy, .cache_miss, .sleep, .hold);

  task automatic idle();
    if_use = '0; id_use = '0; ex_use = '0; ex_fire = 0; ex_cancel = 0;
    div_busy = 0; cache_miss = 0;
  endtask

  task automatic expect_sleep(input fu_vec_t e, input string what);
    checks++;
    if (sleep !== e) begin failures++; $display("FAIL %s: sleep=%b exp %b", what, sleep, e); end
  endtask

  initial begin
    pg_enable = '1; idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_sleep(4'b1111, "all asleep after reset");
    // shifter instruction fetched, decoded, executed
    if_use = 4'b0010; @(negedge clk);
    expect_sleep(4'b1101, "woken one cycle after fetch");
    if_use = '0; id_use = 4'b0010; @(negedge clk);
    expect_sleep(4'b1101, "on in decode");
    id_use = '0; ex_use = 4'b0010; ex_fire = 1; @(negedge clk);
    expect_sleep(4'b1101, "on in execute");
    ex_use = '0; ex_fire = 0; @(negedge clk);
    expect_sleep(4'b1111, "off once the operation has left execute");
    // PG-cancel: ALU op with flag keeps the ALU on
    ex_use = 4'b0001; ex_fire = 1; ex_cancel = 1; @(negedge clk);
    ex_use = '0; ex_fire = 0; ex_cancel = 0;
    repeat (5) @(negedge clk);
    expect_sleep(4'b1110, "held on by PG-cancel");
    ex_use = 4'b0001; ex_fire = 1; @(negedge clk);
    ex_use = '0; ex_fire = 0; @(negedge clk); @(negedge clk);
    expect_sleep(4'b1111, "released by unflagged op");
    // mode register disables gating of the multiplier
    pg_enable = 4'b1011; @(negedge clk); @(negedge clk);
    expect_sleep(4'b1011, "disabled unit stays on");
    pg_enable = '1;
    // cache miss forces off everything but a busy divider
    if_use = 4'b0001; id_use = 4'b0010; ex_use = 4'b1000; div_busy = 1; ex_fire = 1; ex_cancel = 1;
    @(negedge clk); ex_fire = 0; ex_cancel = 0;
    expect_sleep(4'b0100, "units in use are on");
    cache_miss = 1; @(negedge clk);
    expect_sleep(4'b0111, "forced off on a miss, busy divider kept");
    checks++;
    if (hold !== '0) begin failures++; $display("FAIL hold not cleared on miss"); end
    idle(); @(negedge clk);
    // random comparison with the reference model
    m_sleep = sleep; m_hold = hold;
    for (int i = 0; i < 3000; i++) begin
      fu_vec_t need, busy_mask;
      pg_enable = ($urandom_range(7) == 0) ? 4'($urandom) : '1;
      if_use = ($urandom_range(2) == 0) ? fu_vec_t'(1 << $urandom_range(3)) : '0;
      id_use = ($urandom_range(2) == 0) ? fu_vec_t'(1 << $urandom_range(3)) : '0;
      ex_use = ($urandom_range(2) == 0) ? fu_vec_t'(1 << $urandom_range(3)) : '0;
      ex_fire = $urandom_range(1); ex_cancel = $urandom_range(1);
      div_busy = ($urandom_range(3) == 0); cache_miss = ($urandom_range(9) == 0);
      busy_mask = {div_busy, 3'b000};
      need = if_use | id_use | ex_use | busy_mask;
      @(posedge clk);
      m_sleep = cache_miss ? (pg_enable & ~busy_mask) : (pg_enable & ~(need | m_hold));
      if (cache_miss) m_hold = '0;
      else if (ex_fire) for (int f = 0; f < 4; f++) if (ex_use[f]) m_hold[f] = ex_cancel;
      @(negedge clk);
      checks += 2;
      if (sleep !== m_sleep) begin failures++; $display("FAIL random %0d sleep=%b exp %b", i, sleep, m_sleep); end
      if (hold !== m_hold) begin failures++; $display("FAIL random %0d hold=%b exp %b", i, hold, m_hold); end
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

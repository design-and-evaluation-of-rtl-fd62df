// tb_frpg_core: end-to-end test of the power-gated core at its default
// sizes (8 KB caches, 64-byte lines, one-cycle wake-up, 64 histogram bins).
//
// A behavioural main memory answers each bus word after MEM_LAT cycles. The
// shared test program runs twice: once as plain code (hardware-only power
// gating) and once with PG-cancel flags on the loop's ALU instructions.
// Checked: every program result, the mode register round trip, the sleep
// monitor against sleep cycles and periods counted here, that every unit
// sleeps, that flagged code ends fewer ALU sleep periods in the loop, and
// that each mechanism happened at least once: I- and D-cache misses, the
// forced switch-off on a miss, pre-decode wake-up that hides the latency,
// wake stalls after a miss, PG-cancel holds, a unit kept on by the mode
// register, divide interlock, load-use interlock, taken branches and bus
// contention between the caches.
module tb_frpg_core;
  import frpg_pkg::*;
  import tb_prog_pkg::*;

  localparam int MEM_LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        m_req, m_we, m_ack, cache_miss, wake_stall, mon_en, mon_clear;
  logic [31:0] m_addr, m_wdata, m_rdata, mon_count;
  logic [3:0]  m_be;
  fu_vec_t     fu_sleep, fu_vdd_ok, fu_pg_enable, fu_hold;
  logic [1:0]  mon_fu;
  logic [5:0]  mon_bin;
  logic [31:0] mon_total [NUM_FU];
  logic [31:0] mon_periods [NUM_FU];

  frpg_core dut (
    .clk, .rst_n, .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_ack, .m_rdata,
    .fu_sleep, .fu_vdd_ok, .fu_pg_enable, .fu_hold, .cache_miss, .wake_stall,
    .mon_en, .mon_clear, .mon_fu, .mon_bin, .mon_count, .mon_total, .mon_periods
  );

  // ------------------------------------------------------------ memory
  logic [31:0] mem [4096];
  int          lat_cnt;

  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (lat_cnt == MEM_LAT - 1) begin
        lat_cnt <= 0;
        m_ack   <= 1'b1;
        m_rdata <= mem[m_addr[13:2]];
        if (m_we)
          for (int b = 0; b < 4; b++)
            if (m_be[b]) mem[m_addr[13:2]][8*b +: 8] <= m_wdata[8*b +: 8];
      end else begin
        lat_cnt <= lat_cnt + 1;
      end
    end
  end

  // ------------------------------------------------------------ observation
  int checks = 0, failures = 0, cycles = 0;
  int n_imiss, n_dmiss, n_forced_off, n_hidden_wake, n_wake_stall, n_hold;
  int n_mode_off, n_div_stall, n_load_use, n_taken, n_contention;
  int sl_cycles [NUM_FU];
  int sl_periods [NUM_FU];
  fu_vec_t sleep_q1, sleep_q2, on_before;
  logic    ic_stall_q, dc_fill_q;
  int      since_miss = 0, n_late_wake = 0;

  always_ff @(posedge clk) begin
    cycles++;
    sleep_q1 <= fu_sleep;
    sleep_q2 <= sleep_q1;
    ic_stall_q <= dut.ic_stall;
    dc_fill_q  <= dut.u_dcache.filling;
    if (rst_n) begin
      if (dut.ic_stall && !ic_stall_q) n_imiss++;
      if (dut.u_dcache.filling && !dc_fill_q) n_dmiss++;
      // a unit that was on is switched off because of a miss
      if (cache_miss && ((~fu_sleep & dut.u_sleepctl.sleep_d &
                          (dut.u_sleepctl.need | fu_hold)) != '0))
        n_forced_off++;
      // an instruction executes on a unit that was asleep when it was fetched
      if (dut.ex_fire && !wake_stall && ((dut.ex_use & sleep_q2) != '0)) n_hidden_wake++;
      if (wake_stall) n_wake_stall++;
      // with pre-decode, a wake stall only follows a forced switch-off
      since_miss = cache_miss ? 0 : since_miss + 1;
      if (wake_stall && since_miss > 3) n_late_wake++;
      if (fu_hold != '0) n_hold++;
      if (fu_pg_enable != '1) n_mode_off++;
      if (dut.u_pipe.id_hazard && dut.div_busy) n_div_stall++;
      if (dut.u_pipe.id_hazard && dut.u_pipe.idex.valid && dut.u_pipe.idex.is_load) n_load_use++;
      if (dut.ex_fire && dut.u_pipe.br_taken) n_taken++;
      if (dut.im_req && dut.dm_req) n_contention++;
      if (mon_en)
        for (int f = 0; f < NUM_FU; f++) begin
          if (fu_sleep[f]) sl_cycles[f]++;
          if (sleep_q1[f] && !fu_sleep[f]) sl_periods[f]++;
        end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] prog [$];
  logic [31:0] e [NRES];
  bit          m [NRES];
  int          alu_periods [2];

  task automatic run(input bit flags);
    int start, hsum;
    test_program(prog, flags);
    foreach (mem[i]) mem[i] = '0;
    foreach (prog[i]) mem[i] = prog[i];
    for (int f = 0; f < NUM_FU; f++) begin sl_cycles[f] = 0; sl_periods[f] = 0; end
    rst_n = 1'b0;
    mon_en = 1'b0;
    mon_clear = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    mon_en <= 1'b1;
    start = cycles;
    while (mem[DONE_ADDR[13:2]] != 32'd1 && cycles - start < 50000) @(posedge clk);
    mon_en <= 1'b0;
    repeat (2) @(posedge clk);
    check(mem[DONE_ADDR[13:2]] == 32'd1, "program finished");
    expected(e, m);
    for (int i = 0; i < NRES; i++)
      if (m[i]) begin
        checks++;
        if (mem[RES_BASE[13:2] + i] !== e[i]) begin
          failures++;
          $display("FAIL flags=%0d: result[%0d] = %h, expected %h", flags, i,
                   mem[RES_BASE[13:2] + i], e[i]);
        end
      end
    check(fu_pg_enable == 4'hF, "mode register restored");
    for (int f = 0; f < NUM_FU; f++) begin
      // periods still open when counting stopped are not in the monitor
      check(mon_total[f] == 32'(sl_cycles[f]), $sformatf("monitor total sleep fu%0d", f));
      check(mon_periods[f] == 32'(sl_periods[f]), $sformatf("monitor periods fu%0d", f));
      check(mon_periods[f] > 0, $sformatf("fu%0d slept", f));
      hsum = 0;
      mon_fu = 2'(f);
      for (int b = 0; b < 64; b++) begin
        mon_bin = 6'(b);
        #1;
        hsum += int'(mon_count);
      end
      check(hsum == sl_periods[f], $sformatf("histogram sum fu%0d", f));
    end
    alu_periods[flags] = int'(mon_periods[FU_ALU]);
    $display("run flags=%0d: %0d cycles, sleep periods ALU %0d SHIFT %0d MULT %0d DIV %0d",
             flags, cycles - start, mon_periods[0], mon_periods[1], mon_periods[2],
             mon_periods[3]);
  endtask

  initial begin
    lat_cnt = 0;
    m_ack = 1'b0;
    m_rdata = '0;
    mon_fu = '0;
    mon_bin = '0;
    run(1'b0);
    run(1'b1);
    check(alu_periods[1] < alu_periods[0], "PG-cancel flags reduce ALU sleep periods");
    $display("mechanisms: imiss %0d dmiss %0d forced_off %0d hidden_wake %0d wake_stall %0d hold %0d mode_off %0d div_stall %0d load_use %0d taken %0d contention %0d",
             n_imiss, n_dmiss, n_forced_off, n_hidden_wake, n_wake_stall, n_hold,
             n_mode_off, n_div_stall, n_load_use, n_taken, n_contention);
    check(n_imiss > 0, "I-cache miss");
    check(n_dmiss > 0, "D-cache miss");
    check(n_forced_off > 0, "forced switch-off on a cache miss");
    check(n_hidden_wake > 0, "pre-decode wake-up hidden");
    check(n_wake_stall > 0, "wake stall");
    check(n_late_wake == 0, $sformatf("no wake stall away from a cache miss (%0d seen)", n_late_wake));
    check(n_hold > 0, "PG-cancel hold");
    check(n_mode_off > 0, "mode register disable");
    check(n_div_stall > 0, "divide interlock");
    check(n_load_use > 0, "load-use interlock");
    check(n_taken > 0, "taken branch");
    check(n_contention > 0, "bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

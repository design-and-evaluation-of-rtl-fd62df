// tb_frpg_pipeline: runs the shared test program on the pipeline alone.
//
// Instruction and data memories are ideal (combinational read, no stall),
// so this exercises decode, forwarding, interlocks, branches and the FUs.
// The rails of the gated units are driven at random (each up with
// probability 3/4 per cycle, the divider kept up while it computes), so
// wake stalls and output isolation happen constantly; the program results
// must still match. It runs twice: plain code and PG-cancel flagged code.
module tb_frpg_pipeline;
  import frpg_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        imem_req, dmem_req, dmem_we, ex_fire, ex_cancel, div_busy, wake_stall, mode_we;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  fu_vec_t     if_use, id_use, ex_use, vdd_ok, mode_wdata, pg_enable, rnd;
  logic        div_busy_q;

  logic [31:0] mem [4096];
  int checks = 0, failures = 0, cycles = 0, wake_stalls = 0, isolated = 0;
  logic [31:0] prog [$];
  logic [31:0] e [NRES];
  bit          m [NRES];

  frpg_pipeline dut (
    .clk, .rst_n, .imem_req, .imem_addr, .imem_rdata, .imem_stall(1'b0),
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_be, .dmem_rdata,
    .dmem_stall(1'b0), .if_use, .id_use, .ex_use, .ex_fire, .ex_cancel,
    .div_busy, .vdd_ok, .wake_stall, .mode_we, .mode_wdata, .pg_enable
  );

  assign imem_rdata = mem[imem_addr[13:2]];
  assign dmem_rdata = mem[dmem_addr[13:2]];

  always_ff @(posedge clk) begin
    if (dmem_req && dmem_we)
      for (int b = 0; b < 4; b++)
        if (dmem_be[b]) mem[dmem_addr[13:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
    if (mode_we) pg_enable <= mode_wdata;
    for (int f = 0; f < NUM_FU; f++) rnd[f] <= ($urandom_range(3) != 0);
    div_busy_q <= div_busy;
    cycles++;
    if (wake_stall) wake_stalls++;
    if (ex_use != '0 && (ex_use & ~vdd_ok) != '0) isolated++;
  end

  always_comb begin
    vdd_ok = rnd;
    vdd_ok[FU_DIV] = rnd[FU_DIV] | div_busy | div_busy_q;
  end

  task automatic run(input bit flags);
    int start;
    test_program(prog, flags);
    foreach (mem[i]) mem[i] = '0;
    foreach (prog[i]) mem[i] = prog[i];
    pg_enable = '1;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start = cycles;
    while (mem[DONE_ADDR[13:2]] != 32'd1 && cycles - start < 20000) @(posedge clk);
    checks++;
    if (mem[DONE_ADDR[13:2]] != 32'd1) begin
      failures++;
      $display("FAIL: program did not finish (flags=%0d)", flags);
    end
    expected(e, m);
    for (int i = 0; i < NRES; i++) begin
      if (!m[i]) continue;
      checks++;
      if (mem[RES_BASE[13:2] + i] !== e[i]) begin
        failures++;
        $display("FAIL flags=%0d: result[%0d] = %h, expected %h", flags, i,
                 mem[RES_BASE[13:2] + i], e[i]);
      end
    end
    checks++;
    if (pg_enable != 4'hF) begin
      failures++;
      $display("FAIL: mode register not restored (%b)", pg_enable);
    end
    $display("run flags=%0d: %0d cycles", flags, cycles - start);
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    checks++;
    if (wake_stalls == 0 || isolated == 0) begin
      failures++;
      $display("FAIL: wake stall never exercised");
    end
    $display("wake stalls %0d", wake_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

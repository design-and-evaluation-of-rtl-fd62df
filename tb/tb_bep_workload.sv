// tb_bep_workload: power-gating policy comparison on the full core at its
// default sizes, in the way the break-even-point (BEP) metrics are meant to
// be used.
//
// The workload is a small ADPCM-like kernel: for each of NSAMP samples it
// takes the difference to the previous sample (ALU), scales it with an
// arithmetic shift (shifter), accumulates it with a data-dependent
// correction (branch), multiplies the accumulator every 8th sample
// (multiplier) and takes its remainder every 16th sample (divider). It runs
// four times on the same data:
//   * No-PG      - the program clears the mode control register first;
//   * HW-PG      - plain code, gating in hardware only;
//   * SW-PG 25C  - PG-cancel flags chosen for the BEP set of a 25 C chip;
//   * SW-PG 55C  - flags chosen for the BEP set of a 55 C chip.
// The flags are set here, by the compile-time idle-time analysis: on the
// control-flow graph, each instruction s and unit f carry the expected
// number of cycles OUT_D[s][f] until f is used again, found by iterating
//   IN_D[s][f]  = TP[s][f]*OUT_D[s][f] + TD[s][f]
//   OUT_D[s][f] = q*IN_D[next1][f] + (1-q)*IN_D[next2][f]   (two successors)
//               = IN_D[next][f]                              (one successor)
// with TP = TD = 0 where s uses f and 1 (one pipeline cycle) elsewhere,
// IN_D = 0 at the exit and branch probability q = 0.5. An instruction that
// uses f gets the flag when OUT_D[s][f] < BEP[f]. The analysis is first
// checked against a worked example (an 8-node graph with known OUT_D).
//
// Checked: the analysis example, every result word of every run, no sleep
// period at all under No-PG, some flags set by each SW-PG run, and the
// effect of the flags measured by the core's sleep monitor: for every unit
// the number of sleep periods shorter than the BEP never rises above HW-PG;
// for the shifter at 25 C the flags cut its sleep periods, lower BEPmissCR
// (sum over short periods of (BEP-i)*NS[i] / total sleep cycles) and raise
// BEPhitCR (sum over long periods of (i-BEP)*NS[i] / total sleep cycles).
// BEPmissCR is a ratio to the remaining sleep time, so with an unsuitable
// BEP set it can rise although short sleeps became fewer; this is printed,
// not checked. The BEPmissCR and BEPhitCR of every unit and run are
// printed.
module tb_bep_workload;
  import frpg_pkg::*;
  import tb_prog_pkg::*;

  localparam int MEM_LAT   = 4;
  localparam int NSAMP     = 48;
  localparam int DATA_BASE = 32'h1800;
  localparam int OUT_BASE  = 32'h2000;
  localparam int MAXN      = 64;
  localparam int BEP25 [NUM_FU] = '{56, 47, 28, 11};
  localparam int BEP55 [NUM_FU] = '{21, 21, 11, 4};

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

  int checks = 0, failures = 0, cycles = 0;
  always_ff @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ analysis
  // Graph: node n has successor s1[n] (and s2[n] when two[n]); -1 is exit.
  real out_d [MAXN][NUM_FU];

  function automatic void idle_analysis(input int n, input fu_vec_t uses [MAXN],
                                        input int s1 [MAXN], input int s2 [MAXN],
                                        input bit two [MAXN]);
    real in_d [MAXN][NUM_FU];
    real a, b;
    for (int s = 0; s < n; s++)
      for (int f = 0; f < NUM_FU; f++) begin
        in_d[s][f]  = uses[s][f] ? 0.0 : 1.0;
        out_d[s][f] = 0.0;
      end
    repeat (2000)
      for (int s = n - 1; s >= 0; s--)
        for (int f = 0; f < NUM_FU; f++) begin
          a = (s1[s] < 0) ? 0.0 : in_d[s1[s]][f];
          b = (s2[s] < 0) ? 0.0 : in_d[s2[s]][f];
          out_d[s][f] = two[s] ? 0.5 * a + 0.5 * b : a;
          in_d[s][f]  = uses[s][f] ? 0.0 : out_d[s][f] + 1.0;
        end
  endfunction

  // Worked example: Add1 Add2 Shift1 Mult1 Branch1 -> (Mult2 -> Add3 | Add3),
  // Add3 -> return -> exit; the branch and the return use the ALU.
  task automatic check_example();
    fu_vec_t uses [MAXN];
    int      s1 [MAXN], s2 [MAXN];
    bit      two [MAXN];
    real     want [8][NUM_FU] = '{'{0.0, 1.0, 2.0, 6.5}, '{2.0, 0.0, 1.0, 5.5},
                                  '{1.0, 4.5, 0.0, 4.5}, '{0.0, 3.5, 2.0, 3.5},
                                  '{0.5, 2.5, 1.0, 2.5}, '{0.0, 2.0, 2.0, 2.0},
                                  '{0.0, 1.0, 1.0, 1.0}, '{0.0, 0.0, 0.0, 0.0}};
    foreach (uses[i]) begin uses[i] = '0; s1[i] = -1; s2[i] = -1; two[i] = 1'b0; end
    uses = '{0: 4'b0001, 1: 4'b0001, 2: 4'b0010, 3: 4'b0100, 4: 4'b0001,
            5: 4'b0100, 6: 4'b0001, 7: 4'b0001, default: 4'b0000};
    for (int i = 0; i < 7; i++) s1[i] = i + 1;
    s1[4] = 5; s2[4] = 6; two[4] = 1'b1;
    idle_analysis(8, uses, s1, s2, two);
    for (int s = 0; s < 8; s++)
      for (int f = 0; f < NUM_FU; f++)
        check(out_d[s][f] > want[s][f] - 0.01 && out_d[s][f] < want[s][f] + 0.01,
              $sformatf("example OUT_D[%0d][%0d] = %f, expected %f", s, f,
                        out_d[s][f], want[s][f]));
  endtask

  // ------------------------------------------------------------ workload
  localparam int LOOP = 8, L1 = 14, L2 = 26, DONE_PC = 34;

  function automatic logic [31:0] cop0_mt(input int rt, input int rd);
    return {OP_COP0, CP0_MT, 5'(rt), 5'(rd), 11'd0};
  endfunction

  function automatic void kernel(output logic [31:0] p [$], input logic [3:0] mode);
    p = {};
    p.push_back(i_type(OP_ORI, 9, 0, int'(mode)));          //  0 ori  $9,$0,mode
    p.push_back(cop0_mt(9, 22));                             //  1 mtc0 $9,$22
    p.push_back(i_type(OP_ORI, 1, 0, DATA_BASE));            //  2 ori  $1,$0,data
    p.push_back(i_type(OP_ORI, 6, 0, OUT_BASE));             //  3 ori  $6,$0,out
    p.push_back(i_type(OP_ORI, 2, 0, NSAMP));                //  4 ori  $2,$0,n
    p.push_back(r_type(FN_OR, 3, 0, 0));                     //  5 or   $3,$0,$0
    p.push_back(r_type(FN_OR, 4, 0, 0));                     //  6 or   $4,$0,$0
    p.push_back(i_type(OP_ORI, 7, 0, 3));                    //  7 ori  $7,$0,3
    p.push_back(i_type(OP_LW, 10, 1, 0));                    //  8 lw   $10,0($1)
    p.push_back(r_type(FN_SUBU, 11, 10, 3));                 //  9 subu $11,$10,$3
    p.push_back(r_type(FN_SRA, 12, 0, 11, 2));               // 10 sra  $12,$11,2
    p.push_back(i_type(OP_REGIMM, 1, 11, L1 - 12));          // 11 bgez $11,L1
    p.push_back(r_type(FN_ADDU, 4, 4, 12));                  // 12 addu $4,$4,$12
    p.push_back(r_type(FN_SUBU, 4, 4, 7));                   // 13 subu $4,$4,$7
    p.push_back(i_type(OP_ANDI, 13, 2, 7));                  // 14 L1: andi $13,$2,7
    p.push_back(i_type(OP_BNE, 0, 13, L2 - 16));             // 15 bne  $13,$0,L2
    p.push_back(r_type(FN_OR, 3, 10, 0));                    // 16 or   $3,$10,$0
    p.push_back(r_type(FN_MULT, 0, 4, 7));                   // 17 mult $4,$7
    p.push_back(r_type(FN_MFLO, 14, 0, 0));                  // 18 mflo $14
    p.push_back(i_type(OP_SW, 14, 6, 16'h400));              // 19 sw   $14,0x400($6)
    p.push_back(i_type(OP_ANDI, 15, 2, 15));                 // 20 andi $15,$2,15
    p.push_back(i_type(OP_BNE, 0, 15, L2 - 22));             // 21 bne  $15,$0,L2
    p.push_back(32'd0);                                      // 22 nop
    p.push_back(r_type(FN_DIVU, 0, 4, 7));                   // 23 divu $4,$7
    p.push_back(r_type(FN_MFHI, 16, 0, 0));                  // 24 mfhi $16
    p.push_back(i_type(OP_SW, 16, 6, 16'h800));              // 25 sw   $16,0x800($6)
    p.push_back(i_type(OP_SW, 4, 6, 0));                     // 26 L2: sw $4,0($6)
    p.push_back(i_type(OP_ADDIU, 6, 6, 4));                  // 27 addiu $6,$6,4
    p.push_back(i_type(OP_ADDIU, 1, 1, 4));                  // 28 addiu $1,$1,4
    p.push_back(i_type(OP_ADDIU, 2, 2, -1));                 // 29 addiu $2,$2,-1
    p.push_back(i_type(OP_BGTZ, 0, 2, LOOP - 31));           // 30 bgtz $2,LOOP
    p.push_back(32'd0);                                      // 31 nop
    p.push_back(i_type(OP_ORI, 9, 0, 1));                    // 32 ori  $9,$0,1
    p.push_back(i_type(OP_SW, 9, 0, DONE_ADDR));             // 33 sw   $9,done
    p.push_back(j_type(OP_J, DONE_PC));                      // 34 j    34
    p.push_back(32'd0);                                      // 35 nop
  endfunction

  function automatic logic [31:0] sample(input int i);
    return 32'((i * 37) % 101 - 50);
  endfunction

  // Build the graph of the kernel (delay slots: a branch's successor is its
  // slot, and the slot has the two successors) and flag by the analysis.
  function automatic int set_flags(ref logic [31:0] p [$], input int bep [NUM_FU]);
    fu_vec_t uses [MAXN];
    int      s1 [MAXN], s2 [MAXN];
    bit      two [MAXN];
    int      n, nflag;
    fu_class_t c;
    logic [5:0] op;
    n = DONE_PC;   // nodes 0..33; the store of the done word leads to exit
    foreach (uses[i]) begin uses[i] = '0; s1[i] = -1; s2[i] = -1; two[i] = 1'b0; end
    for (int s = 0; s < n; s++) begin
      c      = classify_instr(p[s]);
      uses[s] = c.fu_use;
      s1[s]  = (s + 1 < n) ? s + 1 : -1;
    end
    // delay slots of the conditional branches: taken target or fall-through
    s1[12] = L1; s2[12] = 13; two[12] = 1'b1;
    s1[16] = L2; s2[16] = 17; two[16] = 1'b1;
    s1[22] = L2; s2[22] = 23; two[22] = 1'b1;
    s1[31] = LOOP; s2[31] = 32; two[31] = 1'b1;
    idle_analysis(n, uses, s1, s2, two);
    nflag = 0;
    for (int s = 0; s < n; s++) begin
      op = p[s][31:26];
      if (uses[s] == '0) continue;
      // only arithmetic/logic, shift, multiply and divide carry the flag
      if (op inside {OP_REGIMM, OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ}) continue;
      for (int f = 0; f < NUM_FU; f++)
        if (uses[s][f] && out_d[s][f] < real'(bep[f])) begin
          p[s] = pgc(p[s]);
          nflag++;
        end
    end
    return nflag;
  endfunction

  // ------------------------------------------------------------ runs
  localparam int NRUN = 4;
  string       rname [NRUN] = '{"No-PG", "HW-PG", "SW-PG 25C", "SW-PG 55C"};
  real         miss_cr [NRUN][2][NUM_FU];   // [run][BEP set][unit]
  real         hit_cr  [NRUN][2][NUM_FU];
  int          short_p [NRUN][2][NUM_FU];
  int          periods [NRUN][NUM_FU];
  logic [31:0] prog [$];

  task automatic run(input int r);
    int start, nflag;
    int ns [64];
    int bep, msum, isum, nsh, total;
    logic [31:0] prev, x, d, acc;
    int k;
    kernel(prog, (r == 0) ? 4'h0 : 4'hF);
    nflag = 0;
    if (r == 2) nflag = set_flags(prog, BEP25);
    if (r == 3) nflag = set_flags(prog, BEP55);
    if (r >= 2) check(nflag > 0, $sformatf("%s: analysis set flags (%0d)", rname[r], nflag));
    foreach (mem[i]) mem[i] = '0;
    foreach (prog[i]) mem[i] = prog[i];
    for (int i = 0; i < NSAMP; i++) mem[DATA_BASE / 4 + i] = sample(i);
    rst_n = 1'b0;
    mon_en = 1'b0;
    mon_clear = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // count from a few cycles after the mode register has been written
    while (!dut.mode_we) @(posedge clk);
    repeat (3) @(posedge clk);
    mon_clear <= 1'b1;
    @(posedge clk);
    mon_clear <= 1'b0;
    mon_en <= 1'b1;
    start = cycles;
    while (mem[DONE_ADDR[13:2]] != 32'd1 && cycles - start < 100000) @(posedge clk);
    mon_en <= 1'b0;
    repeat (2) @(posedge clk);
    check(mem[DONE_ADDR[13:2]] == 32'd1, $sformatf("%s: program finished", rname[r]));
    // expected results, worked out from the kernel's definition
    prev = '0; acc = '0; k = 0;
    for (int c = NSAMP; c >= 1; c--) begin
      x   = sample(NSAMP - c);
      d   = x - prev;
      acc = acc + 32'($signed(d) >>> 2);
      if ($signed(d) < 0) acc = acc - 3;
      prev = x;
      if ((c & 7) == 0) begin
        check(mem[(OUT_BASE + 16'h400) / 4 + k] == acc * 3,
              $sformatf("%s: product %0d", rname[r], k));
        if ((c & 15) == 0)
          check(mem[(OUT_BASE + 16'h800) / 4 + k] == acc % 3,
                $sformatf("%s: remainder %0d", rname[r], k));
      end
      check(mem[OUT_BASE / 4 + k] == acc, $sformatf("%s: accumulator %0d", rname[r], k));
      k++;
    end
    // sleep-period histograms
    for (int f = 0; f < NUM_FU; f++) begin
      mon_fu = 2'(f);
      for (int b = 0; b < 64; b++) begin
        mon_bin = 6'(b);
        #1;
        ns[b] = int'(mon_count);
      end
      periods[r][f] = int'(mon_periods[f]);
      total = int'(mon_total[f]);
      for (int set = 0; set < 2; set++) begin
        bep = (set == 0) ? BEP25[f] : BEP55[f];
        msum = 0; isum = 0; nsh = 0;
        for (int i = 0; i <= bep; i++) begin
          msum += (bep - i) * ns[i];
          isum += i * ns[i];
          nsh  += ns[i];
        end
        miss_cr[r][set][f] = (total == 0) ? 0.0 : real'(msum) / real'(total);
        hit_cr[r][set][f]  = (total == 0) ? 0.0 :
                             real'(total - isum - bep * (periods[r][f] - nsh)) / real'(total);
        short_p[r][set][f] = 0;
        for (int i = 0; i < bep; i++) short_p[r][set][f] += ns[i];
      end
      $display("%-10s fu%0d: %5d sleep cycles in %4d periods, BEPmissCR/BEPhitCR 25C %5.2f/%5.2f 55C %5.2f/%5.2f",
               rname[r], f, total, periods[r][f], miss_cr[r][0][f], hit_cr[r][0][f],
               miss_cr[r][1][f], hit_cr[r][1][f]);
    end
    $display("%-10s %0d cycles, %0d flags", rname[r], cycles - start, nflag);
  endtask

  initial begin
    lat_cnt = 0;
    m_ack = 1'b0;
    m_rdata = '0;
    mon_fu = '0;
    mon_bin = '0;
    check_example();
    for (int r = 0; r < NRUN; r++) run(r);
    for (int f = 0; f < NUM_FU; f++)
      check(periods[0][f] == 0, $sformatf("No-PG: fu%0d never sleeps", f));
    for (int r = 2; r < NRUN; r++)
      for (int f = 0; f < NUM_FU; f++) begin
        check(short_p[r][r-2][f] <= short_p[1][r-2][f],
              $sformatf("%s: fu%0d short sleeps not above HW-PG", rname[r], f));
      end
    check(miss_cr[2][0][FU_SHIFT] < miss_cr[1][0][FU_SHIFT],
          "SW-PG 25C lowers the shifter's BEPmissCR");
    check(hit_cr[2][0][FU_SHIFT] > hit_cr[1][0][FU_SHIFT],
          "SW-PG 25C raises the shifter's BEPhitCR");
    check(periods[2][FU_SHIFT] < periods[1][FU_SHIFT],
          "SW-PG 25C keeps the shifter on across the loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

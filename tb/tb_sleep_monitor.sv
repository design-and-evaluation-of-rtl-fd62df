// tb_sleep_monitor: random sleep patterns (short and long periods, some
// longer than the last bin) on four units; histogram, totals and period
// counts compared with counts kept here; then clear. Also computes
// BEPmissCR/BEPhitCR numerators from the counters and from the reference.
module tb_sleep_monitor;
  import frpg_pkg::*;
  localparam int BINS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, clear = 1'b0;
  fu_vec_t sleep = '0;
  logic [1:0] rd_fu = '0;
  logic [3:0] rd_bin = '0;
  logic [31:0] rd_count;
  logic [31:0] total_sleep [NUM_FU];
  logic [31:0] periods [NUM_FU];
  int ref_hist [NUM_FU][BINS];
  int ref_total [NUM_FU], ref_periods [NUM_FU], run [NUM_FU];
  int checks = 0, failures = 0;

  sleep_monitor #(.BINS(BINS)) dut (.clk, .rst_n, .en, .clear, .sleep, .rd_fu, .rd_bin,
                                     .rd_count, .total_sleep, .periods);

  initial begin
    int left [NUM_FU];
    for (int f = 0; f < NUM_FU; f++) begin
      ref_total[f] = 0; ref_periods[f] = 0; run[f] = 0; left[f] = 0;
      for (int b = 0; b < BINS; b++) ref_hist[f][b] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); en = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      for (int f = 0; f < NUM_FU; f++) begin
        if (left[f] == 0) begin
          left[f] = ($urandom_range(3) == 0) ? $urandom_range(40, 1) : $urandom_range(6, 1);
          sleep[f] = ~sleep[f];
        end
        left[f]--;
      end
      @(posedge clk);
      for (int f = 0; f < NUM_FU; f++) begin
        if (sleep[f]) begin run[f]++; ref_total[f]++; end
        else if (run[f] != 0) begin
          ref_hist[f][(run[f] >= BINS - 1) ? BINS - 1 : run[f]]++;
          ref_periods[f]++;
          run[f] = 0;
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
    @(negedge clk);
    for (int f = 0; f < NUM_FU; f++) begin
      int bep, miss_hw, miss_ref;
      checks += 2;
      if (total_sleep[f] != 32'(ref_total[f])) begin failures++; $display("FAIL total fu%0d %0d exp %0d", f, total_sleep[f], ref_total[f]); end
      if (periods[f] != 32'(ref_periods[f])) begin failures++; $display("FAIL periods fu%0d %0d exp %0d", f, periods[f], ref_periods[f]); end
      rd_fu = 2'(f);
      bep = 5; miss_hw = 0; miss_ref = 0;
      for (int b = 0; b < BINS; b++) begin
        rd_bin = 4'(b); #1;
        checks++;
        if (rd_count != 32'(ref_hist[f][b])) begin failures++; $display("FAIL hist fu%0d bin %0d: %0d exp %0d", f, b, rd_count, ref_hist[f][b]); end
        if (b <= bep) begin miss_hw += (bep - b) * int'(rd_count); miss_ref += (bep - b) * ref_hist[f][b]; end
      end
      checks++;
      if (miss_hw != miss_ref || miss_hw == 0) begin failures++; $display("FAIL BEP miss numerator fu%0d", f); end
    end
    // clear
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int f = 0; f < NUM_FU; f++) begin
      rd_fu = 2'(f); rd_bin = 4'd1; #1;
      checks++;
      if (total_sleep[f] != 0 || periods[f] != 0 || rd_count != 0) begin failures++; $display("FAIL clear fu%0d", f); end
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

// sleep_monitor: hardware counters of the sleep periods of each unit.
//
// For every power-gated functional unit it measures the length of each
// sleep period in clock cycles and keeps a histogram NS[i] of how many
// periods lasted i cycles, together with the total number of sleep cycles
// and of sleep periods. From these, software computes the break-even-point
// miss and hit cycle rates of a run:
//   BEPmissCR = sum_{i<=BEP} (BEP-i)*NS[i] / TotalSleepCycle
//   BEPhitCR  = sum_{i>BEP}  (i-BEP)*NS[i] / TotalSleepCycle
// Periods of BINS-1 cycles or more share the last bin; the hit sum over
// them follows from the totals: sum_{i>BEP} (i-BEP)*NS[i] = Total -
// sum_{i<=BEP} i*NS[i] - BEP*(Periods - sum_{i<=BEP} NS[i]).
// A period is recorded when it ends. The bin count and counter width are
// this design's choices (64 bins cover every break-even point up to 63
// cycles).
//
// Interface: sleep is the per-unit sleep vector; counting happens while en
// is high; clear zeroes everything. rd_fu/rd_bin select a histogram bin,
// read combinationally on rd_count; total_sleep and periods are per unit.
module sleep_monitor
  import frpg_pkg::*;
#(
  parameter int unsigned BINS  = 64,
  parameter int unsigned CNT_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clear,
  input  fu_vec_t                 sleep,
  input  logic [1:0]              rd_fu,
  input  logic [$clog2(BINS)-1:0] rd_bin,
  output logic [CNT_W-1:0]        rd_count,
  output logic [CNT_W-1:0]        total_sleep [NUM_FU],
  output logic [CNT_W-1:0]        periods     [NUM_FU]
);

  localparam int unsigned BW = $clog2(BINS);

  logic [CNT_W-1:0] hist [NUM_FU][BINS];
  logic [CNT_W-1:0] run  [NUM_FU];
  logic [BW-1:0]    bin  [NUM_FU];

  always_comb begin
    for (int f = 0; f < NUM_FU; f++)
      bin[f] = (run[f] >= CNT_W'(BINS - 1)) ? BW'(BINS - 1) : run[f][BW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NUM_FU; f++) begin
        run[f]         <= '0;
        total_sleep[f] <= '0;
        periods[f]     <= '0;
        for (int i = 0; i < BINS; i++) hist[f][i] <= '0;
      end
    end else if (clear) begin
      for (int f = 0; f < NUM_FU; f++) begin
        run[f]         <= '0;
        total_sleep[f] <= '0;
        periods[f]     <= '0;
        for (int i = 0; i < BINS; i++) hist[f][i] <= '0;
      end
    end else if (en) begin
      for (int f = 0; f < NUM_FU; f++) begin
        if (sleep[f]) begin
          run[f]         <= run[f] + 1'b1;
          total_sleep[f] <= total_sleep[f] + 1'b1;
        end else if (run[f] != '0) begin
          hist[f][bin[f]] <= hist[f][bin[f]] + 1'b1;
          periods[f]      <= periods[f] + 1'b1;
          run[f]          <= '0;
        end
      end
    end
  end

  assign rd_count = hist[rd_fu][rd_bin];

endmodule

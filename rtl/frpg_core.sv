// frpg_core: MIPS R3000-compatible embedded core with fine-grained
// run-time power gating of its functional units.
//
// The ALU, the shifter, the multiplier and the divider each sit in a power
// domain of their own, switched by a power_switch. The sleep_controller
// turns a unit on when the pre-decoder sees, in the fetch stage, an
// instruction that will use it, and turns it off again after the operation,
// so each unit is powered only around the instructions that need it. Two
// software controls tune this: the mode control register (pg_mode_reg,
// COP0 register 22) enables or disables gating per unit, and the PG-cancel
// flag in an arithmetic instruction keeps its unit on after the operation.
// Any cache miss (instruction fetch or load refill) forces all enabled
// units off; a store waiting on the write-through bus does not. A
// sleep_monitor counts the sleep periods of every unit for
// break-even-point analysis.
//
// Blocks: frpg_pipeline (5 stages, the four units inside), two l1_cache
// instances (8 KB, 2-way, 64-byte lines; instruction and data), a
// mem_arbiter onto one external memory bus, sleep_controller, pg_mode_reg,
// four power_switch models, sleep_monitor.
//
// External interface: one word-wide memory bus (m_req held with a stable
// address until m_ack; reads return m_rdata with m_ack), the per-unit sleep
// and vdd_ok vectors (what a supply monitor of the gated domains would
// observe), and the sleep-monitor read port.
module frpg_core
  import frpg_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned WAKE_CYCLES = 1,
  parameter int unsigned HIST_BINS   = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // external memory bus
  output logic                         m_req,
  output logic                         m_we,
  output logic [31:0]                  m_addr,
  output logic [31:0]                  m_wdata,
  output logic [3:0]                   m_be,
  input  logic                         m_ack,
  input  logic [31:0]                  m_rdata,
  // power domains
  output fu_vec_t                      fu_sleep,
  output fu_vec_t                      fu_vdd_ok,
  output fu_vec_t                      fu_pg_enable,
  output fu_vec_t                      fu_hold,
  output logic                         cache_miss,
  output logic                         wake_stall,
  // sleep-period counters
  input  logic                         mon_en,
  input  logic                         mon_clear,
  input  logic [1:0]                   mon_fu,
  input  logic [$clog2(HIST_BINS)-1:0] mon_bin,
  output logic [31:0]                  mon_count,
  output logic [31:0]                  mon_total [NUM_FU],
  output logic [31:0]                  mon_periods [NUM_FU]
);

  // Pipeline <-> caches
  logic        ic_req, ic_stall, dc_req, dc_we, dc_stall;
  logic [31:0] ic_addr, ic_rdata, dc_addr, dc_wdata, dc_rdata;
  logic [3:0]  dc_be;
  // Caches <-> arbiter
  logic        im_req, im_we, im_ack, dm_req, dm_we, dm_ack;
  logic [31:0] im_addr, im_wdata, im_rdata, dm_addr, dm_wdata, dm_rdata;
  logic [3:0]  im_be, dm_be;
  // Power gating
  fu_vec_t     if_use, id_use, ex_use;
  logic        ex_fire, ex_cancel, div_busy, mode_we;
  fu_vec_t     mode_wdata;

  // Only a line refill forces the units off: a store waiting for the
  // write-through bus is a short stall that leaves them as they are.
  assign cache_miss = ic_stall | (dc_stall & ~dc_we);

  frpg_pipeline #(.RESET_PC(RESET_PC)) u_pipe (
    .clk        (clk),
    .rst_n      (rst_n),
    .imem_req   (ic_req),
    .imem_addr  (ic_addr),
    .imem_rdata (ic_rdata),
    .imem_stall (ic_stall),
    .dmem_req   (dc_req),
    .dmem_we    (dc_we),
    .dmem_addr  (dc_addr),
    .dmem_wdata (dc_wdata),
    .dmem_be    (dc_be),
    .dmem_rdata (dc_rdata),
    .dmem_stall (dc_stall),
    .if_use     (if_use),
    .id_use     (id_use),
    .ex_use     (ex_use),
    .ex_fire    (ex_fire),
    .ex_cancel  (ex_cancel),
    .div_busy   (div_busy),
    .vdd_ok     (fu_vdd_ok),
    .wake_stall (wake_stall),
    .mode_we    (mode_we),
    .mode_wdata (mode_wdata),
    .pg_enable  (fu_pg_enable)
  );

  l1_cache #(.SIZE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .WRITE_EN(1'b0)) u_icache (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (ic_req),
    .we        (1'b0),
    .addr      (ic_addr),
    .wdata     (32'd0),
    .be        (4'h0),
    .rdata     (ic_rdata),
    .stall     (ic_stall),
    .mem_req   (im_req),
    .mem_we    (im_we),
    .mem_addr  (im_addr),
    .mem_wdata (im_wdata),
    .mem_be    (im_be),
    .mem_ack   (im_ack),
    .mem_rdata (im_rdata)
  );

  l1_cache #(.SIZE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .WRITE_EN(1'b1)) u_dcache (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (dc_req),
    .we        (dc_we),
    .addr      (dc_addr),
    .wdata     (dc_wdata),
    .be        (dc_be),
    .rdata     (dc_rdata),
    .stall     (dc_stall),
    .mem_req   (dm_req),
    .mem_we    (dm_we),
    .mem_addr  (dm_addr),
    .mem_wdata (dm_wdata),
    .mem_be    (dm_be),
    .mem_ack   (dm_ack),
    .mem_rdata (dm_rdata)
  );

  mem_arbiter u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .i_req   (im_req),
    .i_we    (im_we),
    .i_addr  (im_addr),
    .i_wdata (im_wdata),
    .i_be    (im_be),
    .i_ack   (im_ack),
    .i_rdata (im_rdata),
    .d_req   (dm_req),
    .d_we    (dm_we),
    .d_addr  (dm_addr),
    .d_wdata (dm_wdata),
    .d_be    (dm_be),
    .d_ack   (dm_ack),
    .d_rdata (dm_rdata),
    .m_req   (m_req),
    .m_we    (m_we),
    .m_addr  (m_addr),
    .m_wdata (m_wdata),
    .m_be    (m_be),
    .m_ack   (m_ack),
    .m_rdata (m_rdata)
  );

  pg_mode_reg u_mode (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (mode_we),
    .wdata     (mode_wdata),
    .pg_enable (fu_pg_enable)
  );

  sleep_controller u_sleepctl (
    .clk        (clk),
    .rst_n      (rst_n),
    .pg_enable  (fu_pg_enable),
    .if_use     (if_use),
    .id_use     (id_use),
    .ex_use     (ex_use),
    .ex_fire    (ex_fire),
    .ex_cancel  (ex_cancel),
    .div_busy   (div_busy),
    .cache_miss (cache_miss),
    .sleep      (fu_sleep),
    .hold       (fu_hold)
  );

  for (genvar f = 0; f < NUM_FU; f++) begin : g_domain
    power_switch #(.WAKE_CYCLES(WAKE_CYCLES)) u_sw (
      .clk    (clk),
      .rst_n  (rst_n),
      .sleep  (fu_sleep[f]),
      .vdd_ok (fu_vdd_ok[f])
    );
  end

  sleep_monitor #(.BINS(HIST_BINS), .CNT_W(32)) u_mon (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (mon_en),
    .clear       (mon_clear),
    .sleep       (fu_sleep),
    .rd_fu       (mon_fu),
    .rd_bin      (mon_bin),
    .rd_count    (mon_count),
    .total_sleep (mon_total),
    .periods     (mon_periods)
  );

endmodule

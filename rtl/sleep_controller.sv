// sleep_controller: instruction-by-instruction sleep control of the four
// power-gated functional units.
//
// Each unit has its own sleep signal (sleep[f] high = power switch open).
// A unit is woken as soon as any instruction that will use it is seen: in
// the fetch stage through the pre-decoder, or still waiting in decode or
// execute. A unit is put to sleep again once no instruction in those stages
// needs it, i.e. right after its operation has left execute (the shutdown
// is decided while the instruction is in the memory stage). Two software
// controls modify this:
//   * pg_enable (mode control register): a unit whose bit is clear is never
//     switched off;
//   * the PG-cancel flag: when an instruction executes on unit f, its flag
//     is remembered in hold[f]; while hold[f] is set the unit stays on
//     after the operation. The next instruction on f without the flag
//     clears it again.
// While any cache miss stalls the core, every enabled unit is forced off
// (the hold bits are cleared too), except a divider that is still
// computing, whose state would otherwise be lost. Keeping a busy divider
// powered and clearing the hold bits are this design's choices.
//
// Timing: sleep is registered. An instruction seen in fetch in cycle t
// releases sleep at t+1; with a one-cycle power switch the unit is ready
// at t+2, when the instruction is in execute.
module sleep_controller
  import frpg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fu_vec_t pg_enable,   // mode control register
  input  fu_vec_t if_use,      // pre-decoded use of the fetched instruction
  input  fu_vec_t id_use,      // use of the instruction in decode
  input  fu_vec_t ex_use,      // use of the instruction in execute
  input  logic    ex_fire,     // the execute-stage instruction completes now
  input  logic    ex_cancel,   // its PG-cancel flag
  input  logic    div_busy,    // the divider is still computing
  input  logic    cache_miss,  // the core is stalled on a cache miss
  output fu_vec_t sleep,
  output fu_vec_t hold
);

  fu_vec_t need, busy_mask, sleep_d;  // sleep_d: next sleep vector

  always_comb begin
    busy_mask         = '0;
    busy_mask[FU_DIV] = div_busy;
    need              = if_use | id_use | ex_use | busy_mask;
    if (cache_miss) sleep_d = pg_enable & ~busy_mask;
    else            sleep_d = pg_enable & ~(need | hold);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sleep <= '1;
      hold  <= '0;
    end else begin
      sleep <= sleep_d;
      if (cache_miss) begin
        hold <= '0;
      end else if (ex_fire) begin
        for (int f = 0; f < NUM_FU; f++)
          if (ex_use[f]) hold[f] <= ex_cancel;
      end
    end
  end

endmodule

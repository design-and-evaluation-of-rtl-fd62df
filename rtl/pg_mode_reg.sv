// pg_mode_reg: the power-gating mode control register.
//
// One enable bit per power-gated functional unit (bit order as in
// frpg_pkg::fu_e: ALU, shifter, multiplier, divider). A set bit lets the
// sleep controller switch that unit off; a clear bit keeps the unit powered
// at all times. Operating-system code writes the register with MTC0 to COP0
// register 22 and reads it with MFC0; the register number and the reset
// value (all units enabled, i.e. hardware power gating on) are this
// design's choices.
//
// Interface: we/wdata are sampled on the rising clock edge; pg_enable is the
// registered value and is read back unchanged.
module pg_mode_reg
  import frpg_pkg::*;
#(
  parameter fu_vec_t RESET_VALUE = '1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  fu_vec_t wdata,
  output fu_vec_t pg_enable
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pg_enable <= RESET_VALUE;
    else if (we) pg_enable <= wdata;
  end

endmodule

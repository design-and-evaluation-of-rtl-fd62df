// power_switch: behavioural model of the sleep transistor of one power
// domain and of the virtual supply rail it drives.
//
// This is not logic that would be synthesized: on silicon the part is a row
// of high-threshold header or footer transistors, inserted by the physical
// design flow, between the real supply and the virtual supply of a
// functional unit. The model only reproduces what the digital side sees.
// When sleep is high the switch opens and the rail is reported down from
// the next cycle on. When sleep falls, the rail needs WAKE_CYCLES clock
// cycles to recharge before the unit's outputs are valid; vdd_ok then
// rises. With the default of one cycle, a unit whose sleep signal is
// released at the end of the fetch stage is usable in the execute stage,
// which is the timing the pre-decode wake-up is built around.
//
// Interface: sleep in (from the sleep controller), vdd_ok out (rail up and
// settled; the core clamps the unit's outputs to zero while it is low).
module power_switch #(
  parameter int unsigned WAKE_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sleep,
  output logic vdd_ok
);

  localparam int unsigned CW = $clog2(WAKE_CYCLES + 1) + 1;
  logic [CW-1:0] charge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     charge <= '0;
    else if (sleep)                 charge <= '0;
    else if (charge != CW'(WAKE_CYCLES)) charge <= charge + 1'b1;
  end

  assign vdd_ok = (charge == CW'(WAKE_CYCLES));

endmodule

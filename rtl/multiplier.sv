// multiplier: the 32x32 multiplier, one of the four power-gated units.
//
// Forms the full 64-bit product of two 32-bit operands, signed (MULT) or
// unsigned (MULTU), in a single cycle; the upper half goes to HI and the
// lower half to LO. A single-cycle array is this design's choice: the
// architecture names the unit and its power domain but not its latency.
// The HI/LO registers themselves sit outside the gated domain so that a
// sleeping multiplier loses no result.
//
// Interface: combinational; is_signed, a, b in; hi, lo out.
module multiplier (
  input  logic        is_signed,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] hi,
  output logic [31:0] lo
);

  logic signed [65:0] p;

  always_comb begin
    // Extend both operands by two bits so one signed product covers both
    // the signed and the unsigned case.
    p = $signed({{2{is_signed & a[31]}}, a}) * $signed({{2{is_signed & b[31]}}, b});
    hi = p[63:32];
    lo = p[31:0];
  end

endmodule

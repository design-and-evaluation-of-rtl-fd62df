// divider: the iterative 32-bit divider, one of the four power-gated units.
//
// Computes quotient and remainder of a signed (DIV) or unsigned (DIVU)
// 32-bit division by restoring division, one quotient bit per clock. The
// operands are made positive on start, 32 shift-and-subtract steps follow,
// and the signs are applied when the last step is done (the remainder takes
// the sign of the dividend, as in MIPS). Division by zero returns an
// all-ones magnitude quotient and the dividend as remainder, which MIPS
// leaves undefined. The radix-2 iterative structure is this design's
// choice; the architecture names the unit only.
//
// Interface and timing: pulse start for one cycle with the operands. busy is
// high for the following 32 cycles; in the cycle after that, done pulses and
// quot/rem hold the result until the next start. A divide therefore takes 33
// cycles from start to done. The divider must stay powered while busy.
module divider #(
  parameter int unsigned STEPS = 32   // one per quotient bit
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        is_signed,
  input  logic [31:0] a,        // dividend
  input  logic [31:0] b,        // divisor
  output logic        busy,
  output logic        done,
  output logic [31:0] quot,
  output logic [31:0] rem
);

  logic [5:0]  cnt;
  logic [31:0] q_r, r_r, d_r;
  logic        neg_q, neg_r;
  logic [32:0] diff;

  assign busy = (cnt != 6'd0);
  assign diff = {r_r, q_r[31]} - {1'b0, d_r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      q_r   <= '0;
      r_r   <= '0;
      d_r   <= '0;
      neg_q <= 1'b0;
      neg_r <= 1'b0;
      done  <= 1'b0;
      quot  <= '0;
      rem   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q_r   <= (is_signed && a[31]) ? -a : a;
        d_r   <= (is_signed && b[31]) ? -b : b;
        r_r   <= '0;
        neg_q <= is_signed && (a[31] ^ b[31]);
        neg_r <= is_signed && a[31];
        cnt   <= 6'(STEPS);
      end else if (busy) begin
        // Shift the next dividend bit into the partial remainder and
        // subtract the divisor if it fits.
        if (!diff[32]) begin
          r_r <= diff[31:0];
          q_r <= {q_r[30:0], 1'b1};
        end else begin
          r_r <= {r_r[30:0], q_r[31]};
          q_r <= {q_r[30:0], 1'b0};
        end
        cnt <= cnt - 6'd1;
        if (cnt == 6'd1) begin
          done <= 1'b1;
          quot <= neg_q ? -(!diff[32] ? {q_r[30:0], 1'b1} : {q_r[30:0], 1'b0})
                        :  (!diff[32] ? {q_r[30:0], 1'b1} : {q_r[30:0], 1'b0});
          rem  <= neg_r ? -(!diff[32] ? diff[31:0] : {r_r[30:0], q_r[31]})
                        :  (!diff[32] ? diff[31:0] : {r_r[30:0], q_r[31]});
        end
      end
    end
  end

endmodule

// regfile: the 32 x 32-bit general register file of the MIPS pipeline.
//
// Two combinational read ports serve the decode stage and one write port is
// written at the clock edge by the write-back stage. Register 0 reads as
// zero and ignores writes. A read of the register being written in the same
// cycle returns the new value, so write-back needs no extra bypass.
//
// Interface: ra1/ra2 -> rd1/rd2 (combinational); we/wa/wd written on the
// rising clock edge. All registers reset to zero.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? 32'd0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? 32'd0 : (we && wa == ra2) ? wd : regs[ra2];
  end

endmodule

// tb_multiplier: signed and unsigned products of random and corner operands
// against a shift-and-add reference on 64-bit values.
module tb_multiplier;
  logic        is_signed;
  logic [31:0] a, b, hi, lo;
  logic [63:0] exp;
  int checks = 0, failures = 0;

  multiplier dut (.is_signed, .a, .b, .hi, .lo);

  function automatic logic [63:0] model(bit sgn, logic [31:0] x, logic [31:0] z);
    logic [63:0] xe, ze, acc;
    xe  = sgn ? {{32{x[31]}}, x} : {32'd0, x};
    ze  = sgn ? {{32{z[31]}}, z} : {32'd0, z};
    acc = '0;
    for (int k = 0; k < 64; k++) if (ze[k]) acc += xe << k;
    return acc;
  endfunction

  initial begin
    logic [31:0] corner [5] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          is_signed = s[0]; a = corner[i]; b = corner[j]; #1;
          exp = model(is_signed, a, b); checks++;
          if ({hi, lo} !== exp) begin failures++; $display("FAIL s=%0d a=%h b=%h got %h%h exp %h", s, a, b, hi, lo, exp); end
        end
      for (int i = 0; i < 500; i++) begin
        is_signed = s[0]; a = $urandom; b = $urandom; #1;
        exp = model(is_signed, a, b); checks++;
        if ({hi, lo} !== exp) begin failures++; $display("FAIL s=%0d a=%h b=%h got %h%h exp %h", s, a, b, hi, lo, exp); end
      end
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

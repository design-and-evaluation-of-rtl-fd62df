// tb_l1_cache: the data-cache configuration (8 KB, 2-way, 64-byte lines,
// write-through) against a reference memory. Random loads and stores of
// bytes, halves and words over 32 KB (so sets conflict) must return the
// reference data; stores must reach memory. Also checked: a hit completes
// in the cycle it is asked for, a miss costs one refill of 16 words, and
// least-recently-used replacement keeps the line touched last.
module tb_l1_cache;
  localparam int MEMW = 8192;   // 32 KB
  localparam int LAT  = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        req = 0, we = 0, stall, mem_req, mem_we, mem_ack = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, mem_addr, mem_wdata, mem_rdata = 0;
  logic [3:0]  be = 0, mem_be;
  logic [31:0] mem [MEMW];
  logic [31:0] refm [MEMW];
  int checks = 0, failures = 0, reads = 0, stall_cycles = 0, lat = 0;

  l1_cache dut (.*);

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (lat == LAT) begin
        lat <= 0; mem_ack <= 1'b1;
        mem_rdata <= mem[mem_addr[14:2]];
        if (mem_we) for (int b = 0; b < 4; b++) if (mem_be[b]) mem[mem_addr[14:2]][8*b +: 8] <= mem_wdata[8*b +: 8];
        if (!mem_we) reads++;
      end else lat <= lat + 1;
    end
    if (req && stall) stall_cycles++;
  end

  // one access; returns the number of cycles it took
  task automatic access(input bit w, input logic [31:0] a, input logic [31:0] d,
                        input logic [3:0] b, output logic [31:0] q, output int n);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d; be = b; n = 1;
    #1;
    while (stall) begin @(negedge clk); n++; #1; end
    q = rdata;
    @(posedge clk); #1; req = 0; we = 0;
  endtask

  initial begin
    logic [31:0] q;
    int n, r0;
    for (int i = 0; i < MEMW; i++) begin mem[i] = $urandom; refm[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // miss then hit on the same line
    r0 = reads;
    access(0, 32'h40, 0, 4'hF, q, n);
    checks++; if (q !== refm[16] || reads - r0 != 16) begin failures++; $display("FAIL first miss q=%h reads=%0d", q, reads - r0); end
    access(0, 32'h7C, 0, 4'hF, q, n);
    checks++; if (q !== refm[31] || n != 1) begin failures++; $display("FAIL hit took %0d cycles", n); end
    // LRU: three lines of set 1 (stride 4 KB): A, B, A, C -> C evicts B
    access(0, 32'h1040, 0, 4'hF, q, n);   // B
    access(0, 32'h0040, 0, 4'hF, q, n);   // A again (hit)
    checks++; if (n != 1) begin failures++; $display("FAIL A should hit"); end
    access(0, 32'h2040, 0, 4'hF, q, n);   // C, evicts B
    access(0, 32'h0040, 0, 4'hF, q, n);
    checks++; if (n != 1) begin failures++; $display("FAIL A evicted instead of B"); end
    r0 = reads;
    access(0, 32'h1040, 0, 4'hF, q, n);
    checks++; if (reads - r0 != 16) begin failures++; $display("FAIL B should miss"); end
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a, d;
      logic [3:0]  b;
      int sz;
      a = {17'd0, 13'($urandom_range(MEMW - 1)), 2'b00};
      if ($urandom_range(3) == 0) a[14:12] = 3'd0;   // reuse a hot 4 KB
      sz = $urandom_range(2);
      b = (sz == 0) ? 4'b0001 << $urandom_range(3) : (sz == 1) ? ($urandom_range(1) ? 4'b1100 : 4'b0011) : 4'hF;
      d = $urandom;
      if ($urandom_range(2) == 0) begin
        access(1, a, d, b, q, n);
        for (int k = 0; k < 4; k++) if (b[k]) refm[a[14:2]][8*k +: 8] = d[8*k +: 8];
      end else begin
        access(0, a, 0, 4'hF, q, n);
        checks++;
        if (q !== refm[a[14:2]]) begin failures++; $display("FAIL read %h = %h exp %h", a, q, refm[a[14:2]]); end
      end
    end
    for (int i = 0; i < MEMW; i++) begin
      checks++;
      if (mem[i] !== refm[i]) begin failures++; $display("FAIL memory word %0d not written through", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_arbiter: two requesters issue random word requests (held until
// acknowledged) to a memory with random latency. Checks that every request
// is served exactly once with the right data, that the bus address never
// changes under a pending request, and that the data side wins ties.
module tb_mem_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        i_req = 0, i_we = 0, i_ack, d_req = 0, d_we = 0, d_ack, m_req, m_we, m_ack = 0;
  logic [31:0] i_addr = 0, i_wdata = 0, i_rdata, d_addr = 0, d_wdata = 0, d_rdata, m_addr, m_wdata, m_rdata = 0;
  logic [3:0]  i_be = 0, d_be = 0, m_be;
  int checks = 0, failures = 0, i_done = 0, d_done = 0, ties = 0;

  mem_arbiter dut (.*);

  // memory: data = ~address, random latency
  int wait_n = 0;
  logic [31:0] held_addr;
  logic        pending = 0;
  always @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (pending && m_addr != held_addr) begin failures++; $display("FAIL address changed under a request"); end
      pending <= 1'b1; held_addr <= m_addr;
      if (wait_n == 0) begin
        m_ack <= 1'b1; m_rdata <= ~m_addr; pending <= 1'b0;
        wait_n <= $urandom_range(3);
      end else wait_n <= wait_n - 1;
    end
  end

  // bus_busy: a request has been granted and not yet acknowledged
  logic bus_busy = 1'b0;
  always @(posedge clk) begin
    if (rst_n && i_req && d_req && !bus_busy && m_req) begin
      ties++; checks++;
      if (m_addr != d_addr) begin failures++; $display("FAIL tie not won by data side"); end
    end
    if (m_ack)      bus_busy <= 1'b0;
    else if (m_req) bus_busy <= 1'b1;
  end

  initial begin : icli
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk); i_req = 1; i_addr = {$urandom, 2'b00}; i_we = 0;
      do @(posedge clk); while (!i_ack);
      #1; checks++;
      if (i_rdata != ~i_addr) begin failures++; $display("FAIL i data"); end
      i_done++;
      @(negedge clk); i_req = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
  end

  initial begin : dcli
    repeat (2) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk); d_req = 1; d_addr = {$urandom, 2'b00}; d_we = $urandom_range(1);
      do @(posedge clk); while (!d_ack);
      #1; checks++;
      if (!d_we && d_rdata != ~d_addr) begin failures++; $display("FAIL d data"); end
      d_done++;
      @(negedge clk); d_req = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
  end

  initial begin
    wait (i_done == 300 && d_done == 300);
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no contention seen"); end
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

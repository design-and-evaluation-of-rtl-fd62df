// l1_cache: blocking two-way set-associative level-1 cache.
//
// The same module serves as instruction cache (WRITE_EN = 0) and as data
// cache (WRITE_EN = 1). Default geometry: 8 KB, 64-byte lines, two ways,
// i.e. 64 sets of 16 words; addresses split into tag [31:12], set [11:6],
// word [5:2]. Replacement is least-recently-used with one bit per set.
//
// A read that hits returns its word combinationally in the same cycle. A
// read miss raises stall, latches the line address and refills the whole
// line from the memory bus one word at a time, in address order, into the
// way chosen by LRU; the access then hits. Writes are write-through with
// no write-allocate: every store goes to the memory bus and stall stays
// high until the bus acknowledges it; a store that hits also updates the
// cached word (byte enables honoured) in that cycle. The write policy, the
// replacement policy and the bus protocol are this design's choices; only
// size, line size and associativity are given for the core.
//
// stall is what the core sees as a cache miss: it is high whenever the
// access cannot complete in the current cycle because the cache waits for
// main memory.
//
// Memory bus: mem_req stays high with a stable address until mem_ack
// pulses for one cycle; a read returns mem_rdata with that pulse.
module l1_cache #(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned LINE_BYTES = 64,
  parameter bit          WRITE_EN   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // core side
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  output logic [31:0] rdata,
  output logic        stall,
  // memory side
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [3:0]  mem_be,
  input  logic        mem_ack,
  input  logic [31:0] mem_rdata
);

  localparam int unsigned WAYS  = 2;
  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned WORDS = LINE_BYTES / 4;
  localparam int unsigned OFFW  = $clog2(LINE_BYTES);
  localparam int unsigned SETW  = $clog2(SETS);
  localparam int unsigned WRDW  = $clog2(WORDS);
  localparam int unsigned TAGW  = 32 - OFFW - SETW;

  logic [31:0]     data0 [SETS*WORDS];
  logic [31:0]     data1 [SETS*WORDS];
  logic [TAGW-1:0] tag0  [SETS];
  logic [TAGW-1:0] tag1  [SETS];
  logic [SETS-1:0] valid0, valid1, lru;   // lru = way to replace next

  logic [TAGW-1:0] a_tag;
  logic [SETW-1:0] a_set;
  logic [WRDW-1:0] a_word;
  logic            hit0, hit1, hit;

  assign a_tag  = addr[31 -: TAGW];
  assign a_set  = addr[OFFW +: SETW];
  assign a_word = addr[2 +: WRDW];
  assign hit0   = valid0[a_set] && tag0[a_set] == a_tag;
  assign hit1   = valid1[a_set] && tag1[a_set] == a_tag;
  assign hit    = hit0 | hit1;

  // Refill state: the line being fetched and the next word to request.
  logic            filling;
  logic [TAGW-1:0] f_tag;
  logic [SETW-1:0] f_set;
  logic            f_way;
  logic [WRDW-1:0] f_word;

  logic rd_miss, wr_access;
  assign rd_miss   = req && !we && !hit;
  assign wr_access = WRITE_EN && req && we;

  always_comb begin
    rdata = hit1 ? data1[{a_set, a_word}] : data0[{a_set, a_word}];
    stall = rd_miss || (wr_access && !(mem_ack && !filling));
  end

  // Memory bus requests: a refill in progress, or a write-through.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = wdata;
    mem_be    = 4'hF;
    if (filling) begin
      mem_req  = 1'b1;
      mem_addr = {f_tag, f_set, f_word, 2'b00};
    end else if (wr_access) begin
      mem_req  = 1'b1;
      mem_we   = 1'b1;
      mem_addr = {addr[31:2], 2'b00};
      mem_be   = be;
    end
  end

  // Byte-merge of a store into a cached word.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] en);
    for (int i = 0; i < 4; i++)
      if (en[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  // Control state with reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid0  <= '0;
      valid1  <= '0;
      lru     <= '0;
      filling <= 1'b0;
      f_tag   <= '0;
      f_set   <= '0;
      f_way   <= 1'b0;
      f_word  <= '0;
    end else if (filling) begin
      if (mem_ack) begin
        f_word <= f_word + 1'b1;
        if (f_word == WRDW'(WORDS - 1)) begin
          filling <= 1'b0;
          if (f_way) begin
            valid1[f_set] <= 1'b1;
          end else begin
            valid0[f_set] <= 1'b1;
          end
          lru[f_set] <= ~f_way;
        end
      end
    end else if (rd_miss) begin
      // Start a refill; the victim way is invalid while it is rewritten.
      filling <= 1'b1;
      f_tag   <= a_tag;
      f_set   <= a_set;
      f_way   <= lru[a_set];
      f_word  <= '0;
      if (lru[a_set]) valid1[a_set] <= 1'b0;
      else            valid0[a_set] <= 1'b0;
    end else if (req && hit && !(wr_access && !mem_ack)) begin
      lru[a_set] <= hit0;
    end
  end

  // Arrays (no reset; valid bits guard them).
  always_ff @(posedge clk) begin
    if (filling && mem_ack) begin
      if (f_way) data1[{f_set, f_word}] <= mem_rdata;
      else       data0[{f_set, f_word}] <= mem_rdata;
    end else if (wr_access && mem_ack && hit) begin
      if (hit1) data1[{a_set, a_word}] <= merge(data1[{a_set, a_word}], wdata, be);
      else      data0[{a_set, a_word}] <= merge(data0[{a_set, a_word}], wdata, be);
    end
    if (!filling && rd_miss) begin
      if (lru[a_set]) tag1[a_set] <= a_tag;
      else            tag0[a_set] <= a_tag;
    end
  end

endmodule

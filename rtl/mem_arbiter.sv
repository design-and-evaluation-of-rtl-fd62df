// mem_arbiter: shares the single external memory bus between the
// instruction cache and the data cache.
//
// Both caches issue single-word requests that stay asserted, with a stable
// address, until acknowledged. The arbiter grants the bus per request and
// keeps the grant until the acknowledge, so a request is never switched
// away from while memory is serving it. When both caches are waiting, the
// data cache wins: it is the one that blocks the memory stage. Priority and
// protocol are this design's choices.
//
// Interface: two requester ports (i_*, d_*) and one memory port (m_*) of
// the same shape; the acknowledge and read data are routed back to the
// granted requester only.
module mem_arbiter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_req,
  input  logic        i_we,
  input  logic [31:0] i_addr,
  input  logic [31:0] i_wdata,
  input  logic [3:0]  i_be,
  output logic        i_ack,
  output logic [31:0] i_rdata,
  input  logic        d_req,
  input  logic        d_we,
  input  logic [31:0] d_addr,
  input  logic [31:0] d_wdata,
  input  logic [3:0]  d_be,
  output logic        d_ack,
  output logic [31:0] d_rdata,
  output logic        m_req,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_be,
  input  logic        m_ack,
  input  logic [31:0] m_rdata
);

  typedef enum logic [1:0] {G_NONE, G_I, G_D} grant_e;

  grant_e owner_q, grant;

  always_comb begin
    if (owner_q != G_NONE) grant = owner_q;
    else if (d_req)        grant = G_D;
    else if (i_req)        grant = G_I;
    else                   grant = G_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            owner_q <= G_NONE;
    else if (m_ack)                        owner_q <= G_NONE;
    else if (grant != G_NONE && m_req)     owner_q <= grant;
  end

  always_comb begin
    m_req   = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    m_be    = '0;
    unique case (grant)
      G_I: begin
        m_req = i_req; m_we = i_we; m_addr = i_addr; m_wdata = i_wdata; m_be = i_be;
      end
      G_D: begin
        m_req = d_req; m_we = d_we; m_addr = d_addr; m_wdata = d_wdata; m_be = d_be;
      end
      default: ;
    endcase
    i_ack   = m_ack && grant == G_I;
    d_ack   = m_ack && grant == G_D;
    i_rdata = m_rdata;
    d_rdata = m_rdata;
  end

endmodule

// mem_arbiter: two-requester arbiter on the memory request/response bus. The
// SoC uses one in front of the data cache (scalar core data port and the
// vector coprocessor) and one in front of main memory (instruction cache and
// data cache). One transaction is in flight at a time: a request is granted,
// forwarded downstream, and the arbiter stays locked to that requester until
// the downstream response arrives, which is returned to it alone. When both
// request in the same cycle the one not served last wins (round robin). The
// two arbiters and what they connect come from the reference block diagram;
// the policy and the one-outstanding protocol are this design's choices.
module mem_arbiter
  import manic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  req_valid,
  output logic [1:0]  req_ready,
  input  mem_req_t    req [2],
  output logic [1:0]  rsp_valid,
  output logic [31:0] rsp_rdata,
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output mem_req_t    m_req,
  input  logic        m_rsp_valid,
  input  logic [31:0] m_rsp_rdata
);

  logic busy_q, owner_q, last_q;
  logic sel;

  // requester chosen this cycle
  always_comb begin
    if (req_valid == 2'b11) sel = ~last_q;
    else                    sel = req_valid[1];
  end

  assign m_req_valid = !busy_q && (req_valid != 2'b00);
  assign m_req       = req[sel];
  assign req_ready   = (!busy_q && m_req_ready) ? (sel ? 2'b10 : 2'b01) : 2'b00;
  assign rsp_valid   = (busy_q && m_rsp_valid) ? (owner_q ? 2'b10 : 2'b01) : 2'b00;
  assign rsp_rdata   = m_rsp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= 1'b0;
      last_q  <= 1'b1;
    end else if (!busy_q) begin
      if (m_req_valid && m_req_ready) begin
        busy_q  <= 1'b1;
        owner_q <= sel;
        last_q  <= sel;
      end
    end else if (m_rsp_valid) begin
      busy_q <= 1'b0;
    end
  end

endmodule

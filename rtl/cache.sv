// cache: direct-mapped, write-through, no-write-allocate cache on the memory
// request/response bus. It serves as the 2 KB instruction cache
// (SIZE_BYTES = 2048) and the 4 KB data cache shared by the scalar core and
// the vector coprocessor (SIZE_BYTES = 4096).
//
// A request is taken in IDLE and looked up in the next cycle (LOOKUP). A read
// hit answers there, one cycle after acceptance. A read miss fetches the
// whole line of LINE_WORDS words from memory (REFILL), one word request at a
// time, and answers once the line is in. A write goes to memory (WRITE) and
// also updates the cached copy when the line is present; it is acknowledged
// when memory acknowledges. With en low the cache is bypassed: every request
// goes to memory and nothing is cached (the "DCache disabled" configuration),
// and all lines are invalidated while en is low. The sizes come from the
// reference design; the organisation (direct mapped, 16-byte lines,
// write-through) is this design's choice, as the reference does not give it.
module cache
  import manic_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // requester side
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  // memory side
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output mem_req_t    m_req,
  input  logic        m_rsp_valid,
  input  logic [31:0] m_rsp_rdata
);

  localparam int unsigned LINES = SIZE_BYTES / (4 * LINE_WORDS);
  localparam int unsigned OW    = $clog2(LINE_WORDS);
  localparam int unsigned IXW   = $clog2(LINES);
  localparam int unsigned TAGW  = 32 - IXW - OW - 2;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_REFILL, S_WRITE, S_BYPASS} state_e;

  state_e        state_q;
  mem_req_t      cur_q;
  logic [31:0]   data_q [LINES * LINE_WORDS];
  logic [TAGW-1:0] tag_q [LINES];
  logic [LINES-1:0] valid_q;
  logic [OW-1:0] fill_q;
  logic          sent_q;

  logic [IXW-1:0]  idx;
  logic [OW-1:0]   off;
  logic [TAGW-1:0] tag;
  logic            hit;

  assign idx = cur_q.addr[OW+2 +: IXW];
  assign off = cur_q.addr[2 +: OW];
  assign tag = cur_q.addr[31 -: TAGW];
  assign hit = valid_q[idx] && tag_q[idx] == tag;

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    m_req_valid = 1'b0;
    m_req       = cur_q;
    unique case (state_q)
      S_REFILL: begin
        m_req_valid = !sent_q;
        m_req.we    = 1'b0;
        m_req.addr  = {cur_q.addr[31:OW+2], fill_q, 2'b00};
      end
      S_WRITE, S_BYPASS: m_req_valid = !sent_q;
      default: ;
    endcase
  end

  always_comb begin
    rsp_valid = 1'b0;
    rsp_rdata = data_q[{idx, off}];
    unique case (state_q)
      S_LOOKUP: rsp_valid = !cur_q.we && hit;
      S_REFILL: begin
        rsp_valid = m_rsp_valid && fill_q == OW'(LINE_WORDS - 1);
        if (fill_q == off) rsp_rdata = m_rsp_rdata;
      end
      S_WRITE, S_BYPASS: begin
        rsp_valid = m_rsp_valid;
        rsp_rdata = m_rsp_rdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state_q == S_REFILL && m_rsp_valid)
      data_q[{idx, fill_q}] <= m_rsp_rdata;
    if (state_q == S_LOOKUP && cur_q.we && hit) begin
      for (int b = 0; b < 4; b++)
        if (cur_q.be[b]) data_q[{idx, off}][8*b +: 8] <= cur_q.wdata[8*b +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cur_q   <= '0;
      valid_q <= '0;
      fill_q  <= '0;
      sent_q  <= 1'b0;
      for (int i = 0; i < int'(LINES); i++) tag_q[i] <= '0;
    end else begin
      if (!en) valid_q <= '0;
      unique case (state_q)
        S_IDLE: begin
          sent_q <= 1'b0;
          if (req_valid) begin
            cur_q   <= req;
            state_q <= en ? S_LOOKUP : S_BYPASS;
          end
        end
        S_LOOKUP: begin
          if (cur_q.we)   state_q <= S_WRITE;
          else if (hit)   state_q <= S_IDLE;
          else begin
            state_q <= S_REFILL;
            fill_q  <= '0;
          end
        end
        S_REFILL: begin
          if (m_req_valid && m_req_ready) sent_q <= 1'b1;
          if (m_rsp_valid) begin
            sent_q <= 1'b0;
            if (fill_q == OW'(LINE_WORDS - 1)) begin
              valid_q[idx] <= en;
              tag_q[idx]   <= tag;
              state_q      <= S_IDLE;
            end else begin
              fill_q <= fill_q + 1'b1;
            end
          end
        end
        S_WRITE, S_BYPASS: begin
          if (m_req_valid && m_req_ready) sent_q <= 1'b1;
          if (m_rsp_valid) begin
            sent_q  <= 1'b0;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule

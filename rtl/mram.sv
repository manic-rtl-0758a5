// mram: behavioural model of the 256 KB embedded MRAM macro used as
// non-volatile main memory. This is a model of a process-specific macro, not
// logic to synthesise as such: it stores words in an array and reproduces
// the macro's measured access times, which do not depend on the clock: a
// 32-bit read takes 170 ns and a write 8.4 us. The latencies are turned into
// clock cycles from CLK_NS (default 20 ns, 50 MHz): ceil(170/20) = 9 cycles
// per read and 8400/20 = 420 cycles per write, counted from the cycle the
// request is accepted to the cycle the response is valid (the SRAM's one
// cycle on the same scale). One access is handled at a time; req_ready is
// low while one is under way. Latencies must be at least two cycles. When the MRAM power domain
// is off (pwr_en low) accesses complete in one cycle, reads return zero and
// writes are dropped; stored data survive, as the memory is non-volatile.
// Size and latencies are the reference design's; the port, the behaviour
// when powered off and the cycle rounding are this design's.
module mram
  import manic_pkg::*;
#(
  parameter int unsigned BYTES    = 262144,
  parameter int unsigned CLK_NS   = 20,
  parameter int unsigned READ_NS  = 170,
  parameter int unsigned WRITE_NS = 8400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pwr_en,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata
);

  localparam int unsigned WORDS    = BYTES / 4;
  localparam int unsigned AW       = $clog2(WORDS);
  localparam int unsigned RD_CYC   = (READ_NS + CLK_NS - 1) / CLK_NS;
  localparam int unsigned WR_CYC   = (WRITE_NS + CLK_NS - 1) / CLK_NS;
  localparam int unsigned TW       = $clog2(WR_CYC + RD_CYC + 2);

  logic [31:0]   mem [WORDS];
  logic          busy_q;
  logic [TW-1:0] timer_q;
  mem_req_t      cur_q;

  assign req_ready = !busy_q && !rsp_valid;

  always_ff @(posedge clk) begin
    if (busy_q && timer_q == TW'(1) && cur_q.we) begin
      for (int b = 0; b < 4; b++)
        if (cur_q.be[b]) mem[cur_q.addr[AW+1:2]][8*b +: 8] <= cur_q.wdata[8*b +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      timer_q   <= '0;
      cur_q     <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy_q) begin
        if (req_valid && req_ready) begin
          if (!pwr_en) begin
            rsp_valid <= 1'b1;          // powered off: answer at once
            rsp_rdata <= '0;
          end else begin
            busy_q  <= 1'b1;
            cur_q   <= req;
            timer_q <= req.we ? TW'(WR_CYC - 1) : TW'(RD_CYC - 1);
          end
        end
      end else if (timer_q == TW'(1)) begin
        busy_q    <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_rdata <= cur_q.we ? 32'd0 : mem[cur_q.addr[AW+1:2]];
      end else begin
        timer_q <= timer_q - 1'b1;
      end
    end
  end

endmodule

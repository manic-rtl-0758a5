// tb_mem_arbiter: two requesters issue random reads and writes through the
// arbiter to a memory model with random latency. Each requester checks that
// every response is its own (read data tagged with the address and
// requester). The test also checks round-robin order when both request in
// the same cycle and that no second request reaches memory while one is
// outstanding.
module tb_mem_arbiter;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] req_valid, req_ready, rsp_valid;
  mem_req_t req [2];
  logic [31:0] rsp_rdata;
  logic m_req_valid, m_req_ready, m_rsp_valid; mem_req_t m_req; logic [31:0] m_rsp_rdata;
  mem_arbiter dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
                   .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_rdata);
  int checks = 0, failures = 0, overlap = 0, both = 0, alternated = 0;

  // memory: answers 1-4 cycles after accepting; read data = ~addr
  logic mbusy; int lat; mem_req_t cur;
  assign m_req_ready = !mbusy;
  always_ff @(posedge clk) begin
    m_rsp_valid <= 1'b0;
    if (!rst_n) mbusy <= 1'b0;
    else if (!mbusy) begin
      if (m_req_valid) begin mbusy <= 1'b1; cur <= m_req; lat <= $urandom_range(0, 3); end
    end else if (lat == 0) begin
      mbusy <= 1'b0; m_rsp_valid <= 1'b1; m_rsp_rdata <= cur.we ? 32'd0 : ~cur.addr;
    end else lat <= lat - 1;
  end
  always @(posedge clk) if (m_req_valid && mbusy) overlap++;

  int last_g = -1;
  always @(posedge clk) begin
    if (req_valid == 2'b11 && req_ready != 0) begin
      both++;
      if (last_g >= 0 && req_ready[last_g] == 1'b0) alternated++;
    end
    if (req_ready[0]) last_g = 0;
    if (req_ready[1]) last_g = 1;
  end

  task automatic master(int id, int n);
    for (int k = 0; k < n; k++) begin
      automatic logic [31:0] a = {id[0], 31'($urandom) & 31'h7FFF_FFFC};
      automatic logic we = $urandom_range(0, 1);
      @(negedge clk);
      req_valid[id] = 1; req[id].addr = a; req[id].we = we; req[id].be = 4'hF; req[id].wdata = $urandom;
      #1 while (!req_ready[id]) begin @(negedge clk); #1; end
      @(posedge clk); #1 req_valid[id] = 0;
      while (!rsp_valid[id]) begin @(posedge clk); #1; end
      checks++;
      if (!we && rsp_rdata !== ~a) failures++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    req_valid = 0; req[0] = '0; req[1] = '0;
    #22 rst_n = 1;
    fork
      master(0, 2000);
      master(1, 2000);
    join
    checks += 3;
    if (overlap != 0) begin failures++; $display("request while busy"); end
    if (both == 0) begin failures++; $display("never both"); end
    if (alternated != both - 1 && alternated != both) begin
      failures++; $display("round robin: %0d of %0d", alternated, both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

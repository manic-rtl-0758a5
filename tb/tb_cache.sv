// tb_cache: random reads and byte-enabled writes through the cache to a
// memory model with random latency, compared with a shadow copy of memory.
// Also checked: a hit answers one cycle after acceptance, a read miss
// fetches exactly one 4-word line, every write reaches memory
// (write-through), and with the cache disabled every access goes to memory
// and nothing is kept.
module tb_cache;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  logic m_req_valid, m_req_ready, m_rsp_valid; mem_req_t m_req; logic [31:0] m_rsp_rdata;
  cache #(.SIZE_BYTES(1024)) dut (.clk, .rst_n, .en, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
                                  .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_rdata);
  int checks = 0, failures = 0, mreqs = 0, hits = 0, misses = 0;
  logic [31:0] mem [1024], sh [1024];

  logic mbusy; int lat; mem_req_t cur;
  assign m_req_ready = !mbusy;
  always_ff @(posedge clk) begin
    m_rsp_valid <= 1'b0;
    if (!rst_n) mbusy <= 1'b0;
    else if (!mbusy) begin
      if (m_req_valid) begin mbusy <= 1'b1; cur <= m_req; lat <= $urandom_range(0, 2); end
    end else if (lat == 0) begin
      mbusy <= 1'b0; m_rsp_valid <= 1'b1;
      if (cur.we) for (int b = 0; b < 4; b++) if (cur.be[b]) mem[cur.addr[11:2]][8*b +: 8] <= cur.wdata[8*b +: 8];
      m_rsp_rdata <= mem[cur.addr[11:2]];
    end else lat <= lat - 1;
  end
  always @(posedge clk) if (m_req_valid && m_req_ready) mreqs++;

  task automatic xfer(logic [31:0] addr, logic we, logic [3:0] be, logic [31:0] wd,
                      output logic [31:0] rd, output int l, output int nreq);
    int m0;
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = be; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    m0 = mreqs;
    @(posedge clk); #1 req_valid = 0;
    l = 1;
    while (!rsp_valid) begin @(posedge clk); #1; l++; end
    rd = rsp_rdata;
    @(posedge clk); #1;
    nreq = mreqs - m0;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; int l, nq;
    req_valid = 0; req = '0; en = 1;
    for (int i = 0; i < 1024; i++) begin mem[i] = $urandom; sh[i] = mem[i]; end
    #22 rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      automatic int w = (k % 3 == 0) ? $urandom_range(0, 1023) : $urandom_range(0, 95);
      if ($urandom_range(0, 3) == 0) begin
        automatic logic [3:0] be = 4'($urandom);
        automatic logic [31:0] wd = $urandom;
        xfer(32'(w * 4), 1, be, wd, rd, l, nq);
        for (int b = 0; b < 4; b++) if (be[b]) sh[w][8*b +: 8] = wd[8*b +: 8];
        checks++;
        if (nq != 1) failures++;
      end else begin
        xfer(32'(w * 4), 0, 0, 0, rd, l, nq);
        checks += 2;
        if (rd !== sh[w]) begin failures++; if (failures < 10) $display("read %0d: %h vs %h", w, rd, sh[w]); end
        if (nq == 0) begin hits++; if (l != 1) failures++; end
        else begin misses++; if (nq != 4) failures++; end
      end
    end
    checks += 2;
    if (hits < 1000) begin failures++; $display("hits %0d", hits); end
    if (misses < 100) begin failures++; $display("misses %0d", misses); end
    // disabled: every read goes to memory once, and sees memory directly
    en = 0;
    for (int k = 0; k < 200; k++) begin
      automatic int w = $urandom_range(0, 31);
      xfer(32'(w * 4), 0, 0, 0, rd, l, nq);
      checks += 2;
      if (rd !== sh[w]) failures++;
      if (nq != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

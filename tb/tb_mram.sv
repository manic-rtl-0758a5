// tb_mram: checks the MRAM model's access times at the default 20 ns clock
// (a read answers 9 cycles after acceptance: 170 ns rounded up; a write 420
// cycles: 8.4 us), that it takes no new request while busy, byte-enabled
// writes and reads against a shadow copy, and the powered-off behaviour:
// one-cycle zero reads, dropped writes and data kept across the power cycle.
module tb_mram;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pwr_en, req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  mram dut (.clk, .rst_n, .pwr_en, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata);
  int checks = 0, failures = 0, busy_refused = 0;
  logic [31:0] sh [64];

  always @(posedge clk) if (dut.busy_q && req_ready) busy_refused++;

  task automatic xfer(logic [31:0] addr, logic we, logic [3:0] be, logic [31:0] wd,
                      output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = be; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    rd = rsp_rdata;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; int lat;
    req_valid = 0; req = '0; pwr_en = 1;
    #22 rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      sh[i] = $urandom;
      xfer(32'h1000 + 32'(i * 4), 1, 4'hF, sh[i], rd, lat);
      checks++;
      if (lat != 420) begin failures++; if (i < 2) $display("write latency %0d", lat); end
    end
    for (int k = 0; k < 200; k++) begin
      automatic int w = $urandom_range(0, 63);
      if (k % 10 == 0) begin
        automatic logic [3:0] be = 4'($urandom);
        automatic logic [31:0] wd = $urandom;
        xfer(32'h1000 + 32'(w * 4), 1, be, wd, rd, lat);
        for (int b = 0; b < 4; b++) if (be[b]) sh[w][8*b +: 8] = wd[8*b +: 8];
      end else begin
        xfer(32'h1000 + 32'(w * 4), 0, 0, 0, rd, lat);
        checks += 2;
        if (rd !== sh[w]) failures++;
        if (lat != 9) begin failures++; $display("read latency %0d", lat); end
      end
    end
    // power off: fast, zero, writes dropped
    pwr_en = 0;
    xfer(32'h1000, 1, 4'hF, 32'hFFFF_0000, rd, lat);
    xfer(32'h1000, 0, 0, 0, rd, lat);
    checks += 2;
    if (rd !== 0) failures++;
    if (lat != 1) failures++;
    pwr_en = 1;
    for (int i = 0; i < 64; i++) begin
      xfer(32'h1000 + 32'(i * 4), 0, 0, 0, rd, lat);
      checks++;
      if (rd !== sh[i]) failures++;
    end
    checks++;
    if (busy_refused != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sram: random byte-enabled writes and reads of the SRAM compared with a
// shadow array, checking the one-cycle response and the single outstanding
// request rule (req_ready low while a response is pending).
module tb_sram;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  sram #(.BYTES(4096)) dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata);
  int checks = 0, failures = 0;
  logic [31:0] sh [1024];

  task automatic xfer(logic [31:0] addr, logic we, logic [3:0] be, logic [31:0] wd,
                      output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = be; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    lat = 0;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    lat++;
    rd = rsp_rdata;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; int lat;
    req_valid = 0; req = '0;
    #22 rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      sh[i] = $urandom;
      xfer(32'(i * 4), 1, 4'hF, sh[i], rd, lat);
    end
    for (int k = 0; k < 4000; k++) begin
      automatic int w = $urandom_range(0, 1023);
      if ($urandom_range(0, 1)) begin
        automatic logic [3:0] be = 4'($urandom);
        automatic logic [31:0] wd = $urandom;
        xfer(32'(w * 4), 1, be, wd, rd, lat);
        for (int b = 0; b < 4; b++) if (be[b]) sh[w][8*b +: 8] = wd[8*b +: 8];
      end else begin
        xfer(32'(w * 4), 0, 4'h0, 0, rd, lat);
        checks++;
        if (rd !== sh[w]) failures++;
      end
      checks++;
      if (lat != 1) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

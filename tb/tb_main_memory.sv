// tb_main_memory: checks the address decode of main memory. Words written to
// the SRAM region (0x1xxx_xxxx) and the MRAM region (0x2xxx_xxxx) read back,
// the two regions do not alias, the boot ROM (0x0xxx_xxxx, loaded from a
// small hex file) reads its contents and ignores writes, an unmapped region
// reads zero, and each region answers with its own latency: 1 cycle for ROM
// and SRAM, 9 (read) and 420 (write) cycles for the MRAM at 20 ns, and 1
// cycle for a powered-off MRAM.
module tb_main_memory;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mram_en, req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  main_memory #(.SRAM_BYTES(4096), .MRAM_BYTES(4096), .ROM_FILE("tb/boot_rom_test.hex")) dut (
    .clk, .rst_n, .mram_en, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata);
  int checks = 0, failures = 0;

  task automatic xfer(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = 4'hF; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    rd = rsp_rdata;
  endtask

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; int lat;
    logic [31:0] s [16], m [16];
    req_valid = 0; req = '0; mram_en = 1;
    #22 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      s[i] = $urandom; m[i] = $urandom;
      xfer(32'h1000_0000 + 32'(i * 4), 1, s[i], rd, lat);
      chk(lat == 1, "SRAM write latency");
      xfer(32'h2000_0000 + 32'(i * 4), 1, m[i], rd, lat);
      chk(lat == 420, "MRAM write latency");
    end
    for (int i = 0; i < 16; i++) begin
      xfer(32'h1000_0000 + 32'(i * 4), 0, 0, rd, lat);
      chk(rd === s[i] && lat == 1, "SRAM read");
      xfer(32'h2000_0000 + 32'(i * 4), 0, 0, rd, lat);
      chk(rd === m[i] && lat == 9, "MRAM read");
    end
    xfer(32'h0000_0008, 1, 32'h0, rd, lat);
    xfer(32'h0000_0008, 0, 0, rd, lat);
    chk(rd === 32'hdeadbeef && lat == 1, "boot ROM read");
    xfer(32'h0000_001C, 0, 0, rd, lat);
    chk(rd === 32'h9abcdef0, "boot ROM last word");
    xfer(32'h5000_0000, 1, 32'h1234, rd, lat);
    xfer(32'h5000_0000, 0, 0, rd, lat);
    chk(rd === 0 && lat == 1, "unmapped reads zero");
    mram_en = 0;
    xfer(32'h2000_0000, 0, 0, rd, lat);
    chk(rd === 0 && lat == 1, "MRAM off");
    mram_en = 1;
    xfer(32'h2000_0000, 0, 0, rd, lat);
    chk(rd === m[0], "MRAM keeps data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

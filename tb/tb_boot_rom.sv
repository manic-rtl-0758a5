// tb_boot_rom: reads the boot ROM loaded from a small hex file, checks the
// words, the zero fill beyond the file, the one-cycle response and that
// writes do not change the contents.
module tb_boot_rom;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  boot_rom #(.INIT_FILE("tb/boot_rom_test.hex")) dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata);
  int checks = 0, failures = 0;
  logic [31:0] exp_w [8] = '{32'h13579bdf, 32'h02468ace, 32'hdeadbeef, 32'h00000001,
                             32'h80000000, 32'hffffffff, 32'h12345678, 32'h9abcdef0};

  task automatic xfer(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = 4'hF; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    rd = rsp_rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; int lat;
    req_valid = 0; req = '0;
    #22 rst_n = 1;
    xfer(32'h8, 1, 32'h5555_5555, rd, lat);
    for (int i = 0; i < 256; i++) begin
      xfer(32'(i * 4), 0, 0, rd, lat);
      checks += 2;
      if (rd !== ((i < 8) ? exp_w[i] : 32'd0)) begin failures++; $display("word %0d = %h", i, rd); end
      if (lat != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_io_bus: random reads and writes through the IO bus to two device models
// (GPIO slot 0x0, I2C slot 0x1) that stall and answer after random delays,
// and to unmapped slots. Checks that each request reaches only its device
// with the right fields, that every access gets exactly one response with the
// device's data, and that unmapped slots answer zero one cycle after acceptance.
module tb_io_bus;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  logic [1:0] d_req_valid, d_req_ready, d_rsp_valid;
  logic [31:0] d_rsp_rdata [2];
  io_bus dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
              .gpio_req_valid(d_req_valid[0]), .gpio_req_ready(d_req_ready[0]),
              .gpio_rsp_valid(d_rsp_valid[0]), .gpio_rsp_rdata(d_rsp_rdata[0]),
              .i2c_req_valid(d_req_valid[1]), .i2c_req_ready(d_req_ready[1]),
              .i2c_rsp_valid(d_rsp_valid[1]), .i2c_rsp_rdata(d_rsp_rdata[1]));
  int checks = 0, failures = 0;
  int acc [2];
  mem_req_t last [2];

  for (genvar d = 0; d < 2; d++) begin : g_dev
    logic busy, rdy; int lat;
    assign d_req_ready[d] = !busy && rdy;
    always_ff @(posedge clk) begin
      rdy <= ($urandom_range(0, 2) != 0);
      d_rsp_valid[d] <= 1'b0;
      if (!rst_n) busy <= 1'b0;
      else if (!busy) begin
        if (d_req_valid[d] && d_req_ready[d]) begin
          busy <= 1'b1; lat <= $urandom_range(0, 3); last[d] <= req; acc[d]++;
        end
      end else if (lat == 0) begin
        busy <= 1'b0; d_rsp_valid[d] <= 1'b1;
        d_rsp_rdata[d] <= last[d].addr ^ 32'(d * 32'h5555_0000);
      end else lat <= lat - 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int nrsp, l, dev; int a0 [2]; logic [31:0] addr, exp;
    req_valid = 0; req = '0; acc[0] = 0; acc[1] = 0;
    #22 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      dev  = $urandom_range(0, 3);
      addr = {$urandom_range(0, 1) ? 20'hF0000 : 20'h00000, 4'(dev), 8'($urandom) & 8'hFC};
      a0 = acc;
      @(negedge clk);
      req_valid = 1; req.addr = addr; req.we = 1'($urandom); req.be = 4'($urandom); req.wdata = $urandom;
      #1 while (!req_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1 req_valid = 0;
      l = 1; nrsp = 0;
      while (!rsp_valid) begin @(posedge clk); #1; l++; end
      exp = dev < 2 ? addr ^ 32'(dev * 32'h5555_0000) : 32'd0;
      checks += 3;
      if (!req.we && rsp_rdata !== exp) begin failures++; $display("rdata %h vs %h", rsp_rdata, exp); end
      if (dev < 2) begin
        if (acc[dev] != a0[dev] + 1 || acc[1-dev] != a0[1-dev]) failures++;
        if (last[dev] !== req) failures++;
      end else begin
        if (acc[0] != a0[0] || acc[1] != a0[1]) failures++;
        if (l != 1) failures++;
      end
      // exactly one response
      repeat (6) begin @(posedge clk); #1; if (rsp_valid) nrsp++; end
      checks++;
      if (nrsp != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpio: writes OUT and OE and reads them back, checks the pins follow,
// and reads IN after the two-cycle synchroniser for random pin values.
module tb_gpio;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  logic [15:0] pin_in, pin_out, pin_oe;
  gpio dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata, .pin_in, .pin_out, .pin_oe);
  int checks = 0, failures = 0;
  task automatic xfer(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = 4'hF; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; end
    rd = rsp_rdata;
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] rd; logic [15:0] o, e, p;
    req_valid = 0; req = '0; pin_in = 0;
    #22 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      o = 16'($urandom); e = 16'($urandom); p = 16'($urandom);
      xfer(32'h0, 1, {16'hFFFF, o}, rd);
      xfer(32'h4, 1, 32'(e), rd);
      pin_in = p;
      repeat (3) @(posedge clk);
      #1;
      checks += 5;
      if (pin_out !== o) failures++;
      if (pin_oe !== e) failures++;
      xfer(32'h0, 0, 0, rd); if (rd !== 32'(o)) failures++;
      xfer(32'h4, 0, 0, rd); if (rd !== 32'(e)) failures++;
      xfer(32'h8, 0, 0, rd); if (rd !== 32'(p)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vrf: random writes and reads of the 1r1w vector register file compared
// with a shadow array. Checks the one-cycle read latency, that the read data
// hold while no read is issued, and that a same-cycle read of a word being
// written returns the old value.
module tb_vrf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic re, we; logic [9:0] raddr, waddr; logic [31:0] rdata, wdata, expd;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;
  vrf dut (.clk, .rst_n, .re, .raddr, .rdata, .we, .waddr, .wdata);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    #12 rst_n = 1;
    // fill
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      re = 1; raddr = 10'($urandom);
      we = $urandom_range(0, 1);
      waddr = (k % 4 == 0) ? raddr : 10'($urandom);
      wdata = $urandom;
      expd = shadow[raddr];
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      re = 0; we = 0;
      checks++;
      if (rdata !== expd) begin
        failures++;
        if (failures < 10) $display("read %0d -> %h, expected %h", raddr, rdata, expd);
      end
      // no read: data hold
      @(posedge clk); #1;
      checks++;
      if (rdata !== expd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

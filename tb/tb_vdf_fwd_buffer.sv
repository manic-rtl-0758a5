// tb_vdf_fwd_buffer: random writes and dual reads of the 8-slot forwarding
// buffer compared with a shadow array; checks the reset value too.
module tb_vdf_fwd_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we; logic [2:0] waddr, ra, rb; logic [31:0] wdata, da, db;
  logic [31:0] shadow [8];
  int checks = 0, failures = 0;
  vdf_fwd_buffer dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da),
                      .raddr_b(rb), .rdata_b(db));
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    for (int i = 0; i < 8; i++) shadow[i] = 0;
    #12 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) failures++;
      if (db !== shadow[rb]) failures++;
      we = $urandom_range(0, 1); waddr = 3'($urandom); wdata = $urandom;
      @(posedge clk);
      #1;
      if (we) shadow[waddr] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

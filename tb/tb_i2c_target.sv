// tb_i2c_target: an I2C controller model drives SCL and SDA (open drain, the
// line is the AND of the controller and the target) with an SCL period of 40
// system clocks. Checked: write transfers of 1..4 random bytes to address 0x42
// are acknowledged and read back through RXDATA in order; a fifth byte into a
// full FIFO is not acknowledged and dropped; a transfer to another address is
// ignored (no acknowledge, nothing received); read transfers return TXDATA,
// repeated while the controller acknowledges; STATUS reports the FIFO count.
module tb_i2c_target;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid; mem_req_t req; logic [31:0] rsp_rdata;
  logic scl, sda_c, sda_oe, sda;
  assign sda = sda_c && !sda_oe;
  i2c_target dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
                  .scl_in(scl), .sda_in(sda), .sda_oe);
  int checks = 0, failures = 0;
  localparam int Q = 10;   // quarter SCL period in system clocks

  task automatic quarter(); repeat (Q) @(posedge clk); endtask
  task automatic start_c(); sda_c = 1; quarter(); scl = 1; quarter(); sda_c = 0; quarter(); scl = 0; quarter(); endtask
  task automatic stop_c();  sda_c = 0; quarter(); scl = 1; quarter(); sda_c = 1; quarter(); quarter(); endtask
  task automatic bit_out(logic b); sda_c = b; quarter(); scl = 1; quarter(); quarter(); scl = 0; quarter(); endtask
  task automatic bit_in(output logic b); sda_c = 1; quarter(); scl = 1; quarter(); b = sda; quarter(); scl = 0; quarter(); endtask
  task automatic byte_out(logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) bit_out(v[i]);
    bit_in(b); ack = !b;
  endtask
  task automatic byte_in(logic ack, output logic [7:0] v);
    for (int i = 7; i >= 0; i--) bit_in(v[i]);
    bit_out(!ack);
  endtask

  task automatic xfer(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    req_valid = 1; req.addr = addr; req.we = we; req.be = 4'hF; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; end
    rd = rsp_rdata;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic ack; logic [31:0] rd; logic [7:0] v, t; logic [7:0] sent [5];
    req_valid = 0; req = '0; scl = 1; sda_c = 1;
    #22 rst_n = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      automatic int kind = $urandom_range(0, 3);
      if (kind <= 1) begin
        // write 1..5 bytes; the fifth finds the FIFO full
        automatic int n = $urandom_range(1, 5);
        start_c();
        byte_out({7'h42, 1'b0}, ack); checks++; if (!ack) failures++;
        for (int i = 0; i < n; i++) begin
          sent[i] = 8'($urandom);
          byte_out(sent[i], ack);
          checks++;
          if (ack != (i < 4)) begin failures++; $display("ack byte %0d = %b", i, ack); end
        end
        stop_c();
        xfer(32'h8, 0, 0, rd); checks++;
        if (rd[4:2] != 3'((n > 4) ? 4 : n)) begin failures++; $display("count %0d", rd[4:2]); end
        for (int i = 0; i < ((n > 4) ? 4 : n); i++) begin
          xfer(32'h0, 0, 0, rd); checks++;
          if (rd !== {23'd0, 1'b1, sent[i]}) begin failures++; $display("rx %h vs %h", rd, sent[i]); end
        end
        xfer(32'h0, 0, 0, rd); checks++; if (rd !== 0) failures++;
      end else if (kind == 2) begin
        // read 1..3 bytes of TXDATA
        automatic int n = $urandom_range(1, 3);
        t = 8'($urandom);
        xfer(32'h4, 1, 32'(t), rd);
        xfer(32'h4, 0, 0, rd); checks++; if (rd !== 32'(t)) failures++;
        start_c();
        byte_out({7'h42, 1'b1}, ack); checks++; if (!ack) failures++;
        for (int i = 0; i < n; i++) begin
          byte_in(i != n - 1, v); checks++;
          if (v !== t) begin failures++; $display("tx %h vs %h", v, t); end
        end
        stop_c();
      end else begin
        // other address: ignored
        start_c();
        byte_out({7'h42 ^ 7'(1 << $urandom_range(0, 6)), 1'b0}, ack); checks++; if (ack) failures++;
        byte_out(8'($urandom), ack); checks++; if (ack) failures++;
        stop_c();
        xfer(32'h8, 0, 0, rd); checks++; if (rd !== 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

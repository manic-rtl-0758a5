// tb_vdf_rename_table: random writes, slot updates and clears of the rename
// table against a shadow copy, including the rule that a destination write
// beats a slot update of the same register in the same cycle.
module tb_vdf_rename_table;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, wr_en, u0, u1;
  logic [3:0] ar, br, wr, r0, r1;
  logic [2:0] s0, s1;
  rename_t rda, rdb, wd;
  rename_t sh [16];
  int checks = 0, failures = 0;
  vdf_rename_table dut (.clk, .rst_n, .clear, .rd_a_reg(ar), .rd_a(rda), .rd_b_reg(br), .rd_b(rdb),
                        .wr_en, .wr_reg(wr), .wr_data(wd), .upd0_en(u0), .upd0_reg(r0), .upd0_slot(s0),
                        .upd1_en(u1), .upd1_reg(r1), .upd1_slot(s1));
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    clear = 0; wr_en = 0; u0 = 0; u1 = 0; ar = 0; br = 0; wr = 0; r0 = 0; r1 = 0; s0 = 0; s1 = 0; wd = '0;
    for (int i = 0; i < 16; i++) sh[i] = '0;
    #12 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ar = 4'($urandom); br = 4'($urandom);
      #1;
      checks += 2;
      if (rda !== sh[ar]) failures++;
      if (rdb !== sh[br]) failures++;
      clear = ($urandom_range(0, 40) == 0);
      wr_en = $urandom_range(0, 1); wr = 4'($urandom); wd = rename_t'($urandom);
      u0 = $urandom_range(0, 1); r0 = 4'($urandom); s0 = 3'($urandom);
      u1 = $urandom_range(0, 1); r1 = (k % 3 == 0) ? wr : 4'($urandom); s1 = 3'($urandom);
      if (r1 == r0) u1 = 0;
      @(posedge clk); #1;
      if (clear) begin
        for (int i = 0; i < 16; i++) sh[i] = '0;
      end else begin
        if (u0) begin sh[r0].fbv = 1; sh[r0].slot = s0; end
        if (u1) begin sh[r1].fbv = 1; sh[r1].slot = s1; end
        if (wr_en) sh[wr] = wd;
      end
      clear = 0; wr_en = 0; u0 = 0; u1 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vdf_insn_buffer: random appends, forwarding-slot patches and kill
// patches of the instruction buffer against a shadow copy.
module tb_vdf_insn_buffer;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, f0, f1, k0, k1;
  logic [3:0] wi, fi0, fi1, ki0, ki1, ri;
  logic [2:0] fs0, fs1;
  ib_entry_t we_, re_;
  ib_entry_t sh [16];
  int checks = 0, failures = 0;
  vdf_insn_buffer dut (.clk, .rst_n, .wr_en, .wr_idx(wi), .wr_entry(we_),
                       .fb0_en(f0), .fb0_idx(fi0), .fb0_slot(fs0), .fb1_en(f1), .fb1_idx(fi1), .fb1_slot(fs1),
                       .kill0_en(k0), .kill0_idx(ki0), .kill1_en(k1), .kill1_idx(ki1),
                       .rd_idx(ri), .rd_entry(re_));
  function automatic ib_entry_t rnd();
    ib_entry_t e;
    e = {$urandom, $urandom, $urandom};
    return e;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wr_en = 0; f0 = 0; f1 = 0; k0 = 0; k1 = 0; wi = 0; fi0 = 0; fi1 = 0; ki0 = 0; ki1 = 0; ri = 0;
    fs0 = 0; fs1 = 0; we_ = '0;
    for (int i = 0; i < 16; i++) sh[i] = '0;
    #12 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ri = 4'($urandom);
      #1;
      checks++;
      if (re_ !== sh[ri]) failures++;
      wr_en = $urandom_range(0, 1); wi = 4'($urandom); we_ = rnd();
      f0 = $urandom_range(0, 1); fi0 = 4'($urandom); fs0 = 3'($urandom);
      f1 = $urandom_range(0, 1); fi1 = 4'($urandom); fs1 = 3'($urandom);
      k0 = $urandom_range(0, 1); ki0 = 4'($urandom);
      k1 = $urandom_range(0, 1); ki1 = 4'($urandom);
      // the decoder never patches the entry it appends, nor one entry twice
      if (fi0 == wi) f0 = 0;
      if (fi1 == wi || fi1 == fi0) f1 = 0;
      if (ki0 == wi) k0 = 0;
      if (ki1 == wi) k1 = 0;
      @(posedge clk); #1;
      if (wr_en) sh[wi] = we_;
      if (f0) begin sh[fi0].fb_wb = 1; sh[fi0].fb_slot = fs0; end
      if (f1) begin sh[fi1].fb_wb = 1; sh[fi1].fb_slot = fs1; end
      if (k0) sh[ki0].vrf_wb = 0;
      if (k1) sh[ki1].vrf_wb = 0;
      wr_en = 0; f0 = 0; f1 = 0; k0 = 0; k1 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vdf_decoder: directed checks of decode and rename. Each instruction's
// renamed buffer entry, forwarding-slot patches and kill patches are compared
// with values worked out by hand from the renaming rules; the three reasons
// for starting execution (VFENCE, full window, full forwarding buffer), the
// wait of an instruction needing more slots than remain, VSETVL draining and
// clamping, and the clearing of the rename table after a window are checked.
// exec_done is played by the testbench a few cycles after exec_start.
module tb_vdf_decoder;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  vinsn_t in_insn; logic [31:0] in_scalar;
  logic ib_wr_en, f0, f1, k0, k1;
  logic [3:0] wi, fi0, fi1, ki0, ki1;
  logic [2:0] fs0, fs1;
  ib_entry_t we_;
  logic exec_start, exec_done, busy;
  logic [4:0] exec_count;
  logic [6:0] vl;

  vdf_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_insn, .in_scalar,
    .ib_wr_en, .ib_wr_idx(wi), .ib_wr_entry(we_),
    .ib_fb0_en(f0), .ib_fb0_idx(fi0), .ib_fb0_slot(fs0), .ib_fb1_en(f1), .ib_fb1_idx(fi1), .ib_fb1_slot(fs1),
    .ib_kill0_en(k0), .ib_kill0_idx(ki0), .ib_kill1_en(k1), .ib_kill1_idx(ki1),
    .exec_start, .exec_count, .exec_done, .vl, .busy);

  int checks = 0, failures = 0;
  int starts = 0, last_count = 0;

  // execution stand-in: done 5 cycles after start
  int dcnt = 0;
  always_ff @(posedge clk) begin
    if (exec_start) begin starts <= starts + 1; last_count <= int'(exec_count); dcnt <= 5; end
    else if (dcnt > 0) dcnt <= dcnt - 1;
  end
  assign exec_done = (dcnt == 1);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic vinsn_t mk(vop_e op, int vd, int vs1, int vs2, bit k1_ = 0, bit k2_ = 0, bit sb = 0);
    vinsn_t i = '0;
    i.op = op; i.vd = 4'(vd); i.vs1 = 4'(vs1); i.vs2 = 4'(vs2);
    i.kill1 = k1_; i.kill2 = k2_; i.scalar_b = sb;
    return i;
  endfunction

  // snapshot of the decoder outputs in the accepting cycle
  ib_entry_t e; logic sf0, sf1, sk0, sk1; logic [3:0] sfi0, sfi1, ski0, ski1, swi; logic [2:0] sfs0, sfs1;

  // offer one instruction for one cycle; returns whether it was accepted
  task automatic offer(vinsn_t i, logic [31:0] s, output bit acc);
    @(negedge clk);
    in_insn = i; in_scalar = s; in_valid = 1;
    #1;
    acc = in_ready;
    e = we_; swi = wi; sf0 = f0; sfi0 = fi0; sfs0 = fs0; sf1 = f1; sfi1 = fi1; sfs1 = fs1;
    sk0 = k0; ski0 = ki0; sk1 = k1; ski1 = ki1;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic send(vinsn_t i, logic [31:0] s);
    bit acc;
    int n = 0;
    do begin offer(i, s, acc); n++; end while (!acc && n < 50);
    check(acc, "instruction accepted");
  endtask

  task automatic wait_idle();
    int n = 0;
    while (busy && n < 100) begin @(posedge clk); n++; end
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit acc;
  initial begin
    in_valid = 0; in_insn = '0; in_scalar = 0;
    #22 rst_n = 1;

    // ---- window 1: renaming
    send(mk(OP_VADD, 1, 0, 2), 0);
    check(swi == 0 && e.a.kind == SRC_VRF && e.a.vreg == 0 && e.b.kind == SRC_VRF && e.b.vreg == 2, "i0 sources from VRF");
    check(e.vrf_wb && !e.fb_wb && !sf0 && !sf1, "i0 writes VRF only, no patches");
    send(mk(OP_VMUL, 3, 1, 1), 0);
    check(swi == 1 && e.a.kind == SRC_FB && e.a.slot == 0 && e.b.kind == SRC_FB && e.b.slot == 0, "i1 reads slot 0 twice");
    check(sf0 && sfi0 == 0 && sfs0 == 0 && !sf1, "i0 gets slot 0 once");
    send(mk(OP_VSUB, 4, 1, 3, 1, 0), 0);
    check(e.a.kind == SRC_FB && e.a.slot == 0 && e.b.kind == SRC_FB && e.b.slot == 1, "i2 reads slots 0 and 1");
    check(!sf0 && sf1 && sfi1 == 1 && sfs1 == 1, "i1 gets slot 1");
    check(sk0 && ski0 == 0 && !sk1, "kill of v1 clears i0 VRF writeback");
    send(mk(OP_VADD, 5, 7, 7, 0, 0, 1), 32'h1234);
    check(e.a.kind == SRC_VRF && e.b.kind == SRC_SCALAR && e.scalar == 32'h1234, "scalar operand");
    send(mk(OP_VSTORE, 0, 4, 0, 1), 32'h100);
    check(e.a.kind == SRC_FB && e.a.slot == 2 && e.b.kind == SRC_NONE && !e.vrf_wb, "store data from new slot 2");
    check(sf0 && sfi0 == 2 && sfs0 == 2 && sk0 && ski0 == 2, "i2 gets slot 2 and is killed");
    check(starts == 0 && busy, "no start before the fence");
    send(mk(OP_VFENCE, 0, 0, 0), 0);
    repeat (2) @(posedge clk);
    check(starts == 1 && last_count == 5, "VFENCE starts a window of 5");
    offer(mk(OP_VADD, 6, 1, 1), 0, acc);
    check(!acc, "no decode while executing");
    wait_idle();
    check(!busy, "idle after exec_done");

    // ---- rename table cleared: v1 comes from the VRF again
    send(mk(OP_VADD, 6, 1, 3), 0);
    check(swi == 0 && e.a.kind == SRC_VRF && e.b.kind == SRC_VRF, "rename table cleared after window");

    // ---- window full: 15 more independent instructions
    for (int k = 1; k < 16; k++) send(mk(OP_VXOR, 8, 9, 10), 0);
    repeat (2) @(posedge clk);
    check(starts == 2 && last_count == 16, "full window starts execution");
    wait_idle();

    // ---- forwarding buffer full: a chain where every instruction allocates one slot
    for (int k = 0; k < 9; k++) send(mk(OP_VADD, (k + 1) % 16, k, k), 0);
    repeat (2) @(posedge clk);
    check(starts == 3 && last_count == 9, "eighth allocated slot starts execution");
    wait_idle();

    // ---- an instruction needing two slots with one left waits for the next window
    for (int k = 0; k < 7; k++) send(mk(OP_VADD, k + 1, k, k), 0);       // slots 0..5 used
    send(mk(OP_VADD, 12, 11, 11), 0);                                    // independent
    send(mk(OP_VADD, 13, 11, 11), 0);                                    // independent
    send(mk(OP_VADD, 14, 12, 13), 0);                                    // needs 2: 6 + 2 = 8 -> fits, starts
    repeat (2) @(posedge clk);
    check(starts == 4 && last_count == 10, "exactly full buffer starts execution");
    wait_idle();
    for (int k = 0; k < 8; k++) send(mk(OP_VADD, k + 1, k, k), 0);       // slots 0..6 used
    send(mk(OP_VADD, 12, 11, 11), 0);
    send(mk(OP_VADD, 13, 11, 11), 0);
    offer(mk(OP_VADD, 14, 12, 13), 0, acc);                              // needs 2, 1 left
    check(!acc, "instruction needing two slots with one left is held");
    repeat (2) @(posedge clk);
    check(starts == 5 && last_count == 10, "held instruction starts execution");
    wait_idle();
    send(mk(OP_VADD, 14, 12, 13), 0);
    check(swi == 0 && e.a.kind == SRC_VRF && e.b.kind == SRC_VRF, "held instruction renamed in new window");

    // ---- VSETVL drains the window, then sets and clamps vl
    check(vl == 64, "reset vector length is 64");
    offer(mk(OP_VSETVL, 0, 0, 0), 20, acc);
    check(!acc, "VSETVL waits for a non-empty window");
    wait_idle();
    send(mk(OP_VSETVL, 0, 0, 0), 20);
    #1 check(vl == 20, "vl set to 20");
    send(mk(OP_VSETVL, 0, 0, 0), 1000);
    #1 check(vl == 64, "vl clamped to 64");
    check(starts == 6, "VSETVL started the pending window");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

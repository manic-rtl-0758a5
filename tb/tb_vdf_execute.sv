// tb_vdf_execute: the execute pipeline alone, fed from a testbench-held
// instruction buffer with hand-renamed windows, with the real forwarding
// buffer and VRF and a data memory answering after a random 1-3 cycles.
// Window A places consumers 1, 2, 3 and 4 instructions behind their producer
// (bypass from VExecute, VMemory, VWriteback, then the forwarding buffer),
// uses a load result right away (VGate stall), reads two VRF operands
// (two-cycle issue), writes a killed value only to the forwarding buffer and
// stores a result. Expected VRF and memory contents are computed per element
// in program order. Window B, five ALU instructions with one VRF operand each
// at vl = 64, must take 5*64 cycles plus a drain of at most 6 cycles.
module tb_vdf_execute;
  import manic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic exec_start, exec_done;
  logic [4:0] exec_count;
  logic [6:0] vl;
  logic [3:0] ib_rd_idx;
  ib_entry_t ib [16];
  ib_entry_t ib_rd_entry;
  logic fb_we; logic [2:0] fb_waddr, fra, frb; logic [31:0] fb_wdata, fda, fdb;
  logic vrf_re, vrf_we; logic [9:0] vrf_raddr, vrf_waddr; logic [31:0] vrf_rdata, vrf_wdata;
  logic dreq_valid, dreq_ready, drsp_valid; mem_req_t dreq; logic [31:0] drsp_rdata;

  assign ib_rd_entry = ib[ib_rd_idx];

  vdf_execute dut (.clk, .rst_n, .exec_start, .exec_count, .vl, .exec_done,
    .ib_rd_idx, .ib_rd_entry, .fb_we, .fb_waddr, .fb_wdata, .fb_raddr_a(fra), .fb_rdata_a(fda),
    .fb_raddr_b(frb), .fb_rdata_b(fdb), .vrf_re, .vrf_raddr, .vrf_rdata, .vrf_we, .vrf_waddr, .vrf_wdata,
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp_rdata);
  vdf_fwd_buffer u_fb (.clk, .rst_n, .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr_a(fra), .rdata_a(fda), .raddr_b(frb), .rdata_b(fdb));
  vrf u_vrf (.clk, .rst_n, .re(vrf_re), .raddr(vrf_raddr), .rdata(vrf_rdata),
    .we(vrf_we), .waddr(vrf_waddr), .wdata(vrf_wdata));

  logic [31:0] mem [1024];
  int lat; logic mbusy; mem_req_t mcur;
  assign dreq_ready = !mbusy;
  always_ff @(posedge clk) begin
    drsp_valid <= 1'b0;
    if (!rst_n) mbusy <= 1'b0;
    else if (!mbusy) begin
      if (dreq_valid) begin mbusy <= 1'b1; mcur <= dreq; lat <= $urandom_range(0, 2); end
    end else if (lat == 0) begin
      mbusy <= 1'b0; drsp_valid <= 1'b1;
      if (mcur.we) mem[mcur.addr[11:2]] <= mcur.wdata;
      drsp_rdata <= mcur.we ? 32'd0 : mem[mcur.addr[11:2]];
    end else lat <= lat - 1;
  end

  int checks = 0, failures = 0, gstalls = 0, dual = 0;
  always @(posedge clk) begin
    gstalls += int'(dut.gate_stall);
    dual    += int'(vrf_re && dut.two_reads && !dut.half_q);
  end

  function automatic src_t vr(int r);  src_t s = '0; s.kind = SRC_VRF; s.vreg = 4'(r); return s; endfunction
  function automatic src_t fb(int k);  src_t s = '0; s.kind = SRC_FB;  s.slot = 3'(k); return s; endfunction
  function automatic src_t sc();       src_t s = '0; s.kind = SRC_SCALAR; return s; endfunction
  function automatic ib_entry_t ent(vop_e op, int vd, src_t a, src_t b, logic [31:0] s,
                                    bit vwb, bit fwb, int slot);
    ib_entry_t e = '0;
    e.op = op; e.vd = 4'(vd); e.a = a; e.b = b; e.scalar = s;
    e.vrf_wb = vwb; e.fb_wb = fwb; e.fb_slot = 3'(slot);
    return e;
  endfunction

  task automatic run(int n, int len, output int cyc);
    int t0;
    @(negedge clk);
    exec_count = 5'(n); vl = 7'(len); exec_start = 1;
    @(negedge clk);
    exec_start = 0;
    t0 = int'($time);
    while (!exec_done) @(negedge clk);
    cyc = (int'($time) - t0) / 10 + 1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] v0 [64], v1 [64], v5 [64], v6 [64];
  logic [31:0] old2 [64];
  int cyc;
  initial begin
    exec_start = 0; exec_count = 0; vl = 0;
    for (int i = 0; i < 16; i++) ib[i] = '0;
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    #22 rst_n = 1;
    // VRF contents: v0 and v5 random, the rest random too
    for (int e = 0; e < 64; e++) begin
      for (int r = 0; r < 16; r++) u_vrf.mem[r*64 + e] = $urandom;
      v0[e] = u_vrf.mem[e]; v5[e] = u_vrf.mem[5*64 + e]; v6[e] = u_vrf.mem[6*64 + e];
      old2[e] = u_vrf.mem[2*64 + e];
    end
    // ---- window A (vl = 20)
    // i0: t0 = v0 + 3                      -> slot 0 only (killed)
    // i1: v2... no: v3 = t0 ^ v5           -> VRF (distance 1 bypass)
    // i2: v4 = t0 - v6                     -> VRF (distance 2)
    // i3: v7 = t0 * 5                      -> VRF and slot 1 (distance 3)
    // i4: v8 = t0 | v0                     -> VRF (distance 4: from buffer)
    // i5: t2 = load [0x200 + 4e]           -> slot 2 only
    // i6: v9 = t2 + t1                     -> VRF (load-use stall)
    // i7: v10 = v5 + v6                    -> VRF (two VRF reads)
    // i8: store t1 -> [0x800 + 4e]
    ib[0] = ent(OP_VADD,  2, vr(0), sc(),    32'd3,     0, 1, 0);
    ib[1] = ent(OP_VXOR,  3, fb(0), vr(5),   0,         1, 0, 0);
    ib[2] = ent(OP_VSUB,  4, fb(0), vr(6),   0,         1, 0, 0);
    ib[3] = ent(OP_VMUL,  7, fb(0), sc(),    32'd5,     1, 1, 1);
    ib[4] = ent(OP_VOR,   8, fb(0), vr(0),   0,         1, 0, 0);
    ib[5] = ent(OP_VLOAD, 1, '0,    '0,      32'h200,   0, 1, 2);
    ib[6] = ent(OP_VADD,  9, fb(2), fb(1),   0,         1, 0, 0);
    ib[7] = ent(OP_VADD, 10, vr(5), vr(6),   0,         1, 0, 0);
    ib[8] = ent(OP_VSTORE, 0, fb(1), '0,     32'h800,   0, 0, 0);
    run(9, 20, cyc);
    repeat (2) @(posedge clk);
    for (int e = 0; e < 64; e++) begin
      automatic logic [31:0] t0v = v0[e] + 3, t1v = t0v * 5, t2v = mem[128 + e];
      automatic bit in = e < 20;
      checks += 8;
      if (u_vrf.mem[2*64+e]  !== old2[e]) failures++;                       // killed: VRF untouched
      if (in && u_vrf.mem[3*64+e]  !== (t0v ^ v5[e])) failures++;
      if (in && u_vrf.mem[4*64+e]  !== (t0v - v6[e])) failures++;
      if (in && u_vrf.mem[7*64+e]  !== t1v) failures++;
      if (in && u_vrf.mem[8*64+e]  !== (t0v | v0[e])) failures++;
      if (in && u_vrf.mem[9*64+e]  !== (t2v + t1v)) failures++;
      if (in && u_vrf.mem[10*64+e] !== (v5[e] + v6[e])) failures++;
      if (in && mem[512 + e] !== t1v) failures++;
    end
    checks++;
    if (gstalls == 0) begin failures++; $display("no load-use stall seen"); end
    checks++;
    if (dual != 20) begin failures++; $display("double VRF reads: %0d, expected 20", dual); end
    checks++;
    if (u_vrf.mem[3*64+20] === (v0[20] + 3 ^ v5[20])) failures++;         // beyond vl untouched

    // ---- window B: 5 ALU instructions, vl = 64, timed
    ib[0] = ent(OP_VADD, 11, vr(0), sc(),  32'd1, 0, 1, 0);
    ib[1] = ent(OP_VSLL, 12, fb(0), sc(),  32'd2, 1, 1, 1);
    ib[2] = ent(OP_VSUB, 13, fb(1), vr(5), 0,     1, 1, 2);
    ib[3] = ent(OP_VMAX, 14, fb(2), fb(0), 0,     1, 0, 0);
    ib[4] = ent(OP_VAND, 15, vr(6), fb(1), 0,     1, 0, 0);
    run(5, 64, cyc);
    checks++;
    if (cyc < 5 * 64 || cyc > 5 * 64 + 6) begin failures++; $display("window B took %0d cycles", cyc); end
    repeat (2) @(posedge clk);
    for (int e = 0; e < 64; e++) begin
      automatic logic [31:0] a = v0[e] + 1, b = a << 2, c = b - v5[e];
      automatic logic [31:0] d = ($signed(c) < $signed(a)) ? a : c;
      checks += 4;
      if (u_vrf.mem[12*64+e] !== b) failures++;
      if (u_vrf.mem[13*64+e] !== c) failures++;
      if (u_vrf.mem[14*64+e] !== d) failures++;
      if (u_vrf.mem[15*64+e] !== (v6[e] & b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

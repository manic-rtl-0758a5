// tb_manic_soc: end-to-end test of the whole microcontroller at its default
// sizes. The testbench plays the scalar core: it writes input vectors into
// SRAM and MRAM through the data port, issues vector kernels to the
// coprocessor, waits for the coprocessor to go idle and reads the results
// back through the data port, comparing them with a sequential model of the
// vector instructions. While the coprocessor runs, it also fetches through
// the instruction cache and reads through the data port, so that both
// arbiters see contention. It drives the GPIO pins and an I2C controller
// model, and switches the caches and the MRAM power domain off and on.
//
// Every mechanism of the design is counted and must happen at least once:
// the three window-start triggers (vfence, full instruction buffer, fully
// allocated forwarding buffer) and the "does not fit" start, kill hints,
// the three bypass distances, forwarding-buffer reads, load-use stalls in
// VGate, memory stalls in VMemory, D-cache and I-cache hits and misses,
// cache bypass, MRAM access with power on and off, arbiter contention, a
// shortened vector length, GPIO and I2C traffic. The window of 16 vector
// operations that read only the VRF must run at one element operation per
// cycle (1024 cycles for 16 x 64 elements, plus pipeline fill).
module tb_manic_soc;
  import manic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic icache_en, dcache_en, mram_en;
  logic cp_valid, cp_ready, cp_busy; vinsn_t cp_insn; logic [31:0] cp_scalar;
  logic if_req_valid, if_req_ready, if_rsp_valid; mem_req_t if_req; logic [31:0] if_rsp_rdata;
  logic dm_req_valid, dm_req_ready, dm_rsp_valid; mem_req_t dm_req; logic [31:0] dm_rsp_rdata;
  logic io_req_valid, io_req_ready, io_rsp_valid; mem_req_t io_req; logic [31:0] io_rsp_rdata;
  logic [15:0] gpio_in, gpio_out, gpio_oe;
  logic scl, sda_c, sda_oe, sda;
  assign sda = sda_c && !sda_oe;

  manic_soc dut (
    .clk, .rst_n, .icache_en, .dcache_en, .mram_en,
    .cp_valid, .cp_ready, .cp_insn, .cp_scalar, .cp_busy,
    .if_req_valid, .if_req_ready, .if_req, .if_rsp_valid, .if_rsp_rdata,
    .dm_req_valid, .dm_req_ready, .dm_req, .dm_rsp_valid, .dm_rsp_rdata,
    .io_req_valid, .io_req_ready, .io_req, .io_rsp_valid, .io_rsp_rdata,
    .gpio_in, .gpio_out, .gpio_oe, .scl_in(scl), .sda_in(sda), .sda_oe
  );

  int checks = 0, failures = 0;
  localparam int VL = 64;
  localparam logic [31:0] SRAM = 32'h1000_0000, MRAM = 32'h2000_0000;

  // ------------------------------------------------------------ mechanism counters
  int n_fence, n_wfull, n_fbfull, n_nofit, n_kill, n_byp_x, n_byp_m, n_byp_w, n_fb_rd;
  int n_gate_stall, n_mem_stall, n_dc_hit, n_dc_miss, n_ic_hit, n_ic_miss, n_dc_byp, n_ic_byp;
  int n_mram_on, n_mram_off, n_darb, n_marb, n_setvl, n_gpio, n_i2c;

  function automatic int fb_src(src_t s);
    if (s.kind != SRC_FB) return 0;
    if (dut.u_vdf.u_exe.x_valid && dut.u_vdf.u_exe.x_fb_wb && dut.u_vdf.u_exe.x_slot == s.slot) return 1;
    if (dut.u_vdf.u_exe.m_valid && dut.u_vdf.u_exe.m_fb_wb && dut.u_vdf.u_exe.m_slot == s.slot) return 2;
    if (dut.u_vdf.u_exe.w_valid && dut.u_vdf.u_exe.w_fb_wb && dut.u_vdf.u_exe.w_slot == s.slot) return 3;
    return 4;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.u_vdf.u_dec.go_exec) begin
      if (dut.u_vdf.u_dec.op == OP_VFENCE) n_fence++;
      else if (!dut.u_vdf.u_dec.accept) begin if (dut.u_vdf.u_dec.is_vec) n_nofit++; end
      else if (32'(dut.u_vdf.u_dec.count_q) + 1 == VDF_WINDOW) n_wfull++;
      else n_fbfull++;
    end
    if (cp_valid && cp_ready && cp_insn.op == OP_VSETVL) n_setvl++;
    if (dut.u_vdf.u_dec.ib_kill0_en) n_kill++;
    if (dut.u_vdf.u_dec.ib_kill1_en) n_kill++;
    if (dut.u_vdf.u_exe.g_adv) begin
      int ka, kb;
      ka = fb_src(dut.u_vdf.u_exe.g_e.a);
      kb = fb_src(dut.u_vdf.u_exe.g_e.b);
      if (ka == 1 || kb == 1) n_byp_x++;
      if (ka == 2 || kb == 2) n_byp_m++;
      if (ka == 3 || kb == 3) n_byp_w++;
      if (ka == 4 || kb == 4) n_fb_rd++;
    end
    if (dut.u_vdf.u_exe.gate_stall) n_gate_stall++;
    if (dut.u_vdf.u_exe.mem_stall) n_mem_stall++;
    if (int'(dut.u_dcache.state_q) == 1 && !dut.u_dcache.cur_q.we)
      if (dut.u_dcache.hit) n_dc_hit++; else n_dc_miss++;
    if (int'(dut.u_icache.state_q) == 1)
      if (dut.u_icache.hit) n_ic_hit++; else n_ic_miss++;
    if (dut.dc_req_valid && dut.dc_req_ready && !dcache_en) n_dc_byp++;
    if (if_req_valid && if_req_ready && !icache_en) n_ic_byp++;
    if (dut.u_mem.v_mram && dut.u_mem.r_mram) if (mram_en) n_mram_on++; else n_mram_off++;
    if (dut.da_req_valid == 2'b11) n_darb++;
    if (dut.ma_req_valid == 2'b11) n_marb++;
    if (dut.g_req_valid && dut.g_req_ready) n_gpio++;
    if (dut.i_req_valid && dut.i_req_ready) n_i2c++;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference model
  logic [31:0] mv [VDF_NREGS][VL];
  logic [31:0] mm [logic [31:0]];     // word address -> data
  int vl_m = VL;

  function automatic logic [31:0] alu_ref(vop_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_VADD:  return a + b;
      OP_VSUB:  return a - b;
      OP_VAND:  return a & b;
      OP_VOR:   return a | b;
      OP_VXOR:  return a ^ b;
      OP_VSLL:  return a << b[4:0];
      OP_VSRL:  return a >> b[4:0];
      OP_VSRA:  return $signed(a) >>> b[4:0];
      OP_VSLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_VSLTU: return (a < b) ? 1 : 0;
      OP_VMIN:  return ($signed(a) < $signed(b)) ? a : b;
      OP_VMAX:  return ($signed(a) < $signed(b)) ? b : a;
      OP_VMUL:  return a * b;
      default:  return 0;
    endcase
  endfunction

  function automatic logic [31:0] mm_rd(logic [31:0] a);
    return mm.exists(a) ? mm[a] : 32'd0;
  endfunction

  // ------------------------------------------------------------ core ports
  task automatic vi(vop_e op, int vd, int vs1, int vs2, logic k1, logic k2, logic sb, logic [31:0] s);
    vinsn_t in;
    in = '0; in.op = op; in.vd = 4'(vd); in.vs1 = 4'(vs1); in.vs2 = 4'(vs2);
    in.kill1 = k1; in.kill2 = k2; in.scalar_b = sb;
    @(negedge clk);
    cp_valid = 1; cp_insn = in; cp_scalar = s;
    #1 while (!cp_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 cp_valid = 0;
    // sequential model
    if (op == OP_VSETVL) vl_m = (s > VL) ? VL : int'(s);
    else if (op == OP_VLOAD)  for (int e = 0; e < vl_m; e++) mv[vd][e] = mm_rd(s + 32'(4 * e));
    else if (op == OP_VSTORE) for (int e = 0; e < vl_m; e++) mm[s + 32'(4 * e)] = mv[vs1][e];
    else if (op_is_alu(op) || op_is_mul(op)) begin
      logic [31:0] r [VL];
      for (int e = 0; e < vl_m; e++) r[e] = alu_ref(op, mv[vs1][e], sb ? s : mv[vs2][e]);
      for (int e = 0; e < vl_m; e++) mv[vd][e] = r[e];
    end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (cp_busy) @(negedge clk);
  endtask

  task automatic dm(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    dm_req_valid = 1; dm_req.addr = addr; dm_req.we = we; dm_req.be = 4'hF; dm_req.wdata = wd;
    #1 while (!dm_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 dm_req_valid = 0;
    while (!dm_rsp_valid) begin @(posedge clk); #1; end
    rd = dm_rsp_rdata;
  endtask

  task automatic dm_wr(logic [31:0] addr, logic [31:0] wd);
    logic [31:0] rd;
    dm(addr, 1, wd, rd);
    mm[addr] = wd;
  endtask

  task automatic dm_check(logic [31:0] addr, string what);
    logic [31:0] rd;
    dm(addr, 0, 0, rd);
    checks++;
    if (rd !== mm_rd(addr)) begin
      failures++;
      if (failures < 20) $display("%s: [%h] = %h, expected %h", what, addr, rd, mm_rd(addr));
    end
  endtask

  task automatic check_vec(logic [31:0] base, int n, string what);
    for (int e = 0; e < n; e++) dm_check(base + 32'(4 * e), what);
  endtask

  task automatic fetch(logic [31:0] addr, output logic [31:0] rd);
    @(negedge clk);
    if_req_valid = 1; if_req.addr = addr; if_req.we = 0; if_req.be = 4'hF; if_req.wdata = 0;
    #1 while (!if_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 if_req_valid = 0;
    while (!if_rsp_valid) begin @(posedge clk); #1; end
    rd = if_rsp_rdata;
  endtask

  task automatic io(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    io_req_valid = 1; io_req.addr = addr; io_req.we = we; io_req.be = 4'hF; io_req.wdata = wd;
    #1 while (!io_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 io_req_valid = 0;
    while (!io_rsp_valid) begin @(posedge clk); #1; end
    rd = io_rsp_rdata;
  endtask

  // fetches and data reads of words the model knows, while the coprocessor runs
  task automatic core_traffic(logic [31:0] base, int n);
    logic [31:0] rd;
    for (int k = 0; k < n; k++) begin
      automatic logic [31:0] a = base + 32'(4 * $urandom_range(0, VL - 1));
      fetch(a, rd);
      checks++; if (rd !== mm_rd(a)) begin failures++; $display("fetch [%h] = %h", a, rd); end
      dm_check(base + 32'(4 * $urandom_range(0, VL - 1)), "core read");
    end
  endtask

  // ------------------------------------------------------------ I2C controller
  localparam int Q = 10;
  task automatic quarter(); repeat (Q) @(posedge clk); endtask
  task automatic i2c_bit(logic b, output logic r);
    sda_c = b; quarter(); scl = 1; quarter(); r = sda; quarter(); scl = 0; quarter();
  endtask
  task automatic i2c_write(logic [7:0] bytes [], output int acks);
    logic r;
    acks = 0;
    sda_c = 1; quarter(); scl = 1; quarter(); sda_c = 0; quarter(); scl = 0; quarter();
    for (int i = 7; i >= 0; i--) i2c_bit(i == 0 ? 1'b0 : 8'h84 >> i, r);   // 0x42, write
    i2c_bit(1, r); acks += !r;
    foreach (bytes[j]) begin
      for (int i = 7; i >= 0; i--) i2c_bit(bytes[j][i], r);
      i2c_bit(1, r); acks += !r;
    end
    sda_c = 0; quarter(); scl = 1; quarter(); sda_c = 1; quarter(); quarter();
  endtask

  // ------------------------------------------------------------ kernels
  logic [31:0] A, B, C;
  int t_start, t_win;

  // C = A * B + k, with every intermediate forwarded and killed
  task automatic k_mac(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic [31:0] k);
    vi(OP_VLOAD, 1, 0, 0, 0, 0, 0, a);
    vi(OP_VLOAD, 2, 0, 0, 0, 0, 0, b);
    vi(OP_VMUL, 3, 1, 2, 1, 1, 0, 0);
    vi(OP_VADD, 4, 3, 0, 1, 0, 1, k);
    vi(OP_VSTORE, 0, 4, 0, 1, 0, 0, c);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
  endtask

  initial begin
    logic [31:0] rd; int acks; int c0;
    icache_en = 1; dcache_en = 1; mram_en = 1;
    cp_valid = 0; cp_insn = '0; cp_scalar = 0;
    if_req_valid = 0; if_req = '0; dm_req_valid = 0; dm_req = '0; io_req_valid = 0; io_req = '0;
    gpio_in = 16'hA5C3; scl = 1; sda_c = 1;
    for (int r = 0; r < VDF_NREGS; r++) for (int e = 0; e < VL; e++) mv[r][e] = 0;
    #22 rst_n = 1;
    repeat (5) @(posedge clk);

    // ---- IO: GPIO and I2C
    io(32'h0000_0000, 1, 32'h0000_1234, rd);
    io(32'h0000_0004, 1, 32'h0000_00FF, rd);
    io(32'h0000_0008, 0, 0, rd);
    checks += 3;
    if (gpio_out !== 16'h1234 || gpio_oe !== 16'h00FF) failures++;
    if (rd !== 32'h0000_A5C3) failures++;
    io(32'h0000_0000, 0, 0, rd); if (rd !== 32'h1234) failures++;
    begin
      logic [7:0] msg [] = '{8'h4D, 8'h43};
      i2c_write(msg, acks);
      checks++; if (acks != 3) begin failures++; $display("i2c acks %0d", acks); end
      io(32'h0000_0100, 0, 0, rd); checks++; if (rd !== 32'h14D) failures++;
      io(32'h0000_0100, 0, 0, rd); checks++; if (rd !== 32'h143) failures++;
      io(32'h0000_0100, 0, 0, rd); checks++; if (rd !== 32'h0) failures++;
    end

    // ---- boot ROM reads as zero without an image
    fetch(32'h0000_0010, rd); checks++; if (rd !== 0) failures++;

    // ---- input vectors in SRAM
    A = SRAM; B = SRAM + 32'h400; C = SRAM + 32'h800;
    for (int e = 0; e < VL; e++) begin dm_wr(A + 32'(4 * e), $urandom); dm_wr(B + 32'(4 * e), $urandom); end

    // ---- kernel 1: vfence-started window, load-use stalls, kills, contention
    fork
      k_mac(A, B, C, 32'h0000_0100);
      core_traffic(A, 12);
    join
    wait_idle();
    check_vec(C, VL, "mac");

    // ---- kernel 2: 16 VRF-only operations fill the buffer; one element per cycle
    vi(OP_VLOAD, 0, 0, 0, 0, 0, 0, B);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    for (int j = 0; j < 16; j++) begin
      automatic vop_e ops [8] = '{OP_VADD, OP_VSUB, OP_VXOR, OP_VSLL, OP_VSRA, OP_VMIN, OP_VMUL, OP_VSLTU};
      if (j == 15) fork
        begin @(posedge dut.u_vdf.u_dec.exec_start); t_start = $time / 10; end
      join_none
      vi(ops[j % 8], 1 + j % 15, 0, 0, 0, 0, 1, $urandom);
    end
    @(posedge dut.u_vdf.u_exe.exec_done); t_win = $time / 10 - t_start;
    checks++;
    if (t_win < 16 * VL || t_win > 16 * VL + 8) begin failures++; $display("window of 16 took %0d cycles", t_win); end
    wait_idle();
    for (int r = 1; r < 16; r++) vi(OP_VSTORE, 0, r, 0, 0, 0, 0, SRAM + 32'h1000 + 32'(256 * r));
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    for (int r = 1; r < 16; r++) check_vec(SRAM + 32'h1000 + 32'(256 * r), VL, "window");

    // ---- kernel 3: a chain that allocates all forwarding slots
    vi(OP_VADD, 1, 0, 0, 0, 0, 1, 32'd7);
    for (int j = 0; j < 8; j++) vi(j % 2 ? OP_VMUL : OP_VXOR, 2 + j, 1 + j, 0, 1, 0, 1, $urandom);
    vi(OP_VSTORE, 0, 9, 0, 0, 0, 0, SRAM + 32'h2000);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    check_vec(SRAM + 32'h2000, VL, "chain");

    // ---- kernel 4: an operation needing two new slots when only one is left
    vi(OP_VADD, 1, 0, 0, 0, 0, 1, 32'd1);
    vi(OP_VXOR, 2, 0, 0, 0, 0, 1, 32'h5A5A_5A5A);
    vi(OP_VSUB, 3, 0, 0, 0, 0, 1, 32'd3);
    for (int j = 0; j < 6; j++) vi(OP_VADD, 4 + j, 3 + j, 0, 1, 0, 1, 32'(j));
    vi(OP_VADD, 10, 9, 0, 1, 0, 1, 32'd9);
    vi(OP_VADD, 11, 1, 2, 0, 0, 0, 0);
    vi(OP_VSTORE, 0, 11, 0, 0, 0, 0, SRAM + 32'h2100);
    vi(OP_VSTORE, 0, 10, 0, 0, 0, 0, SRAM + 32'h2200);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    check_vec(SRAM + 32'h2100, VL, "nofit");
    check_vec(SRAM + 32'h2200, VL, "nofit");

    // ---- kernel 5: consumers 1, 2, 3 and 5 operations after their producers
    vi(OP_VADD, 1, 0, 0, 0, 0, 1, 32'd11);
    vi(OP_VXOR, 2, 0, 0, 0, 0, 1, 32'hFFFF_0000);
    vi(OP_VSUB, 3, 0, 0, 0, 0, 1, 32'd5);
    vi(OP_VADD, 4, 1, 2, 0, 1, 0, 0);
    vi(OP_VMUL, 5, 4, 3, 1, 0, 0, 0);
    vi(OP_VSUB, 6, 5, 1, 0, 0, 0, 0);
    vi(OP_VSTORE, 0, 6, 0, 1, 0, 0, SRAM + 32'h2300);
    vi(OP_VSTORE, 0, 3, 0, 0, 0, 0, SRAM + 32'h2400);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    check_vec(SRAM + 32'h2300, VL, "distance");
    check_vec(SRAM + 32'h2400, VL, "distance");

    // ---- kernel 6: input in MRAM (write-through writes take the MRAM write time)
    for (int e = 0; e < VL; e++) dm_wr(MRAM + 32'(4 * e), $urandom);
    vi(OP_VLOAD, 5, 0, 0, 0, 0, 0, MRAM);
    vi(OP_VADD, 6, 5, 5, 1, 1, 0, 0);
    vi(OP_VSTORE, 0, 6, 0, 1, 0, 0, SRAM + 32'h2500);
    vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0);
    wait_idle();
    check_vec(SRAM + 32'h2500, VL, "mram");

    // ---- kernel 7: data cache off, shorter vector length
    dcache_en = 0;
    for (int e = 0; e < VL; e++) dm_wr(SRAM + 32'h2600 + 32'(4 * e), 32'hCAFE_0000 + 32'(e));
    vi(OP_VSETVL, 0, 0, 0, 0, 0, 0, 32'd20);
    fork
      k_mac(A, B, SRAM + 32'h2600, 32'h0000_0777);
      core_traffic(B, 6);
    join
    wait_idle();
    check_vec(SRAM + 32'h2600, VL, "no dcache, vl 20");
    vi(OP_VSETVL, 0, 0, 0, 0, 0, 0, 32'd1000);
    checks++; if (dut.u_vdf.u_dec.vl != VL) failures++;

    // ---- MRAM power domain off: reads give zero, writes are lost, data kept
    mram_en = 0;
    dm(MRAM + 32'h8, 0, 0, rd); checks++; if (rd !== 0) failures++;
    dm(MRAM + 32'h8, 1, 32'h1111_2222, rd);
    mram_en = 1;
    dm_check(MRAM + 32'h8, "mram after power-off");
    dcache_en = 1;

    // ---- instruction cache off
    icache_en = 0;
    for (int k = 0; k < 4; k++) begin
      fetch(A + 32'(4 * k), rd); checks++; if (rd !== mm_rd(A + 32'(4 * k))) failures++;
    end
    icache_en = 1;

    // ---- every mechanism must have happened
    begin
      int cnt [string];
      cnt["vfence start"] = n_fence;          cnt["buffer-full start"] = n_wfull;
      cnt["fwd-buffer-full start"] = n_fbfull; cnt["no-fit start"] = n_nofit;
      cnt["kill hint"] = n_kill;              cnt["bypass VExecute"] = n_byp_x;
      cnt["bypass VMemory"] = n_byp_m;        cnt["bypass VWriteback"] = n_byp_w;
      cnt["fwd-buffer read"] = n_fb_rd;       cnt["VGate load-use stall"] = n_gate_stall;
      cnt["VMemory stall"] = n_mem_stall;     cnt["D-cache hit"] = n_dc_hit;
      cnt["D-cache miss"] = n_dc_miss;        cnt["I-cache hit"] = n_ic_hit;
      cnt["I-cache miss"] = n_ic_miss;        cnt["D-cache bypass"] = n_dc_byp;
      cnt["I-cache bypass"] = n_ic_byp;       cnt["MRAM access"] = n_mram_on;
      cnt["MRAM access, power off"] = n_mram_off; cnt["D-side contention"] = n_darb;
      cnt["memory-side contention"] = n_marb; cnt["vsetvl"] = n_setvl;
      cnt["GPIO access"] = n_gpio;            cnt["I2C access"] = n_i2c;
      foreach (cnt[s]) begin
        $display("  %-24s %0d", s, cnt[s]);
        checks++;
        if (cnt[s] == 0) begin failures++; $display("  mechanism never happened: %s", s); end
      end
    end
    $display("window of 16 x %0d elements: %0d cycles", VL, t_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

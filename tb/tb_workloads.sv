// tb_workloads: the vector parts of the evaluated benchmark kernels, run on
// the whole system at its default sizes, with the testbench acting as the
// scalar core (it writes inputs through the data port, issues the vector
// instructions with their scalar operands and reads the results back).
// Results are compared with values computed here directly from the inputs.
//   vector increment  y = x + 1 over 256 words (the peak-efficiency kernel);
//                     every intermediate is forwarded, so the VRF must see no
//                     access at all
//   DMV               y = A x, A 64 x 64 stored by columns, x as scalars
//   DMM               C = A B, 16 x 16, rows of B as vectors, A as scalars,
//                     in the four memory configurations: data in MRAM or
//                     SRAM, data cache on or off (MRAM powered in all four)
//   DConv             y[i] = sum_k w[k] x[i+k], 64 outputs, 5 taps
//   Sort              64 independent columns of 8 values, sorted by an
//                     odd-even transposition network of vmin / vmax
// For each kernel the cycles spent, the element operations executed and the
// VRF reads and writes are printed; a conventional vector unit would make
// two VRF reads and one write per element operation. DMV and DMM must take
// fewer operands from the VRF than from the forwarding buffer and bypasses.
// FFT, DWT, Viterbi and the sparse kernels need strided, indexed or
// permuting vector accesses that this design does not have.
module tb_workloads;
  import manic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic icache_en, dcache_en, mram_en;
  logic cp_valid, cp_ready, cp_busy; vinsn_t cp_insn; logic [31:0] cp_scalar;
  logic if_req_valid, if_req_ready, if_rsp_valid; mem_req_t if_req; logic [31:0] if_rsp_rdata;
  logic dm_req_valid, dm_req_ready, dm_rsp_valid; mem_req_t dm_req; logic [31:0] dm_rsp_rdata;
  logic io_req_valid, io_req_ready, io_rsp_valid; mem_req_t io_req; logic [31:0] io_rsp_rdata;
  logic [15:0] gpio_out, gpio_oe;
  logic sda_oe;

  manic_soc dut (
    .clk, .rst_n, .icache_en, .dcache_en, .mram_en,
    .cp_valid, .cp_ready, .cp_insn, .cp_scalar, .cp_busy,
    .if_req_valid, .if_req_ready, .if_req, .if_rsp_valid, .if_rsp_rdata,
    .dm_req_valid, .dm_req_ready, .dm_req, .dm_rsp_valid, .dm_rsp_rdata,
    .io_req_valid, .io_req_ready, .io_req, .io_rsp_valid, .io_rsp_rdata,
    .gpio_in(16'h0), .gpio_out, .gpio_oe, .scl_in(1'b1), .sda_in(1'b1), .sda_oe
  );

  int checks = 0, failures = 0;
  localparam logic [31:0] SRAM = 32'h1000_0000, MRAM = 32'h2000_0000;

  // ------------------------------------------------------------ activity counters
  longint n_ops, n_vrf_rd, n_vrf_wr, n_fwd;
  function automatic longint fwd_src(src_t s);
    return (s.kind == SRC_FB) ? 1 : 0;
  endfunction
  always @(posedge clk) if (rst_n) begin
    if (dut.u_vdf.u_exe.w_valid) n_ops++;
    if (dut.vrf_re) n_vrf_rd++;
    if (dut.vrf_we) n_vrf_wr++;
    if (dut.u_vdf.u_exe.g_adv)
      n_fwd += fwd_src(dut.u_vdf.u_exe.g_e.a) + fwd_src(dut.u_vdf.u_exe.g_e.b);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ core ports
  task automatic vi(vop_e op, int vd, int vs1, int vs2, logic k1, logic k2, logic sb, logic [31:0] s);
    vinsn_t in;
    in = '0; in.op = op; in.vd = 4'(vd); in.vs1 = 4'(vs1); in.vs2 = 4'(vs2);
    in.kill1 = k1; in.kill2 = k2; in.scalar_b = sb;
    @(negedge clk);
    cp_valid = 1; cp_insn = in; cp_scalar = s;
    #1 while (!cp_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 cp_valid = 0;
  endtask

  task automatic setvl(int n); vi(OP_VSETVL, 0, 0, 0, 0, 0, 0, 32'(n)); endtask
  task automatic fence(); vi(OP_VFENCE, 0, 0, 0, 0, 0, 0, 0); endtask
  task automatic wait_idle(); @(negedge clk); while (cp_busy) @(negedge clk); endtask

  task automatic dm(logic [31:0] addr, logic we, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    dm_req_valid = 1; dm_req.addr = addr; dm_req.we = we; dm_req.be = 4'hF; dm_req.wdata = wd;
    #1 while (!dm_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 dm_req_valid = 0;
    while (!dm_rsp_valid) begin @(posedge clk); #1; end
    rd = dm_rsp_rdata;
  endtask
  task automatic wr(logic [31:0] addr, logic [31:0] wd); logic [31:0] rd; dm(addr, 1, wd, rd); endtask
  task automatic expect_word(logic [31:0] addr, logic [31:0] exp, string what);
    logic [31:0] rd;
    dm(addr, 0, 0, rd);
    checks++;
    if (rd !== exp) begin
      failures++;
      if (failures < 20) $display("%s: [%h] = %h, expected %h", what, addr, rd, exp);
    end
  endtask

  // ------------------------------------------------------------ statistics
  longint t0, o0, r0, w0, f0;
  task automatic mark(); t0 = $time / 10; o0 = n_ops; r0 = n_vrf_rd; w0 = n_vrf_wr; f0 = n_fwd; endtask
  task automatic report(string name, output longint ops, output longint rd, output longint fwd);
    longint cyc;
    cyc = $time / 10 - t0; ops = n_ops - o0; rd = n_vrf_rd - r0; fwd = n_fwd - f0;
    $display("%-26s cycles %7d  element ops %6d  VRF reads %6d writes %6d  forwarded operands %6d  (vector unit: about %0d VRF accesses)",
             name, cyc, ops, rd, n_vrf_wr - w0, fwd, 3 * ops);
  endtask

  // ------------------------------------------------------------ data
  logic [31:0] x [256], A [64][64], xv [64], B16 [16][16], A16 [16][16], w [5], s8 [8][64];

  initial begin
    longint ops, rd, fwd;
    icache_en = 1; dcache_en = 1; mram_en = 1;
    cp_valid = 0; cp_insn = '0; cp_scalar = 0;
    if_req_valid = 0; if_req = '0; dm_req_valid = 0; dm_req = '0; io_req_valid = 0; io_req = '0;
    n_ops = 0; n_vrf_rd = 0; n_vrf_wr = 0; n_fwd = 0;
    #22 rst_n = 1;
    repeat (5) @(posedge clk);

    // ---------------------------------------------------- vector increment
    for (int i = 0; i < 256; i++) begin x[i] = $urandom; wr(SRAM + 32'(4 * i), x[i]); end
    mark();
    setvl(64);
    for (int c = 0; c < 4; c++) begin
      vi(OP_VLOAD, 1, 0, 0, 0, 0, 0, SRAM + 32'(256 * c));
      vi(OP_VADD, 2, 1, 0, 1, 0, 1, 32'd1);
      vi(OP_VSTORE, 0, 2, 0, 1, 0, 0, SRAM + 32'h1000 + 32'(256 * c));
    end
    fence(); wait_idle();
    report("vector increment", ops, rd, fwd);
    checks += 2;
    if (ops != 3 * 256) failures++;
    if (rd != 0 || n_vrf_wr != w0) begin failures++; $display("increment touched the VRF"); end
    for (int i = 0; i < 256; i++) expect_word(SRAM + 32'h1000 + 32'(4 * i), x[i] + 1, "increment");

    // ---------------------------------------------------- DMV, 64 x 64
    for (int j = 0; j < 64; j++) begin
      xv[j] = $urandom;
      for (int i = 0; i < 64; i++) begin A[i][j] = $urandom; wr(SRAM + 32'h2000 + 32'(4 * (64 * j + i)), A[i][j]); end
    end
    mark();
    for (int j = 0; j < 64; j++) begin
      vi(OP_VLOAD, 1, 0, 0, 0, 0, 0, SRAM + 32'h2000 + 32'(256 * j));
      if (j == 0) vi(OP_VMUL, 3, 1, 0, 1, 0, 1, xv[j]);
      else begin
        vi(OP_VMUL, 2, 1, 0, 1, 0, 1, xv[j]);
        vi(OP_VADD, 3, 3, 2, 1, 1, 0, 0);
      end
    end
    vi(OP_VSTORE, 0, 3, 0, 1, 0, 0, SRAM + 32'h6000);
    fence(); wait_idle();
    report("DMV 64x64", ops, rd, fwd);
    checks++; if (rd >= fwd) begin failures++; $display("DMV: VRF reads %0d >= forwarded %0d", rd, fwd); end
    for (int i = 0; i < 64; i++) begin
      automatic logic [31:0] acc = 0;
      for (int j = 0; j < 64; j++) acc += A[i][j] * xv[j];
      expect_word(SRAM + 32'h6000 + 32'(4 * i), acc, "DMV");
    end

    // ---------------------------------------------------- DMM, 16 x 16, four configurations
    for (int i = 0; i < 16; i++) for (int k = 0; k < 16; k++) begin A16[i][k] = $urandom; B16[i][k] = $urandom; end
    for (int cfg = 1; cfg <= 4; cfg++) begin
      automatic logic [31:0] base = (cfg <= 2) ? MRAM + 32'h1000 : SRAM + 32'h7000;
      string name;
      dcache_en = (cfg % 2 == 1);
      for (int k = 0; k < 16; k++) for (int j = 0; j < 16; j++) wr(base + 32'(4 * (16 * k + j)), B16[k][j]);
      mark();
      setvl(16);
      for (int i = 0; i < 16; i++) begin
        for (int k = 0; k < 16; k++) begin
          vi(OP_VLOAD, 1, 0, 0, 0, 0, 0, base + 32'(64 * k));
          if (k == 0) vi(OP_VMUL, 3, 1, 0, 1, 0, 1, A16[i][k]);
          else begin
            vi(OP_VMUL, 2, 1, 0, 1, 0, 1, A16[i][k]);
            vi(OP_VADD, 3, 3, 2, 1, 1, 0, 0);
          end
        end
        vi(OP_VSTORE, 0, 3, 0, 1, 0, 0, base + 32'h400 + 32'(64 * i));
      end
      fence(); wait_idle();
      name = $sformatf("DMM 16x16, config %0d", cfg);
      report(name, ops, rd, fwd);
      checks++; if (rd >= fwd) begin failures++; $display("DMM: VRF reads %0d >= forwarded %0d", rd, fwd); end
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
        automatic logic [31:0] acc = 0;
        for (int k = 0; k < 16; k++) acc += A16[i][k] * B16[k][j];
        expect_word(base + 32'h400 + 32'(4 * (16 * i + j)), acc, name);
      end
    end
    dcache_en = 1;

    // ---------------------------------------------------- DConv, 64 outputs, 5 taps
    for (int i = 0; i < 68; i++) begin x[i] = $urandom; wr(SRAM + 32'h8000 + 32'(4 * i), x[i]); end
    for (int k = 0; k < 5; k++) w[k] = $urandom;
    mark();
    setvl(64);
    for (int k = 0; k < 5; k++) begin
      vi(OP_VLOAD, 1, 0, 0, 0, 0, 0, SRAM + 32'h8000 + 32'(4 * k));
      if (k == 0) vi(OP_VMUL, 3, 1, 0, 1, 0, 1, w[k]);
      else begin
        vi(OP_VMUL, 2, 1, 0, 1, 0, 1, w[k]);
        vi(OP_VADD, 3, 3, 2, 1, 1, 0, 0);
      end
    end
    vi(OP_VSTORE, 0, 3, 0, 1, 0, 0, SRAM + 32'h8200);
    fence(); wait_idle();
    report("DConv 64 x 5 taps", ops, rd, fwd);
    for (int i = 0; i < 64; i++) begin
      automatic logic [31:0] acc = 0;
      for (int k = 0; k < 5; k++) acc += w[k] * x[i + k];
      expect_word(SRAM + 32'h8200 + 32'(4 * i), acc, "DConv");
    end

    // ---------------------------------------------------- Sort, 64 columns of 8
    begin
      int rmap [8]; int free_r; int t;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 64; c++) begin
        s8[r][c] = $urandom_range(0, 1000) - 500;
        wr(SRAM + 32'h9000 + 32'(256 * r + 4 * c), s8[r][c]);
      end
      mark();
      for (int r = 0; r < 8; r++) begin rmap[r] = r + 1; vi(OP_VLOAD, rmap[r], 0, 0, 0, 0, 0, SRAM + 32'h9000 + 32'(256 * r)); end
      free_r = 9;
      for (int round = 0; round < 8; round++)
        for (int r = round % 2; r + 1 < 8; r += 2) begin
          // compare-exchange rows r, r+1: low into a free register, high into the old r+1
          vi(OP_VMIN, free_r, rmap[r], rmap[r + 1], 0, 0, 0, 0);
          vi(OP_VMAX, rmap[r + 1], rmap[r], rmap[r + 1], 1, 1, 0, 0);
          t = rmap[r]; rmap[r] = free_r; free_r = t;
        end
      for (int r = 0; r < 8; r++) vi(OP_VSTORE, 0, rmap[r], 0, 1, 0, 0, SRAM + 32'hA000 + 32'(256 * r));
      fence(); wait_idle();
      report("Sort 64 columns x 8", ops, rd, fwd);
      for (int c = 0; c < 64; c++) begin
        automatic logic [31:0] col [8];
        for (int r = 0; r < 8; r++) col[r] = s8[r][c];
        for (int a = 0; a < 8; a++) for (int b = 0; b < 7 - a; b++)
          if ($signed(col[b]) > $signed(col[b + 1])) begin t = col[b]; col[b] = col[b + 1]; col[b + 1] = t; end
        for (int r = 0; r < 8; r++) expect_word(SRAM + 32'hA000 + 32'(256 * r + 4 * c), col[r], "Sort");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

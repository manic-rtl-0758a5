// tb_vdf_coproc: self-checking test of the vector-dataflow coprocessor with
// its vector register file and a data memory that answers after a random
// 1-3 cycles. A reference model executes every accepted instruction at once,
// in program order and over whole vectors; the coprocessor instead runs
// buffered windows element by element. After each program the VRF contents
// (all registers not marked dead by a kill hint) and the store area are
// compared with the model.
//  1. All 16 registers are filled by vector loads.
//  2. A directed window of four dependent ALU/MUL instructions with vl = 64
//     checks the execute time: one instruction per element per cycle, so
//     4*64 cycles plus the pipeline drain.
//  3. Random programs of arithmetic, multiply, scalar-operand, load, store,
//     VSETVL and VFENCE instructions with random kill hints.
module tb_vdf_coproc;
  import manic_pkg::*;

  localparam int NR = 16, VL = 64, MEMW = 8192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 10 ns period (1 ns time unit)

  logic        cp_valid, cp_ready, busy;
  vinsn_t      cp_insn;
  logic [31:0] cp_scalar;
  logic        vrf_re, vrf_we;
  logic [9:0]  vrf_raddr, vrf_waddr;
  logic [31:0] vrf_rdata, vrf_wdata;
  logic        dreq_valid, dreq_ready, drsp_valid;
  mem_req_t    dreq;
  logic [31:0] drsp_rdata;

  vdf_coproc dut (
    .clk, .rst_n, .cp_valid, .cp_ready, .cp_insn, .cp_scalar, .busy,
    .vrf_re, .vrf_raddr, .vrf_rdata, .vrf_we, .vrf_waddr, .vrf_wdata,
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp_rdata
  );

  vrf u_vrf (.clk, .rst_n, .re(vrf_re), .raddr(vrf_raddr), .rdata(vrf_rdata),
             .we(vrf_we), .waddr(vrf_waddr), .wdata(vrf_wdata));

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [MEMW];
  int          lat;
  logic        mbusy;
  mem_req_t    mcur;
  assign dreq_ready = !mbusy;
  always_ff @(posedge clk) begin
    drsp_valid <= 1'b0;
    if (!rst_n) begin
      mbusy <= 1'b0;
    end else if (!mbusy) begin
      if (dreq_valid) begin
        mbusy <= 1'b1;
        mcur  <= dreq;
        lat   <= $urandom_range(0, 2);
      end
    end else if (lat == 0) begin
      mbusy      <= 1'b0;
      drsp_valid <= 1'b1;
      if (mcur.we) mem[mcur.addr[14:2]] <= mcur.wdata;
      drsp_rdata <= mcur.we ? 32'd0 : mem[mcur.addr[14:2]];
    end else begin
      lat <= lat - 1;
    end
  end

  // ---------------------------------------------------------------- model
  logic [31:0] rv [NR][VL];
  logic [31:0] rmem [MEMW];
  bit          dead [NR][VL];   // element value undefined after a kill hint
  int          vl_m;
  int          checks = 0, failures = 0;

  function automatic logic [31:0] alu_ref(vop_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_VADD:  return a + b;
      OP_VSUB:  return a - b;
      OP_VAND:  return a & b;
      OP_VOR:   return a | b;
      OP_VXOR:  return a ^ b;
      OP_VSLL:  return a << b[4:0];
      OP_VSRL:  return a >> b[4:0];
      OP_VSRA:  return 32'($signed(a) >>> b[4:0]);
      OP_VSLT:  return {31'd0, $signed(a) < $signed(b)};
      OP_VSLTU: return {31'd0, a < b};
      OP_VMIN:  return ($signed(a) < $signed(b)) ? a : b;
      OP_VMAX:  return ($signed(a) < $signed(b)) ? b : a;
      OP_VMUL:  return a * b;
      default:  return 32'hDEAD_BEEF;
    endcase
  endfunction

  function automatic void kill(logic [3:0] r);
    for (int e = 0; e < VL; e++) dead[r][e] = 1;
  endfunction

  // register whose first vl_m elements are all defined
  function automatic bit usable(int r);
    for (int e = 0; e < vl_m; e++) if (dead[r][e]) return 0;
    return 1;
  endfunction

  task automatic model(vinsn_t i, logic [31:0] s);
    logic [31:0] t [VL];
    case (i.op)
      OP_VSETVL: vl_m = (s > VL) ? VL : int'(s);
      OP_VFENCE: ;
      OP_VLOAD: begin
        for (int e = 0; e < vl_m; e++) begin
          rv[i.vd][e] = rmem[(s >> 2) + e];
          dead[i.vd][e] = 0;
        end
      end
      OP_VSTORE: begin
        for (int e = 0; e < vl_m; e++) rmem[(s >> 2) + e] = rv[i.vs1][e];
        if (i.kill1) kill(i.vs1);
      end
      default: begin
        for (int e = 0; e < vl_m; e++)
          t[e] = alu_ref(i.op, rv[i.vs1][e], i.scalar_b ? s : rv[i.vs2][e]);
        if (i.kill1) kill(i.vs1);
        if (i.kill2 && !i.scalar_b) kill(i.vs2);
        for (int e = 0; e < vl_m; e++) begin
          rv[i.vd][e] = t[e];
          dead[i.vd][e] = 0;
        end
      end
    endcase
  endtask

  task automatic issue(vinsn_t i, logic [31:0] s);
    @(negedge clk);
    cp_insn   = i;
    cp_scalar = s;
    cp_valid  = 1'b1;
    forever begin
      #1;
      if (cp_ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 cp_valid = 1'b0;
    model(i, s);
  endtask

  function automatic vinsn_t mk(vop_e op, int vd, int vs1, int vs2,
                                bit k1 = 0, bit k2 = 0, bit sb = 0);
    vinsn_t i = '0;
    i.op = op; i.vd = 4'(vd); i.vs1 = 4'(vs1); i.vs2 = 4'(vs2);
    i.kill1 = k1; i.kill2 = k2; i.scalar_b = sb;
    return i;
  endfunction

  task automatic wait_idle();
    do @(posedge clk); while (busy);
    repeat (2) @(posedge clk);
  endtask

  task automatic compare(string tag);
    for (int r = 0; r < NR; r++) begin
      for (int e = 0; e < VL; e++) begin
        if (dead[r][e]) continue;
        checks++;
        if (u_vrf.mem[r*VL + e] !== rv[r][e]) begin
          failures++;
          if (failures < 10)
            $display("%s: v%0d[%0d] = %h, expected %h", tag, r, e, u_vrf.mem[r*VL+e], rv[r][e]);
        end
      end
    end
    for (int w = 2048; w < MEMW; w++) begin
      checks++;
      if (mem[w] !== rmem[w]) begin
        failures++;
        if (failures < 10) $display("%s: mem[%0d] = %h, expected %h", tag, w, mem[w], rmem[w]);
      end
    end
  endtask

  // pick a live register
  function automatic int live();
    int r;
    do r = $urandom_range(0, NR - 1); while (!usable(r));
    return r;
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, cyc;
  vop_e ops [13] = '{OP_VADD, OP_VSUB, OP_VAND, OP_VOR, OP_VXOR, OP_VSLL, OP_VSRL,
                     OP_VSRA, OP_VSLT, OP_VSLTU, OP_VMIN, OP_VMAX, OP_VMUL};

  initial begin
    cp_valid = 0; cp_insn = '0; cp_scalar = 0;
    for (int w = 0; w < MEMW; w++) begin
      mem[w] = $urandom; rmem[w] = mem[w];
    end
    for (int r = 0; r < NR; r++) for (int e = 0; e < VL; e++) dead[r][e] = 0;
    vl_m = VL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. fill the register file
    for (int r = 0; r < NR; r++) issue(mk(OP_VLOAD, r, 0, 0), 32'(r * VL * 4));
    issue(mk(OP_VFENCE, 0, 0, 0), 0);
    wait_idle();
    compare("load");

    // 2. timed window: 4 chained instructions, one VRF operand each
    issue(mk(OP_VADD, 1, 0, 0, 0, 0, 1), 32'd7);   // v1 = v0 + 7
    issue(mk(OP_VMUL, 2, 1, 1, 1, 1), 0);          // v2 = v1 * v1, v1 dead
    issue(mk(OP_VXOR, 3, 2, 4, 1, 0), 0);          // v3 = v2 ^ v4, v2 dead
    issue(mk(OP_VSUB, 5, 3, 6), 0);                // v5 = v3 - v6
    fork
      issue(mk(OP_VFENCE, 0, 0, 0), 0);
    join_none
    @(posedge clk iff dut.u_exe.exec_start);
    t0 = $time;
    @(posedge clk iff dut.u_exe.exec_done);
    cyc = int'(($time - t0) / 10);
    checks++;
    if (cyc < 4 * VL || cyc > 4 * VL + 6) begin
      failures++;
      $display("window of 4 x 64 took %0d cycles", cyc);
    end
    wait_idle();
    compare("timed");
    // killed producers must not have reached the VRF: v1 and v2 keep old values
    checks++;
    if (u_vrf.mem[1*VL] == rv[3][0]) failures++;

    // 3. random programs
    for (int p = 0; p < 60; p++) begin
      automatic int n = $urandom_range(1, 40);
      for (int k = 0; k < n; k++) begin
        automatic int c = $urandom_range(0, 99);
        automatic int nu = 0;
        for (int r = 0; r < NR; r++) nu += usable(r) ? 1 : 0;
        if (nu < 3 && c >= 15) c = 10;   // too few defined registers: load one
        if (c < 3) begin
          issue(mk(OP_VSETVL, 0, 0, 0), $urandom_range(1, 70));
        end else if (c < 7) begin
          issue(mk(OP_VFENCE, 0, 0, 0), 0);
        end else if (c < 15) begin
          issue(mk(OP_VLOAD, $urandom_range(0, NR-1), 0, 0), 32'($urandom_range(0, 1984) * 4));
        end else if (c < 22) begin
          // stores go to 64-word aligned blocks, so two stores of one window
          // never partly overlap (element-major order would differ there)
          issue(mk(OP_VSTORE, 0, live(), 0, $urandom_range(0, 3) == 0), 32'((2048 + 64 * $urandom_range(0, 95)) * 4));
        end else begin
          automatic int a = live(), b = live();
          automatic bit sb = $urandom_range(0, 4) == 0;
          automatic bit k1 = $urandom_range(0, 3) == 0;
          automatic bit k2 = !sb && $urandom_range(0, 3) == 0;
          // keep at least four registers live
          automatic int nl = 0;
          for (int r = 0; r < NR; r++) nl += usable(r) ? 1 : 0;
          if (nl < 5) begin k1 = 0; k2 = 0; end
          issue(mk(ops[$urandom_range(0, 12)], $urandom_range(0, NR-1), a, b, k1, k2, sb),
                sb ? $urandom : 0);
        end
      end
      issue(mk(OP_VFENCE, 0, 0, 0), 0);
      wait_idle();
      compare($sformatf("prog%0d", p));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

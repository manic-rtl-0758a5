// vdf_execute: the five-stage Execute phase of the MANIC vector-dataflow
// coprocessor: VIssue, VGate, VExecute, VMemory, VWriteback.
//
// Unlike a conventional vector unit, the pipeline runs every instruction of
// the buffered window on element 0, then every instruction on element 1, and
// so on, one instruction per cycle. Values passed between instructions of the
// window therefore live only for one pass and fit in the 8-slot forwarding
// buffer.
//
//  VIssue     instruction index and vector (element) index counters; reads
//             the instruction buffer and starts the VRF read of an operand
//             that comes from the VRF. The VRF has one read port, so an
//             instruction with two VRF operands spends two cycles here.
//  VGate      picks each operand from the VRF read data, the forwarding
//             buffer, the scalar operand or a bypass from VExecute, VMemory
//             or VWriteback, and loads it only into the input registers of
//             the unit that needs it (ALU or multiplier), so the other unit
//             does not toggle. A consumer of a load still in VExecute or
//             VMemory waits here.
//  VExecute   ALU and multiplier; loads and stores form base + 4*element in
//             the ALU adder.
//  VMemory    one load or store to the data cache; the whole pipeline holds
//             until the response arrives.
//  VWriteback writes the result to its forwarding-buffer slot and/or to the
//             VRF, as the renamed instruction says.
//
// exec_start (one cycle, with exec_count instructions and vector length vl)
// starts a window; exec_done is raised for one cycle once every element of
// every instruction has left VWriteback. With no stalls and at most one VRF
// operand per instruction a window of n instructions takes n*vl cycles plus
// four cycles of pipeline drain. The stage split, the per-element order, the
// operand steering and the write targets follow the reference design; the
// bypass and stall rules, the two-cycle double VRF read and the unit-stride
// addressing are this design's. Lint reports rst_n as used both
// asynchronously and synchronously: the second use is only the disable
// condition of the request-stability assertion, not logic.
module vdf_execute
  import manic_pkg::*;
#(
  parameter int unsigned WINDOW   = manic_pkg::VDF_WINDOW,
  parameter int unsigned FB_SLOTS = manic_pkg::VDF_FB_SLOTS,
  parameter int unsigned NREGS    = manic_pkg::VDF_NREGS,
  parameter int unsigned VLMAX    = manic_pkg::VDF_VLMAX
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              exec_start,
  input  logic [$clog2(WINDOW+1)-1:0]       exec_count,
  input  logic [$clog2(VLMAX+1)-1:0]        vl,
  output logic                              exec_done,
  // instruction buffer read port
  output logic [$clog2(WINDOW)-1:0]         ib_rd_idx,
  input  ib_entry_t                         ib_rd_entry,
  // forwarding buffer
  output logic                              fb_we,
  output logic [$clog2(FB_SLOTS)-1:0]       fb_waddr,
  output logic [31:0]                       fb_wdata,
  output logic [$clog2(FB_SLOTS)-1:0]       fb_raddr_a,
  input  logic [31:0]                       fb_rdata_a,
  output logic [$clog2(FB_SLOTS)-1:0]       fb_raddr_b,
  input  logic [31:0]                       fb_rdata_b,
  // vector register file (1r1w, synchronous read)
  output logic                              vrf_re,
  output logic [$clog2(NREGS*VLMAX)-1:0]    vrf_raddr,
  input  logic [31:0]                       vrf_rdata,
  output logic                              vrf_we,
  output logic [$clog2(NREGS*VLMAX)-1:0]    vrf_waddr,
  output logic [31:0]                       vrf_wdata,
  // data cache port
  output logic                              dreq_valid,
  input  logic                              dreq_ready,
  output mem_req_t                          dreq,
  input  logic                              drsp_valid,
  input  logic [31:0]                       drsp_rdata
);

  localparam int unsigned IW = $clog2(WINDOW);
  localparam int unsigned CW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(VLMAX);
  localparam int unsigned LW = $clog2(VLMAX + 1);
  localparam int unsigned RW = $clog2(NREGS);
  localparam int unsigned SW = $clog2(FB_SLOTS);

  logic mem_stall;    // VMemory waits for the data cache
  logic gate_stall;   // VGate waits for a load result

  // ================================================================ VIssue
  logic          active_q, run_q, half_q;
  logic [IW-1:0] ptr_q;
  logic [EW-1:0] elem_q;
  logic [CW-1:0] count_q;
  logic [LW-1:0] vl_q;

  ib_entry_t ie;
  logic      two_reads, issue_en, issue_adv, last;

  assign ib_rd_idx = ptr_q;
  assign ie        = ib_rd_entry;
  assign two_reads = (ie.a.kind == SRC_VRF) && (ie.b.kind == SRC_VRF);
  assign issue_en  = run_q && !mem_stall && !gate_stall;
  assign issue_adv = issue_en && !(two_reads && !half_q);
  assign last      = (32'(ptr_q) + 1 == 32'(count_q)) && (32'(elem_q) + 1 == 32'(vl_q));

  always_comb begin
    vrf_re    = issue_en && ((ie.a.kind == SRC_VRF) || (ie.b.kind == SRC_VRF));
    vrf_raddr = {ie.a.vreg[RW-1:0], elem_q};
    if (two_reads ? half_q : (ie.a.kind != SRC_VRF))
      vrf_raddr = {ie.b.vreg[RW-1:0], elem_q};
  end

  // VIssue -> VGate register
  logic          g_valid;
  ib_entry_t     g_e;
  logic [EW-1:0] g_elem;
  logic          g_two;
  logic [31:0]   g_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      run_q    <= 1'b0;
      half_q   <= 1'b0;
      ptr_q    <= '0;
      elem_q   <= '0;
      count_q  <= '0;
      vl_q     <= '0;
    end else begin
      if (exec_start) begin
        active_q <= 1'b1;
        run_q    <= (exec_count != '0) && (vl != '0);
        half_q   <= 1'b0;
        ptr_q    <= '0;
        elem_q   <= '0;
        count_q  <= exec_count;
        vl_q     <= vl;
      end else begin
        if (exec_done) active_q <= 1'b0;
        if (issue_en && two_reads && !half_q) half_q <= 1'b1;
        if (issue_adv) begin
          half_q <= 1'b0;
          if (last) begin
            run_q <= 1'b0;
          end else if (32'(ptr_q) + 1 == 32'(count_q)) begin
            ptr_q  <= '0;
            elem_q <= elem_q + 1'b1;
          end else begin
            ptr_q  <= ptr_q + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_valid <= 1'b0;
      g_e     <= '0;
      g_elem  <= '0;
      g_two   <= 1'b0;
      g_hold  <= '0;
    end else if (!mem_stall && !gate_stall) begin
      g_valid <= issue_adv;
      if (issue_adv) begin
        g_e    <= ie;
        g_elem <= elem_q;
        g_two  <= two_reads;
        g_hold <= vrf_rdata;   // first of two VRF reads, returned this cycle
      end
    end
  end

  // ================================================================ VGate
  // VExecute stage registers (declared here for the bypass network)
  logic          x_valid, x_fb_wb, x_vrf_wb, x_is_mul, x_is_load, x_is_store;
  logic [SW-1:0] x_slot;
  logic [RW-1:0] x_vd;
  logic [EW-1:0] x_elem;
  vop_e          x_aluop;
  logic [31:0]   alu_a, alu_b, mul_a, mul_b, x_sdata;
  logic [31:0]   alu_y, mul_y, x_result;
  // VMemory stage registers
  logic          m_valid, m_fb_wb, m_vrf_wb, m_is_load, m_is_store, m_sent;
  logic [SW-1:0] m_slot;
  logic [RW-1:0] m_vd;
  logic [EW-1:0] m_elem;
  logic [31:0]   m_res, m_sdata;
  // VWriteback stage registers
  logic          w_valid, w_fb_wb, w_vrf_wb;
  logic [SW-1:0] w_slot;
  logic [RW-1:0] w_vd;
  logic [EW-1:0] w_elem;
  logic [31:0]   w_data;

  assign fb_raddr_a = g_e.a.slot[SW-1:0];
  assign fb_raddr_b = g_e.b.slot[SW-1:0];

  // Operand value for one source. `wait_o` asks VGate to hold because the
  // value is a load result not yet returned.
  function automatic void pick(input src_t s, input logic [31:0] vrf_val,
                               input logic [31:0] fb_val, input logic [31:0] scalar,
                               output logic [31:0] val, output logic wait_o);
    val    = '0;
    wait_o = 1'b0;
    unique case (s.kind)
      SRC_VRF:    val = vrf_val;
      SRC_SCALAR: val = scalar;
      SRC_FB: begin
        if (x_valid && x_fb_wb && x_slot == s.slot[SW-1:0]) begin
          val    = x_result;
          wait_o = x_is_load;
        end else if (m_valid && m_fb_wb && m_slot == s.slot[SW-1:0]) begin
          val    = m_res;
          wait_o = m_is_load;
        end else if (w_valid && w_fb_wb && w_slot == s.slot[SW-1:0]) begin
          val    = w_data;
        end else begin
          val    = fb_val;
        end
      end
      default: val = '0;
    endcase
  endfunction

  logic [31:0] op_a, op_b;
  logic        wait_a, wait_b;

  always_comb begin
    pick(g_e.a, g_two ? g_hold : vrf_rdata, fb_rdata_a, g_e.scalar, op_a, wait_a);
    pick(g_e.b, vrf_rdata, fb_rdata_b, g_e.scalar, op_b, wait_b);
  end

  assign gate_stall = g_valid && (wait_a || wait_b) && !mem_stall;

  logic g_adv;
  assign g_adv = g_valid && !gate_stall && !mem_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid    <= 1'b0;
      x_fb_wb    <= 1'b0;
      x_vrf_wb   <= 1'b0;
      x_is_mul   <= 1'b0;
      x_is_load  <= 1'b0;
      x_is_store <= 1'b0;
      x_slot     <= '0;
      x_vd       <= '0;
      x_elem     <= '0;
      x_aluop    <= OP_VADD;
      alu_a      <= '0;
      alu_b      <= '0;
      mul_a      <= '0;
      mul_b      <= '0;
      x_sdata    <= '0;
    end else if (!mem_stall) begin
      x_valid <= g_adv;
      if (g_adv) begin
        x_fb_wb    <= g_e.fb_wb;
        x_vrf_wb   <= g_e.vrf_wb;
        x_is_mul   <= op_is_mul(g_e.op);
        x_is_load  <= g_e.op == OP_VLOAD;
        x_is_store <= g_e.op == OP_VSTORE;
        x_slot     <= g_e.fb_slot[SW-1:0];
        x_vd       <= g_e.vd[RW-1:0];
        x_elem     <= g_elem;
        // operand steering: only the unit in use sees new inputs
        if (op_is_mul(g_e.op)) begin
          mul_a <= op_a;
          mul_b <= op_b;
        end else if (op_is_mem(g_e.op)) begin
          x_aluop <= OP_VADD;
          alu_a   <= g_e.scalar;
          alu_b   <= 32'(g_elem) << 2;
          x_sdata <= op_a;
        end else begin
          x_aluop <= g_e.op;
          alu_a   <= op_a;
          alu_b   <= op_b;
        end
      end
    end
  end

  // ================================================================ VExecute
  vdf_alu u_alu (.op(x_aluop), .a(alu_a), .b(alu_b), .y(alu_y));
  vdf_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));

  assign x_result = x_is_mul ? mul_y : alu_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid    <= 1'b0;
      m_fb_wb    <= 1'b0;
      m_vrf_wb   <= 1'b0;
      m_is_load  <= 1'b0;
      m_is_store <= 1'b0;
      m_slot     <= '0;
      m_vd       <= '0;
      m_elem     <= '0;
      m_res      <= '0;
      m_sdata    <= '0;
    end else if (!mem_stall) begin
      m_valid <= x_valid;
      if (x_valid) begin
        m_fb_wb    <= x_fb_wb;
        m_vrf_wb   <= x_vrf_wb;
        m_is_load  <= x_is_load;
        m_is_store <= x_is_store;
        m_slot     <= x_slot;
        m_vd       <= x_vd;
        m_elem     <= x_elem;
        m_res      <= x_result;
        m_sdata    <= x_sdata;
      end
    end
  end

  // ================================================================ VMemory
  logic m_mem;
  assign m_mem      = m_valid && (m_is_load || m_is_store);
  assign mem_stall  = m_mem && !drsp_valid;
  assign dreq_valid = m_mem && !m_sent;
  always_comb begin
    dreq       = '0;
    dreq.addr  = m_res;
    dreq.we    = m_is_store;
    dreq.be    = 4'hF;
    dreq.wdata = m_sdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      m_sent <= 1'b0;
    else if (drsp_valid)             m_sent <= 1'b0;
    else if (dreq_valid && dreq_ready) m_sent <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid  <= 1'b0;
      w_fb_wb  <= 1'b0;
      w_vrf_wb <= 1'b0;
      w_slot   <= '0;
      w_vd     <= '0;
      w_elem   <= '0;
      w_data   <= '0;
    end else begin
      w_valid <= m_valid && !mem_stall;
      if (m_valid && !mem_stall) begin
        w_fb_wb  <= m_fb_wb;
        w_vrf_wb <= m_vrf_wb;
        w_slot   <= m_slot;
        w_vd     <= m_vd;
        w_elem   <= m_elem;
        w_data   <= m_is_load ? drsp_rdata : m_res;
      end
    end
  end

  // ================================================================ VWriteback
  assign fb_we     = w_valid && w_fb_wb;
  assign fb_waddr  = w_slot;
  assign fb_wdata  = w_data;
  assign vrf_we    = w_valid && w_vrf_wb;
  assign vrf_waddr = {w_vd, w_elem};
  assign vrf_wdata = w_data;

  assign exec_done = active_q && !exec_start && !run_q &&
                     !g_valid && !x_valid && !m_valid && !w_valid;

  // A data-cache request is held stable until accepted.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (dreq_valid && !dreq_ready) |=> (dreq_valid && $stable(dreq));
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule

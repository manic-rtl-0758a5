// vdf_decoder: the Decode & Rename phase of the MANIC vector-dataflow
// coprocessor (the VDecoder of the pipeline, with the rename table inside).
//
// It accepts one vector instruction per cycle from the scalar core while the
// coprocessor is in its decode phase. For every source operand it looks up
// the rename table. If the register was last written by an instruction that
// is still in the window, the operand is renamed to that producer's
// forwarding-buffer slot, and a slot is allocated to the producer if it has
// none yet (the producer's buffer entry is patched). Otherwise the operand is
// read from the VRF. A kill hint on an operand whose producer is in the window
// clears that producer's VRF writeback: the value lives only in the
// forwarding buffer. The destination register is then renamed to the new
// instruction.
//
// The execute phase starts (exec_start, one cycle) when the buffer is full,
// a VFENCE arrives, or the forwarding buffer is fully allocated; an
// instruction that would need more slots than remain also starts it and
// waits. VSETVL drains a non-empty window first, then sets the vector length
// (clamped to VLMAX). When execution reports exec_done the window, the
// rename table and all slots are freed. Slots are handed out in order and
// only freed per window.
//
// The three start conditions, the rename-to-forwarding-buffer scheme and the
// kill hint follow the reference design. Window depth 16, in-order slot
// allocation, VSETVL and the handling of reserved opcodes (accepted, ignored)
// are this design's choices.
module vdf_decoder
  import manic_pkg::*;
#(
  parameter int unsigned WINDOW   = manic_pkg::VDF_WINDOW,
  parameter int unsigned FB_SLOTS = manic_pkg::VDF_FB_SLOTS,
  parameter int unsigned VLMAX    = manic_pkg::VDF_VLMAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction issue from the scalar core
  input  logic                        in_valid,
  output logic                        in_ready,
  input  vinsn_t                      in_insn,
  input  logic [31:0]                 in_scalar,
  // instruction buffer write and patch ports
  output logic                        ib_wr_en,
  output logic [$clog2(WINDOW)-1:0]   ib_wr_idx,
  output ib_entry_t                   ib_wr_entry,
  output logic                        ib_fb0_en,
  output logic [$clog2(WINDOW)-1:0]   ib_fb0_idx,
  output logic [2:0]                  ib_fb0_slot,
  output logic                        ib_fb1_en,
  output logic [$clog2(WINDOW)-1:0]   ib_fb1_idx,
  output logic [2:0]                  ib_fb1_slot,
  output logic                        ib_kill0_en,
  output logic [$clog2(WINDOW)-1:0]   ib_kill0_idx,
  output logic                        ib_kill1_en,
  output logic [$clog2(WINDOW)-1:0]   ib_kill1_idx,
  // hand-over to the execute phase
  output logic                        exec_start,
  output logic [$clog2(WINDOW+1)-1:0] exec_count,
  input  logic                        exec_done,
  output logic [$clog2(VLMAX+1)-1:0]  vl,
  output logic                        busy
);

  localparam int unsigned IW = $clog2(WINDOW);
  localparam int unsigned CW = $clog2(WINDOW + 1);
  localparam int unsigned SW = $clog2(FB_SLOTS + 1);
  localparam int unsigned LW = $clog2(VLMAX + 1);

  typedef enum logic [1:0] {PH_DECODE, PH_START, PH_EXECUTE} phase_e;

  phase_e      phase_q;
  logic [CW-1:0] count_q;
  logic [SW-1:0] fb_used_q;
  logic [LW-1:0] vl_q;

  rename_t ra, rb;
  logic    rt_clear, rt_wr_en;
  rename_t rt_wr_data;

  vdf_rename_table u_rename (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (rt_clear),
    .rd_a_reg (in_insn.vs1),
    .rd_a     (ra),
    .rd_b_reg (in_insn.vs2),
    .rd_b     (rb),
    .wr_en    (rt_wr_en),
    .wr_reg   (in_insn.vd),
    .wr_data  (rt_wr_data),
    .upd0_en  (ib_fb0_en),
    .upd0_reg (in_insn.vs1),
    .upd0_slot(ib_fb0_slot),
    .upd1_en  (ib_fb1_en),
    .upd1_reg (in_insn.vs2),
    .upd1_slot(ib_fb1_slot)
  );

  // ---------------------------------------------------------------- rename
  vop_e op;
  logic is_vec, uses_a, uses_b, b_scalar;
  logic pa, pb;            // operand produced inside the window
  logic need_a, need_b;    // producer needs a new forwarding slot
  logic same_prod;
  logic [1:0] n_new;
  logic [2:0] slot_a, slot_b;
  logic fits;

  always_comb begin
    op        = in_insn.op;
    is_vec    = op_is_alu(op) || op_is_mul(op) || op_is_mem(op);
    uses_a    = op_uses_a(op);
    b_scalar  = op_uses_b(op) && in_insn.scalar_b;
    uses_b    = op_uses_b(op) && !in_insn.scalar_b;
    pa        = uses_a && ra.valid;
    pb        = uses_b && rb.valid;
    same_prod = pa && pb && (ra.idx == rb.idx);
    need_a    = pa && !ra.fbv;
    need_b    = pb && !rb.fbv && !(same_prod && need_a);
    n_new     = 2'(need_a) + 2'(need_b);
    slot_a    = need_a ? 3'(fb_used_q) : ra.slot;
    if (need_b)                 slot_b = 3'(fb_used_q + SW'(need_a));
    else if (same_prod && need_a) slot_b = slot_a;
    else                        slot_b = rb.slot;
    fits      = (32'(fb_used_q) + 32'(n_new)) <= FB_SLOTS;
  end

  // ---------------------------------------------------------- phase control
  logic accept, go_exec;

  always_comb begin
    accept  = 1'b0;
    go_exec = 1'b0;
    if (phase_q == PH_DECODE && in_valid) begin
      if (op == OP_VFENCE) begin
        accept  = 1'b1;
        go_exec = (count_q != '0);
      end else if (op == OP_VSETVL) begin
        accept  = (count_q == '0);
        go_exec = (count_q != '0);
      end else if (is_vec) begin
        if (!fits) begin
          go_exec = 1'b1;
        end else begin
          accept  = 1'b1;
          go_exec = (32'(count_q) + 1 == WINDOW) ||
                    (32'(fb_used_q) + 32'(n_new) == FB_SLOTS);
        end
      end else begin
        accept = 1'b1;   // reserved opcode: consumed and ignored
      end
    end
  end

  assign in_ready = accept;

  logic vec_acc;
  assign vec_acc = accept && is_vec;

  always_comb begin
    ib_wr_en              = vec_acc;
    ib_wr_idx             = IW'(count_q);
    ib_wr_entry           = '0;
    ib_wr_entry.op        = op;
    ib_wr_entry.vd        = in_insn.vd;
    ib_wr_entry.scalar    = in_scalar;
    ib_wr_entry.vrf_wb    = op_writes(op);
    ib_wr_entry.fb_wb     = 1'b0;
    if (uses_a) begin
      ib_wr_entry.a.kind  = pa ? SRC_FB : SRC_VRF;
      ib_wr_entry.a.vreg  = in_insn.vs1;
      ib_wr_entry.a.slot  = pa ? slot_a : 3'd0;
    end
    if (b_scalar) begin
      ib_wr_entry.b.kind  = SRC_SCALAR;
    end else if (uses_b) begin
      ib_wr_entry.b.kind  = pb ? SRC_FB : SRC_VRF;
      ib_wr_entry.b.vreg  = in_insn.vs2;
      ib_wr_entry.b.slot  = pb ? slot_b : 3'd0;
    end

    ib_fb0_en    = vec_acc && need_a;
    ib_fb0_idx   = ra.idx;
    ib_fb0_slot  = slot_a;
    ib_fb1_en    = vec_acc && need_b;
    ib_fb1_idx   = rb.idx;
    ib_fb1_slot  = slot_b;
    ib_kill0_en  = vec_acc && pa && in_insn.kill1;
    ib_kill0_idx = ra.idx;
    ib_kill1_en  = vec_acc && pb && in_insn.kill2;
    ib_kill1_idx = rb.idx;

    rt_wr_en         = vec_acc && op_writes(op);
    rt_wr_data       = '0;
    rt_wr_data.valid = 1'b1;
    rt_wr_data.idx   = 4'(count_q);
  end

  assign rt_clear = (phase_q == PH_EXECUTE) && exec_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= PH_DECODE;
      count_q   <= '0;
      fb_used_q <= '0;
      vl_q      <= LW'(VLMAX);
    end else begin
      unique case (phase_q)
        PH_DECODE: begin
          if (vec_acc) begin
            count_q   <= count_q + 1'b1;
            fb_used_q <= fb_used_q + SW'(n_new);
          end
          if (accept && op == OP_VSETVL)
            vl_q <= (in_scalar > VLMAX) ? LW'(VLMAX) : LW'(in_scalar);
          if (go_exec) phase_q <= PH_START;
        end
        PH_START: phase_q <= PH_EXECUTE;
        PH_EXECUTE: begin
          if (exec_done) begin
            phase_q   <= PH_DECODE;
            count_q   <= '0;
            fb_used_q <= '0;
          end
        end
        default: phase_q <= PH_DECODE;
      endcase
    end
  end

  assign exec_start = (phase_q == PH_START);
  assign exec_count = count_q;
  assign vl         = vl_q;
  assign busy       = (phase_q != PH_DECODE) || (count_q != '0);

endmodule

// vdf_coproc: the MANIC vector-dataflow coprocessor. It alternates between
// two phases. In Decode & Rename (vdf_decoder) it takes vector instructions
// from the scalar core, renames their operands and fills the instruction
// buffer. In Execute (vdf_execute) it runs the buffered window element by
// element through a five-stage pipeline, forwarding intermediate values
// through the 32-byte forwarding buffer instead of the vector register file.
// The VRF and the data cache are outside: the VRF port is 1r1w with a
// one-cycle synchronous read, the data-cache port is the shared memory
// request/response bus. cp_ready is the decoder's accept signal; busy is high
// while any instruction is buffered or executing, which the core uses to wait
// for vector results. The phase structure follows the reference design.
module vdf_coproc
  import manic_pkg::*;
#(
  parameter int unsigned WINDOW   = manic_pkg::VDF_WINDOW,
  parameter int unsigned FB_SLOTS = manic_pkg::VDF_FB_SLOTS,
  parameter int unsigned NREGS    = manic_pkg::VDF_NREGS,
  parameter int unsigned VLMAX    = manic_pkg::VDF_VLMAX
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cp_valid,
  output logic                           cp_ready,
  input  vinsn_t                         cp_insn,
  input  logic [31:0]                    cp_scalar,
  output logic                           busy,
  output logic                           vrf_re,
  output logic [$clog2(NREGS*VLMAX)-1:0] vrf_raddr,
  input  logic [31:0]                    vrf_rdata,
  output logic                           vrf_we,
  output logic [$clog2(NREGS*VLMAX)-1:0] vrf_waddr,
  output logic [31:0]                    vrf_wdata,
  output logic                           dreq_valid,
  input  logic                           dreq_ready,
  output mem_req_t                       dreq,
  input  logic                           drsp_valid,
  input  logic [31:0]                    drsp_rdata
);

  localparam int unsigned IW = $clog2(WINDOW);
  localparam int unsigned SW = $clog2(FB_SLOTS);

  logic ib_wr_en, ib_fb0_en, ib_fb1_en, ib_kill0_en, ib_kill1_en;
  logic [IW-1:0] ib_wr_idx, ib_fb0_idx, ib_fb1_idx, ib_kill0_idx, ib_kill1_idx, ib_rd_idx;
  logic [2:0]    ib_fb0_slot, ib_fb1_slot;
  ib_entry_t     ib_wr_entry, ib_rd_entry;
  logic          exec_start, exec_done;
  logic [$clog2(WINDOW+1)-1:0] exec_count;
  logic [$clog2(VLMAX+1)-1:0]  vl;
  logic          fb_we;
  logic [SW-1:0] fb_waddr, fb_raddr_a, fb_raddr_b;
  logic [31:0]   fb_wdata, fb_rdata_a, fb_rdata_b;

  vdf_decoder #(.WINDOW(WINDOW), .FB_SLOTS(FB_SLOTS), .VLMAX(VLMAX)) u_dec (
    .clk, .rst_n,
    .in_valid(cp_valid), .in_ready(cp_ready), .in_insn(cp_insn), .in_scalar(cp_scalar),
    .ib_wr_en, .ib_wr_idx, .ib_wr_entry,
    .ib_fb0_en, .ib_fb0_idx, .ib_fb0_slot, .ib_fb1_en, .ib_fb1_idx, .ib_fb1_slot,
    .ib_kill0_en, .ib_kill0_idx, .ib_kill1_en, .ib_kill1_idx,
    .exec_start, .exec_count, .exec_done, .vl, .busy
  );

  vdf_insn_buffer #(.DEPTH(WINDOW)) u_ib (
    .clk, .rst_n,
    .wr_en(ib_wr_en), .wr_idx(ib_wr_idx), .wr_entry(ib_wr_entry),
    .fb0_en(ib_fb0_en), .fb0_idx(ib_fb0_idx), .fb0_slot(ib_fb0_slot),
    .fb1_en(ib_fb1_en), .fb1_idx(ib_fb1_idx), .fb1_slot(ib_fb1_slot),
    .kill0_en(ib_kill0_en), .kill0_idx(ib_kill0_idx),
    .kill1_en(ib_kill1_en), .kill1_idx(ib_kill1_idx),
    .rd_idx(ib_rd_idx), .rd_entry(ib_rd_entry)
  );

  vdf_fwd_buffer #(.SLOTS(FB_SLOTS)) u_fb (
    .clk, .rst_n,
    .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr_a(fb_raddr_a), .rdata_a(fb_rdata_a),
    .raddr_b(fb_raddr_b), .rdata_b(fb_rdata_b)
  );

  vdf_execute #(.WINDOW(WINDOW), .FB_SLOTS(FB_SLOTS), .NREGS(NREGS), .VLMAX(VLMAX)) u_exe (
    .clk, .rst_n,
    .exec_start, .exec_count, .vl, .exec_done,
    .ib_rd_idx, .ib_rd_entry,
    .fb_we, .fb_waddr, .fb_wdata, .fb_raddr_a, .fb_rdata_a, .fb_raddr_b, .fb_rdata_b,
    .vrf_re, .vrf_raddr, .vrf_rdata, .vrf_we, .vrf_waddr, .vrf_wdata,
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp_rdata
  );

endmodule

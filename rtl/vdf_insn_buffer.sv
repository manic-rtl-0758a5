// vdf_insn_buffer: the window of decoded, renamed vector instructions.
//
// The decoder appends one entry per accepted instruction (wr_*). While later
// instructions of the same window are decoded it patches earlier entries:
// fb* tells a producer to also write its result into a forwarding-buffer
// slot, because a consumer in the window now reads it from there, and kill*
// clears a producer's VRF writeback, because a consumer marked the value as
// read for the last time. VIssue reads one entry per cycle through the
// combinational read port. Entries are flops; the window depth is this
// design's choice (16), the patch-on-rename behaviour follows the reference.
module vdf_insn_buffer
  import manic_pkg::*;
#(
  parameter int unsigned DEPTH = manic_pkg::VDF_WINDOW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_idx,
  input  ib_entry_t                wr_entry,
  input  logic                     fb0_en,
  input  logic [$clog2(DEPTH)-1:0] fb0_idx,
  input  logic [2:0]               fb0_slot,
  input  logic                     fb1_en,
  input  logic [$clog2(DEPTH)-1:0] fb1_idx,
  input  logic [2:0]               fb1_slot,
  input  logic                     kill0_en,
  input  logic [$clog2(DEPTH)-1:0] kill0_idx,
  input  logic                     kill1_en,
  input  logic [$clog2(DEPTH)-1:0] kill1_idx,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output ib_entry_t                rd_entry
);

  ib_entry_t mem [DEPTH];

  assign rd_entry = mem[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (wr_en) mem[wr_idx] <= wr_entry;
      if (fb0_en) begin
        mem[fb0_idx].fb_wb   <= 1'b1;
        mem[fb0_idx].fb_slot <= fb0_slot;
      end
      if (fb1_en) begin
        mem[fb1_idx].fb_wb   <= 1'b1;
        mem[fb1_idx].fb_slot <= fb1_slot;
      end
      if (kill0_en) mem[kill0_idx].vrf_wb <= 1'b0;
      if (kill1_en) mem[kill1_idx].vrf_wb <= 1'b0;
    end
  end

endmodule

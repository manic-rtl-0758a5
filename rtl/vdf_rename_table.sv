// vdf_rename_table: the MANIC rename table. One 9-bit entry per vector
// register (16 x 9 = 144 bits of flops) records whether the register was last
// written by an instruction that is still in the instruction window, the
// instruction-buffer index of that producer, and the forwarding-buffer slot
// the producer writes, once one has been allocated.
//
// Two combinational read ports serve the two source operands of the
// instruction being decoded. In one clock edge the table can record a new
// producer for the destination register (wr_*) and give up to two existing
// entries a forwarding slot (upd*). The destination write takes precedence
// over a slot update of the same register, because the new producer
// supersedes the old one. `clear` empties the table when a window retires.
// The size and the role of the table follow the reference design; the split
// of the 9 bits (valid, 4-bit index, slot valid, 3-bit slot) is this design's.
module vdf_rename_table
  import manic_pkg::*;
#(
  parameter int unsigned NREGS = manic_pkg::VDF_NREGS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [3:0] rd_a_reg,
  output rename_t    rd_a,
  input  logic [3:0] rd_b_reg,
  output rename_t    rd_b,
  input  logic       wr_en,
  input  logic [3:0] wr_reg,
  input  rename_t    wr_data,
  input  logic       upd0_en,
  input  logic [3:0] upd0_reg,
  input  logic [2:0] upd0_slot,
  input  logic       upd1_en,
  input  logic [3:0] upd1_reg,
  input  logic [2:0] upd1_slot
);

  rename_t tbl [NREGS];

  assign rd_a = tbl[rd_a_reg];
  assign rd_b = tbl[rd_b_reg];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) tbl[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(NREGS); i++) tbl[i] <= '0;
    end else begin
      if (upd0_en) begin
        tbl[upd0_reg].fbv  <= 1'b1;
        tbl[upd0_reg].slot <= upd0_slot;
      end
      if (upd1_en) begin
        tbl[upd1_reg].fbv  <= 1'b1;
        tbl[upd1_reg].slot <= upd1_slot;
      end
      if (wr_en) tbl[wr_reg] <= wr_data;
    end
  end

endmodule

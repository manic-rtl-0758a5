// vdf_fwd_buffer: the 32-byte forwarding buffer (8 slots of 32 bits) that
// carries intermediate values from a producer instruction to its consumers
// within one element's pass through the instruction window, so that they
// never touch the vector register file. VWriteback writes one slot per cycle;
// VGate reads two slots combinationally, one per source operand. Slot count
// follows the reference design; the port count is this design's.
module vdf_fwd_buffer #(
  parameter int unsigned SLOTS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(SLOTS)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic [$clog2(SLOTS)-1:0] raddr_a,
  output logic [31:0]              rdata_a,
  input  logic [$clog2(SLOTS)-1:0] raddr_b,
  output logic [31:0]              rdata_b
);

  logic [31:0] slot_q [SLOTS];

  assign rdata_a = slot_q[raddr_a];
  assign rdata_b = slot_q[raddr_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(SLOTS); i++) slot_q[i] <= '0;
    end else if (we) begin
      slot_q[waddr] <= wdata;
    end
  end

endmodule

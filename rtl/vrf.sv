// vrf: the 4 KB vector register file, 16 registers of 64 32-bit elements,
// with one read port and one write port (1r1w). One port is enough because
// most operands come from the forwarding buffer. Element e of register r is
// word {r, e}. The read is synchronous: raddr presented with re in one cycle
// gives rdata in the next, and rdata holds until the next read, as an SRAM
// macro output would. A write and a read of the same word in one cycle return
// the old value. Size and port count follow the reference; the timing is this
// design's choice.
module vrf #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned VLMAX = 64
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             re,
  input  logic [$clog2(NREGS*VLMAX)-1:0]   raddr,
  output logic [31:0]                      rdata,
  input  logic                             we,
  input  logic [$clog2(NREGS*VLMAX)-1:0]   waddr,
  input  logic [31:0]                      wdata
);

  logic [31:0] mem [NREGS*VLMAX];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule

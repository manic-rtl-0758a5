// sram: single-port word-organised SRAM with byte write enables, on the
// memory request/response bus. It accepts a request whenever no response is
// pending and answers in the following cycle (read data, or an
// acknowledgement for a write). Contents are not reset. Used as the 64 KB
// main-memory SRAM; the size is the reference design's, the one-cycle
// timing is this design's.
module sram
  import manic_pkg::*;
#(
  parameter int unsigned BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  assign widx      = req.addr[AW+1:2];
  assign req_ready = !rsp_valid;

  always_ff @(posedge clk) begin
    if (req_valid && req_ready && req.we) begin
      for (int b = 0; b < 4; b++)
        if (req.be[b]) mem[widx][8*b +: 8] <= req.wdata[8*b +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= req_valid && req_ready;
      if (req_valid && req_ready && !req.we) rsp_rdata <= mem[widx];
    end
  end

endmodule

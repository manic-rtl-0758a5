// main_memory: the MANIC main memory, a 1 KB boot ROM, a 64 KB SRAM and a
// 256 KB MRAM behind one port of the memory request/response bus. Address
// bits [31:28] select the target: 0x0 boot ROM, 0x1 SRAM, 0x2 MRAM; any
// other region answers reads with zero in the next cycle and drops writes.
// Only one request is outstanding at a time, so the responses of the three
// memories are simply merged. mram_en is the MRAM power-domain enable. The
// three memories and their sizes are the reference design's; the address map
// is this design's.
module main_memory
  import manic_pkg::*;
#(
  parameter int unsigned ROM_BYTES  = 1024,
  parameter int unsigned SRAM_BYTES = 65536,
  parameter int unsigned MRAM_BYTES = 262144,
  parameter int unsigned CLK_NS     = 20,
  parameter string       ROM_FILE   = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mram_en,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata
);

  logic [3:0]  region;
  logic        v_rom, v_sram, v_mram, v_none;
  logic        r_rom, r_sram, r_mram;
  logic        s_rom, s_sram, s_mram;
  logic [31:0] d_rom, d_sram, d_mram;
  logic        none_rsp_q;

  assign region = req.addr[31:28];
  assign v_rom  = req_valid && region == 4'h0;
  assign v_sram = req_valid && region == 4'h1;
  assign v_mram = req_valid && region == 4'h2;
  assign v_none = req_valid && region > 4'h2;

  boot_rom #(.BYTES(ROM_BYTES), .INIT_FILE(ROM_FILE)) u_rom (
    .clk, .rst_n, .req_valid(v_rom), .req_ready(r_rom), .req,
    .rsp_valid(s_rom), .rsp_rdata(d_rom)
  );

  sram #(.BYTES(SRAM_BYTES)) u_sram (
    .clk, .rst_n, .req_valid(v_sram), .req_ready(r_sram), .req,
    .rsp_valid(s_sram), .rsp_rdata(d_sram)
  );

  mram #(.BYTES(MRAM_BYTES), .CLK_NS(CLK_NS)) u_mram (
    .clk, .rst_n, .pwr_en(mram_en), .req_valid(v_mram), .req_ready(r_mram), .req,
    .rsp_valid(s_mram), .rsp_rdata(d_mram)
  );

  always_comb begin
    unique case (region)
      4'h0:    req_ready = r_rom;
      4'h1:    req_ready = r_sram;
      4'h2:    req_ready = r_mram;
      default: req_ready = !none_rsp_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_rsp_q <= 1'b0;
    else        none_rsp_q <= v_none && !none_rsp_q;
  end

  assign rsp_valid = s_rom || s_sram || s_mram || none_rsp_q;
  assign rsp_rdata = s_rom  ? d_rom  :
                     s_sram ? d_sram :
                     s_mram ? d_mram : 32'd0;

endmodule

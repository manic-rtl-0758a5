// boot_rom: 1 KB read-only memory holding the boot program, on the memory
// request/response bus. Its contents are read at elaboration from the hex
// file named by INIT_FILE (one 32-bit word per line); with an empty name it
// reads as zero. Reads answer in the next cycle; writes are acknowledged and
// ignored. The size is the reference design's; the program it holds is not
// given there, so the contents are left to the user.
module boot_rom
  import manic_pkg::*;
#(
  parameter int unsigned BYTES     = 1024,
  parameter string       INIT_FILE = ""
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

  logic [31:0] rom [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign req_ready = !rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= req_valid && req_ready;
      if (req_valid && req_ready) rsp_rdata <= req.we ? 32'd0 : rom[req.addr[AW+1:2]];
    end
  end

endmodule

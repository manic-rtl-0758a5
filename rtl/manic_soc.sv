// manic_soc: the MANIC microcontroller system around the vector-dataflow
// coprocessor, without the scalar RISC-V core, whose ports come out at the
// top:
//   cp_*   vector instructions issued by the core (instruction word and one
//          scalar operand, valid/ready), and cp_busy while the coprocessor
//          still holds or executes instructions;
//   if_*   the core's instruction fetch port, served by the 2 KB I-cache;
//   dm_*   the core's data port, which shares the 4 KB D-cache with the
//          coprocessor through an arbiter;
//   io_*   the core's port to the IO bus with the GPIO and I2C devices.
// The coprocessor owns the 4 KB 1r1w vector register file. The I-cache and
// D-cache reach main memory (1 KB boot ROM at 0x0000_0000, 64 KB SRAM at
// 0x1000_0000, 256 KB MRAM at 0x2000_0000) through a second arbiter.
// icache_en / dcache_en bypass the caches and mram_en is the MRAM power
// domain enable, the three switches of the configurations the reference
// design measures. All buses use the one-outstanding request/response
// protocol of manic_pkg. The block structure follows the reference block
// diagram; the address map and bus protocol are this design's.
module manic_soc
  import manic_pkg::*;
#(
  parameter int unsigned ICACHE_BYTES = 2048,
  parameter int unsigned DCACHE_BYTES = 4096,
  parameter int unsigned ROM_BYTES    = 1024,
  parameter int unsigned SRAM_BYTES   = 65536,
  parameter int unsigned MRAM_BYTES   = 262144,
  parameter int unsigned CLK_NS       = 20,
  parameter string       ROM_FILE     = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        icache_en,
  input  logic        dcache_en,
  input  logic        mram_en,
  // vector instruction issue
  input  logic        cp_valid,
  output logic        cp_ready,
  input  vinsn_t      cp_insn,
  input  logic [31:0] cp_scalar,
  output logic        cp_busy,
  // core instruction fetch
  input  logic        if_req_valid,
  output logic        if_req_ready,
  input  mem_req_t    if_req,
  output logic        if_rsp_valid,
  output logic [31:0] if_rsp_rdata,
  // core data
  input  logic        dm_req_valid,
  output logic        dm_req_ready,
  input  mem_req_t    dm_req,
  output logic        dm_rsp_valid,
  output logic [31:0] dm_rsp_rdata,
  // core IO
  input  logic        io_req_valid,
  output logic        io_req_ready,
  input  mem_req_t    io_req,
  output logic        io_rsp_valid,
  output logic [31:0] io_rsp_rdata,
  // pins
  input  logic [15:0] gpio_in,
  output logic [15:0] gpio_out,
  output logic [15:0] gpio_oe,
  input  logic        scl_in,
  input  logic        sda_in,
  output logic        sda_oe
);

  localparam int unsigned VAW = $clog2(VDF_NREGS * VDF_VLMAX);

  // ------------------------------------------------ D-cache arbiter signals
  logic [1:0]  da_req_valid, da_req_ready, da_rsp_valid;
  mem_req_t    da_req [2];
  logic        dc_req_valid, dc_req_ready, dc_rsp_valid;
  mem_req_t    dc_req;
  logic [31:0] dc_rsp_rdata, da_rsp_rdata;

  // ------------------------------------------------ coprocessor and VRF
  logic           vrf_re, vrf_we;
  logic [VAW-1:0] vrf_raddr, vrf_waddr;
  logic [31:0]    vrf_rdata, vrf_wdata;
  logic           cp_dreq_valid, cp_dreq_ready, cp_drsp_valid;
  mem_req_t       cp_dreq;

  vdf_coproc u_vdf (
    .clk, .rst_n,
    .cp_valid, .cp_ready, .cp_insn, .cp_scalar, .busy(cp_busy),
    .vrf_re, .vrf_raddr, .vrf_rdata, .vrf_we, .vrf_waddr, .vrf_wdata,
    .dreq_valid(cp_dreq_valid), .dreq_ready(cp_dreq_ready), .dreq(cp_dreq),
    .drsp_valid(cp_drsp_valid), .drsp_rdata(da_rsp_rdata)
  );

  vrf #(.NREGS(VDF_NREGS), .VLMAX(VDF_VLMAX)) u_vrf (
    .clk, .rst_n,
    .re(vrf_re), .raddr(vrf_raddr), .rdata(vrf_rdata),
    .we(vrf_we), .waddr(vrf_waddr), .wdata(vrf_wdata)
  );

  // ------------------------------------------------ D-cache arbiter
  assign da_req_valid  = {cp_dreq_valid, dm_req_valid};
  assign da_req[0]     = dm_req;
  assign da_req[1]     = cp_dreq;
  assign dm_req_ready  = da_req_ready[0];
  assign cp_dreq_ready = da_req_ready[1];
  assign dm_rsp_valid  = da_rsp_valid[0];
  assign cp_drsp_valid = da_rsp_valid[1];
  assign dm_rsp_rdata  = da_rsp_rdata;

  mem_arbiter u_darb (
    .clk, .rst_n,
    .req_valid(da_req_valid), .req_ready(da_req_ready), .req(da_req),
    .rsp_valid(da_rsp_valid), .rsp_rdata(da_rsp_rdata),
    .m_req_valid(dc_req_valid), .m_req_ready(dc_req_ready), .m_req(dc_req),
    .m_rsp_valid(dc_rsp_valid), .m_rsp_rdata(dc_rsp_rdata)
  );

  // ------------------------------------------------ caches
  logic [1:0]  ma_req_valid, ma_req_ready, ma_rsp_valid;
  mem_req_t    ma_req [2];
  logic [31:0] mm_rsp_rdata;

  cache #(.SIZE_BYTES(ICACHE_BYTES)) u_icache (
    .clk, .rst_n, .en(icache_en),
    .req_valid(if_req_valid), .req_ready(if_req_ready), .req(if_req),
    .rsp_valid(if_rsp_valid), .rsp_rdata(if_rsp_rdata),
    .m_req_valid(ma_req_valid[0]), .m_req_ready(ma_req_ready[0]), .m_req(ma_req[0]),
    .m_rsp_valid(ma_rsp_valid[0]), .m_rsp_rdata(mm_rsp_rdata)
  );

  cache #(.SIZE_BYTES(DCACHE_BYTES)) u_dcache (
    .clk, .rst_n, .en(dcache_en),
    .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req(dc_req),
    .rsp_valid(dc_rsp_valid), .rsp_rdata(dc_rsp_rdata),
    .m_req_valid(ma_req_valid[1]), .m_req_ready(ma_req_ready[1]), .m_req(ma_req[1]),
    .m_rsp_valid(ma_rsp_valid[1]), .m_rsp_rdata(mm_rsp_rdata)
  );

  // ------------------------------------------------ main memory
  logic        mm_req_valid, mm_req_ready, mm_rsp_valid;
  mem_req_t    mm_req;

  logic [31:0] mm_rsp_data_raw;

  mem_arbiter u_marb (
    .clk, .rst_n,
    .req_valid(ma_req_valid), .req_ready(ma_req_ready), .req(ma_req),
    .rsp_valid(ma_rsp_valid), .rsp_rdata(mm_rsp_rdata),
    .m_req_valid(mm_req_valid), .m_req_ready(mm_req_ready), .m_req(mm_req),
    .m_rsp_valid(mm_rsp_valid), .m_rsp_rdata(mm_rsp_data_raw)
  );

  main_memory #(
    .ROM_BYTES(ROM_BYTES), .SRAM_BYTES(SRAM_BYTES), .MRAM_BYTES(MRAM_BYTES),
    .CLK_NS(CLK_NS), .ROM_FILE(ROM_FILE)
  ) u_mem (
    .clk, .rst_n, .mram_en,
    .req_valid(mm_req_valid), .req_ready(mm_req_ready), .req(mm_req),
    .rsp_valid(mm_rsp_valid), .rsp_rdata(mm_rsp_data_raw)
  );

  // ------------------------------------------------ IO bus
  logic        g_req_valid, g_req_ready, g_rsp_valid;
  logic        i_req_valid, i_req_ready, i_rsp_valid;
  logic [31:0] g_rsp_rdata, i_rsp_rdata;

  io_bus u_io (
    .clk, .rst_n,
    .req_valid(io_req_valid), .req_ready(io_req_ready), .req(io_req),
    .rsp_valid(io_rsp_valid), .rsp_rdata(io_rsp_rdata),
    .gpio_req_valid(g_req_valid), .gpio_req_ready(g_req_ready),
    .gpio_rsp_valid(g_rsp_valid), .gpio_rsp_rdata(g_rsp_rdata),
    .i2c_req_valid(i_req_valid), .i2c_req_ready(i_req_ready),
    .i2c_rsp_valid(i_rsp_valid), .i2c_rsp_rdata(i_rsp_rdata)
  );

  gpio #(.WIDTH(16)) u_gpio (
    .clk, .rst_n,
    .req_valid(g_req_valid), .req_ready(g_req_ready), .req(io_req),
    .rsp_valid(g_rsp_valid), .rsp_rdata(g_rsp_rdata),
    .pin_in(gpio_in), .pin_out(gpio_out), .pin_oe(gpio_oe)
  );

  i2c_target u_i2c (
    .clk, .rst_n,
    .req_valid(i_req_valid), .req_ready(i_req_ready), .req(io_req),
    .rsp_valid(i_rsp_valid), .rsp_rdata(i_rsp_rdata),
    .scl_in, .sda_in, .sda_oe
  );

endmodule

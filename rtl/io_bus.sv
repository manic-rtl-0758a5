// io_bus: the IO bus between the scalar core and the peripherals. Address
// bits [11:8] pick the device: 0x0 GPIO, 0x1 I2C target; other devices
// answer reads with zero in the next cycle and drop writes. One request is
// outstanding at a time, so the device responses are merged. The bus and its
// two devices are named in the reference design; the decode is this
// design's.
module io_bus
  import manic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  output logic        gpio_req_valid,
  input  logic        gpio_req_ready,
  input  logic        gpio_rsp_valid,
  input  logic [31:0] gpio_rsp_rdata,
  output logic        i2c_req_valid,
  input  logic        i2c_req_ready,
  input  logic        i2c_rsp_valid,
  input  logic [31:0] i2c_rsp_rdata
);

  logic [3:0] dev;
  logic       none_rsp_q;

  assign dev            = req.addr[11:8];
  assign gpio_req_valid = req_valid && dev == 4'h0;
  assign i2c_req_valid  = req_valid && dev == 4'h1;

  always_comb begin
    unique case (dev)
      4'h0:    req_ready = gpio_req_ready;
      4'h1:    req_ready = i2c_req_ready;
      default: req_ready = !none_rsp_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_rsp_q <= 1'b0;
    else        none_rsp_q <= req_valid && dev > 4'h1 && !none_rsp_q;
  end

  assign rsp_valid = gpio_rsp_valid || i2c_rsp_valid || none_rsp_q;
  assign rsp_rdata = gpio_rsp_valid ? gpio_rsp_rdata :
                     i2c_rsp_valid  ? i2c_rsp_rdata  : 32'd0;

endmodule

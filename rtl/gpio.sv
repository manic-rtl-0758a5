// gpio: general-purpose IO register block on the IO bus. Three word
// registers: 0x0 OUT (pin output values, read/write), 0x4 OE (output
// enables, read/write), 0x8 IN (pin levels after a two-flop synchroniser,
// read only). Accesses answer in the next cycle. The reference design only
// names a GPIO block on the IO bus; the register map and width are this
// design's.
module gpio
  import manic_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  mem_req_t         req,
  output logic             rsp_valid,
  output logic [31:0]      rsp_rdata,
  input  logic [WIDTH-1:0] pin_in,
  output logic [WIDTH-1:0] pin_out,
  output logic [WIDTH-1:0] pin_oe
);

  logic [WIDTH-1:0] sync1_q, sync2_q;
  logic [1:0]       reg_sel;

  assign reg_sel   = req.addr[3:2];
  assign req_ready = !rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_out   <= '0;
      pin_oe    <= '0;
      sync1_q   <= '0;
      sync2_q   <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      sync1_q   <= pin_in;
      sync2_q   <= sync1_q;
      rsp_valid <= req_valid && req_ready;
      if (req_valid && req_ready) begin
        rsp_rdata <= '0;
        if (req.we) begin
          if (reg_sel == 2'd0) pin_out <= req.wdata[WIDTH-1:0];
          if (reg_sel == 2'd1) pin_oe  <= req.wdata[WIDTH-1:0];
        end else begin
          unique case (reg_sel)
            2'd0:    rsp_rdata <= 32'(pin_out);
            2'd1:    rsp_rdata <= 32'(pin_oe);
            2'd2:    rsp_rdata <= 32'(sync2_q);
            default: rsp_rdata <= '0;
          endcase
        end
      end
    end
  end

endmodule

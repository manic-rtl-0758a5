// vdf_mul: the 32 x 32 multiplier of the VExecute stage, returning the low
// 32 bits of the product (the same for signed and unsigned operands). It is
// combinational, single cycle, and fed by its own input registers in VGate so
// that ALU instructions leave it idle. Single-cycle operation is this
// design's choice; the reference design gives only the unit.
module vdf_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [63:0] prod;
  assign prod = {32'd0, a} * {32'd0, b};
  assign y    = prod[31:0];

endmodule

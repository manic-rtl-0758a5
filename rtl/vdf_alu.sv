// vdf_alu: the 32-bit ALU of the VExecute stage. It is combinational and
// works on the dedicated ALU input registers that VGate loads, so it does
// not toggle when a multiply passes through the stage. Operations: add,
// subtract, and, or, xor, shifts (by b[4:0]), signed/unsigned set-less-than,
// signed minimum and maximum. Loads and stores use its adder to form the
// element address. The operation set is this design's choice; the reference
// design only names an ALU next to a multiplier.
module vdf_alu
  import manic_pkg::*;
(
  input  vop_e        op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic signed_lt;
  assign signed_lt = $signed(a) < $signed(b);

  always_comb begin
    unique case (op)
      OP_VADD:  y = a + b;
      OP_VSUB:  y = a - b;
      OP_VAND:  y = a & b;
      OP_VOR:   y = a | b;
      OP_VXOR:  y = a ^ b;
      OP_VSLL:  y = a << b[4:0];
      OP_VSRL:  y = a >> b[4:0];
      OP_VSRA:  y = 32'($signed(a) >>> b[4:0]);
      OP_VSLT:  y = {31'd0, signed_lt};
      OP_VSLTU: y = {31'd0, a < b};
      OP_VMIN:  y = signed_lt ? a : b;
      OP_VMAX:  y = signed_lt ? b : a;
      default:  y = a + b;
    endcase
  end

endmodule

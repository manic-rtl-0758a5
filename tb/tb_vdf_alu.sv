// tb_vdf_alu: checks every ALU operation on random and corner operands
// against a reference written with plain SystemVerilog operators.
module tb_vdf_alu;
  import manic_pkg::*;
  vop_e op; logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;
  vdf_alu dut (.op, .a, .b, .y);
  vop_e ops [12] = '{OP_VADD, OP_VSUB, OP_VAND, OP_VOR, OP_VXOR, OP_VSLL, OP_VSRL,
                     OP_VSRA, OP_VSLT, OP_VSLTU, OP_VMIN, OP_VMAX};
  logic [31:0] corner [5] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};
  function automatic logic [31:0] refm(vop_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      OP_VADD:  return x + z;
      OP_VSUB:  return x + ~z + 1;
      OP_VAND:  return x & z;
      OP_VOR:   return x | z;
      OP_VXOR:  return x ^ z;
      OP_VSLL:  return 32'(64'(x) << z[4:0]);
      OP_VSRL:  return 32'(64'(x) >> z[4:0]);
      OP_VSRA:  return 32'(sx >> z[4:0]);
      OP_VSLT:  return (sx < sz) ? 1 : 0;
      OP_VSLTU: return (64'(x) < 64'(z)) ? 1 : 0;
      OP_VMIN:  return (sx < sz) ? x : z;
      OP_VMAX:  return (sx < sz) ? z : x;
      default:  return 0;
    endcase
  endfunction
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 4000; k++) begin
      op = ops[k % 12];
      a  = (k % 7 == 0) ? corner[$urandom_range(0, 4)] : $urandom;
      b  = (k % 5 == 0) ? corner[$urandom_range(0, 4)] : $urandom;
      #1;
      exp_y = refm(op, a, b);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("%s %h %h -> %h, expected %h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

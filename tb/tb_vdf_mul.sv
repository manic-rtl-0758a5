// tb_vdf_mul: checks the low 32 bits of the product against a 64-bit
// reference, for random and corner operands.
module tb_vdf_mul;
  logic [31:0] a, b, y;
  logic [63:0] p;
  int checks = 0, failures = 0;
  vdf_mul dut (.a, .b, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 3000; k++) begin
      a = (k % 9 == 0) ? 32'hFFFF_FFFF : $urandom;
      b = (k % 11 == 0) ? 32'h8000_0001 : ((k % 13 == 0) ? 32'd0 : $urandom);
      #1;
      p = 64'(a) * 64'(b);
      checks++;
      if (y !== p[31:0]) begin
        failures++;
        if (failures < 10) $display("%h * %h -> %h, expected %h", a, b, y, p[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

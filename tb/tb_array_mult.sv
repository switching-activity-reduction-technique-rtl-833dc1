// tb_array_mult: exhaustive self-checking testbench of the array multiplier.
// All 65536 operand pairs of the default 8x8 instance and all 256 pairs of a
// 4x4 instance are compared with the integer product.
module tb_array_mult;
  int checks = 0, failures = 0;
  logic [7:0]  x8, y8;
  logic [15:0] z8;
  logic [3:0]  x4, y4;
  logic [7:0]  z4;

  array_mult u8 (.x(x8), .y(y8), .z(z8));
  array_mult #(.N(4)) u4 (.x(x4), .y(y4), .z(z4));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        checks++;
        if (z8 != 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d*%0d gave %0d", a, b, z8);
        end
      end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        checks++;
        if (z4 != 8'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL: 4-bit %0d*%0d gave %0d", a, b, z4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

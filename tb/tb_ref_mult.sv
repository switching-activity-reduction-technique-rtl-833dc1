// tb_ref_mult: exhaustive self-checking testbench of the reference multiplier
// (all 65536 pairs of 8-bit operands against shift-and-add products computed
// here).
module tb_ref_mult;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  ref_mult u_dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        automatic int acc = 0;
        for (int k = 0; k < 8; k++) if (j[k]) acc += i << k;
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p != 16'(acc)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d*%0d gave %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

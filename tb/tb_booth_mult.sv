// tb_booth_mult: exhaustive self-checking testbench of the Booth multiplier.
// The default 8x8 instance is checked on all 65536 operand pairs in unsigned
// mode and in two's complement mode; a 5x5 instance (odd width) and a 4x4
// instance are checked exhaustively in both modes. Expected products are
// integer products of the operands read as unsigned or signed numbers.
module tb_booth_mult;
  int checks = 0, failures = 0;
  logic        tc;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [4:0]  x5, y5;
  logic [9:0]  p5;
  logic [3:0]  x4, y4;
  logic [7:0]  p4;

  booth_mult u8 (.x(x8), .y(y8), .tc(tc), .p(p8));
  booth_mult #(.N(5)) u5 (.x(x5), .y(y5), .tc(tc), .p(p5));
  booth_mult #(.N(4)) u4 (.x(x4), .y(y4), .tc(tc), .p(p4));

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sval(int v, int n, bit s);
    if (s && v >= (1 << (n - 1))) return v - (1 << n);
    return v;
  endfunction

  task automatic run(int n);
    for (int a = 0; a < (1 << n); a++)
      for (int b = 0; b < (1 << n); b++) begin
        int exp_p;
        logic [31:0] got;
        x8 = 8'(a); y8 = 8'(b);
        x5 = 5'(a); y5 = 5'(b);
        x4 = 4'(a); y4 = 4'(b);
        #1;
        exp_p = sval(a, n, tc) * sval(b, n, tc);
        case (n)
          8: got = 32'(p8);
          5: got = 32'(p5);
          default: got = 32'(p4);
        endcase
        checks++;
        if (got != (32'(exp_p) & ((32'd1 << (2 * n)) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d tc=%0b %0d*%0d gave %0d", n, tc, a, b, got);
        end
      end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      tc = m[0];
      run(8);
      run(5);
      run(4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

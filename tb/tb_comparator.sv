// tb_comparator: self-checking testbench of the response comparator.
// Random products, with mismatches in about one compare of four, some with
// valid low; checks the combinational match, the error count, the sticky fail
// flag and the clear.
module tb_comparator;
  logic        clk = 1'b0;
  logic        rst_n, clr, valid, match, fail;
  logic [15:0] actual, expected, err_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comparator u_dut (.clk(clk), .rst_n(rst_n), .clr(clr), .valid(valid), .actual(actual),
                    .expected(expected), .match(match), .err_count(err_count), .fail(fail));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs;
    bit f;
    rst_n = 1'b0; clr = 1'b0; valid = 1'b0; actual = '0; expected = '0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      errs = 0; f = 1'b0;
      for (int i = 0; i < 400; i++) begin
        valid    = ($urandom % 5) != 0;
        expected = 16'($urandom);
        actual   = (($urandom % 4) == 0) ? expected ^ 16'(1 << ($urandom % 16)) : expected;
        #1;
        check(match == (actual == expected), $sformatf("match for %h/%h", actual, expected));
        if (valid && actual != expected) begin errs++; f = 1'b1; end
        @(posedge clk); @(negedge clk);
        check(err_count == 16'(errs), $sformatf("err_count %0d expected %0d", err_count, errs));
        check(fail == f, "fail flag");
      end
      check(errs > 0, "some mismatches were applied");
      // clear for the next round
      clr = 1'b1; valid = 1'b1; actual = 16'h1; expected = 16'h2;
      @(posedge clk); @(negedge clk);
      clr = 1'b0;
      check(err_count == 0 && fail == 1'b0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

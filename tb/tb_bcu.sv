// tb_bcu: self-checking testbench of the BIST control unit (NUM_PATTERNS
// reduced to 10). Checks the clear pulse, the repeating step order
// en1en2 = 10, 00, 01, 00, that capture is high for exactly NUM_PATTERNS
// clocks while count runs 0..NUM_PATTERNS, that compare_valid follows capture
// by one clock, that done comes NUM_PATTERNS+2 clocks after the run starts,
// and that the unit returns to idle and runs again when enable is cycled.
module tb_bcu;
  localparam int NP = 10;
  logic        clk = 1'b0;
  logic        rst_n, enable, tpg_en, en1, en2, capture, compare_valid, clr, done;
  logic [15:0] count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcu #(.NUM_PATTERNS(NP)) u_dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .tpg_en(tpg_en), .en1(en1), .en2(en2),
    .capture(capture), .compare_valid(compare_valid), .clr(clr), .count(count), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_cap;
    int caps, cyc;
    rst_n = 1'b0; enable = 1'b0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!capture && !tpg_en && !done && !clr, "idle outputs");
    for (int run = 0; run < 2; run++) begin
      enable = 1'b1;
      #1;
      check(clr, "clear pulse on start");
      @(posedge clk); @(negedge clk);
      check(!clr, "clear is one clock");
      caps = 0; cyc = 0; prev_cap = 1'b0;
      while (!done && cyc < 100) begin
        if (capture) begin
          check(tpg_en, "generator enabled while capturing");
          check(count == 16'(caps), $sformatf("count %0d expected %0d", count, caps));
          check(en1 == (caps % 4 == 0) && en2 == (caps % 4 == 2),
                $sformatf("step %0d en1en2=%b%b", caps, en1, en2));
          caps++;
        end else begin
          check(!en1 && !en2 && !tpg_en, "generator idle outside the run");
        end
        check(compare_valid == prev_cap, "compare_valid follows capture");
        prev_cap = capture;
        @(posedge clk); @(negedge clk);
        cyc++;
      end
      check(caps == NP, $sformatf("captures %0d", caps));
      check(cyc == NP + 1, $sformatf("done after %0d clocks", cyc + 1));
      check(count == 16'(NP), "final count");
      repeat (3) @(posedge clk);
      @(negedge clk);
      check(done, "done holds while enable is high");
      enable = 1'b0;
      @(posedge clk); @(negedge clk);
      check(!done, "back to idle when enable drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bist_top: end-to-end self-checking testbench of the BIST design at its
// default parameters (8-bit generators, 1020 patterns per test).
//
// Three complete self-tests are run back to back:
//   1. array multiplier as the circuit under test (unsigned);
//   2. Booth multiplier, unsigned mode;
//   3. Booth multiplier, two's complement mode. The reference multiplier is
//      unsigned, so here the comparator must flag exactly the patterns whose
//      signed product differs from the unsigned one; the testbench counts
//      them itself from the operands it observes.
// On every compared clock it checks both registered products against the
// product of the operands that were on the generator outputs when they were
// captured, and the pass/fail output. It checks the test length (done
// NUM_PATTERNS+2 clocks after the start) and the final counters. It counts
// how often each mechanism occurred: first-half steps, second-half steps,
// injection steps that changed a bit, flagged mismatches, completed tests in
// each CUT/mode; a mechanism that never occurred is a failure.
module tb_bist_top;
  localparam int NP = 1020;
  logic        clk = 1'b0;
  logic        rst_n, enable, cut_sel, booth_signed;
  logic [7:0]  in1_cut, in2_cut;
  logic [15:0] product_cut, tpa_in, tpa_ref_in, count, err_count;
  logic        tpa_out, compare_valid, bist_done, bist_fail;
  int checks = 0, failures = 0;
  int n_h1 = 0, n_h2 = 0, n_inj = 0, n_mismatch = 0, n_array = 0, n_booth_u = 0, n_booth_s = 0;

  always #5 clk = ~clk;

  bist_top u_dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .cut_sel(cut_sel), .booth_signed(booth_signed),
    .in1_cut(in1_cut), .in2_cut(in2_cut), .product_cut(product_cut), .tpa_in(tpa_in),
    .tpa_ref_in(tpa_ref_in), .tpa_out(tpa_out), .compare_valid(compare_valid), .count(count),
    .err_count(err_count), .bist_done(bist_done), .bist_fail(bist_fail));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(bit sel, bit sgn);
    logic [7:0] a_prev, b_prev, a_now, b_now;
    logic [15:0] exp_ref, exp_cut;
    int cyc, compares, exp_errs;
    cut_sel = sel; booth_signed = sgn;
    enable = 1'b1;
    a_prev = in1_cut; b_prev = in2_cut;
    cyc = 0; compares = 0; exp_errs = 0;
    @(posedge clk); @(negedge clk);
    while (!bist_done && cyc < 2 * NP) begin
      a_now = in1_cut; b_now = in2_cut;
      // which half of the operands changed in the last clock
      if (a_now != a_prev) begin
        if (((a_now ^ a_prev) & 8'hF0) != 0) begin
          if (count % 4 == 2) n_h2++;   // step just taken was index count-1
          else if (count % 4 == 3 || count % 4 == 1) n_inj++;
        end else begin
          if (count % 4 == 1) n_h1++;
          else n_inj++;
        end
      end
      if (compare_valid) begin
        compares++;
        exp_ref = 16'(a_prev) * 16'(b_prev);
        if (sel && sgn) exp_cut = 16'(32'(signed'(a_prev)) * 32'(signed'(b_prev)));
        else            exp_cut = exp_ref;
        check(tpa_ref_in == exp_ref, $sformatf("reference %0d*%0d gave %0d", a_prev, b_prev, tpa_ref_in));
        check(tpa_in == exp_cut, $sformatf("CUT %0d*%0d gave %0d expected %0d", a_prev, b_prev, tpa_in, exp_cut));
        check(tpa_out == (exp_cut == exp_ref), "pass/fail output");
        if (exp_cut != exp_ref) begin
          exp_errs++;
          n_mismatch += !tpa_out;
        end
      end
      a_prev = a_now; b_prev = b_now;
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    check(bist_done, "test finished");
    check(cyc == NP + 1, $sformatf("done %0d clocks after start, expected %0d", cyc + 1, NP + 2));
    check(compares == NP, $sformatf("%0d compares", compares));
    check(count == 16'(NP), "pattern count");
    check(err_count == 16'(exp_errs), $sformatf("err_count %0d expected %0d", err_count, exp_errs));
    check(bist_fail == (exp_errs > 0), "fail flag");
    if (sel && sgn) check(exp_errs > 0, "signed mode must show mismatches against the unsigned reference");
    $display("test cut_sel=%0b signed=%0b: %0d patterns, %0d mismatches", sel, sgn, compares, err_count);
    if (!sel) n_array++; else if (!sgn) n_booth_u++; else n_booth_s++;
    enable = 1'b0;
    @(posedge clk); @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; cut_sel = 1'b0; booth_signed = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(in1_cut == 8'h01 && in2_cut == 8'h01 && !bist_done && !bist_fail, "reset state");
    run_test(1'b0, 1'b0);
    run_test(1'b1, 1'b0);
    run_test(1'b1, 1'b1);
    $display("mechanisms: first-half steps %0d, second-half steps %0d, injection steps %0d, flagged mismatches %0d, tests array %0d booth-unsigned %0d booth-signed %0d",
             n_h1, n_h2, n_inj, n_mismatch, n_array, n_booth_u, n_booth_s);
    check(n_h1 > 0, "first-half step never seen");
    check(n_h2 > 0, "second-half step never seen");
    check(n_inj > 0, "injection step never changed a bit");
    check(n_mismatch > 0, "no mismatch flagged");
    check(n_array == 1 && n_booth_u == 1 && n_booth_s == 1, "all three tests ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

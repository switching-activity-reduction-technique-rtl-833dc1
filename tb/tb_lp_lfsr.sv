// tb_lp_lfsr: self-checking testbench of the low-power pattern generator.
//
// The testbench drives the four steps (en1en2 = 10, 00, 01, 00) itself and
// keeps its own model of the underlying LFSR (recurrence D1 <= D4^D5^D6^D8).
// It checks
//  - the exact test vector after every step (half update, injection rule);
//  - that each step changes only bits of the half it addresses;
//  - that after every en1en2=01 step the vector equals the next LFSR state,
//    so the generator walks through all 255 LFSR states;
//  - that tpg_en=0 freezes the generator;
//  - the switching activity: per-clock toggles of the vector against a
//    conventional LFSR stepping every clock over the same 255 states. The
//    low-power generator must never toggle more than N/2 bits in a clock and
//    must have under half the conventional LFSR's average toggles per clock.
module tb_lp_lfsr;
  logic       clk = 1'b0;
  logic       rst_n, tpg_en, en1, en2;
  logic [7:0] tv;
  logic [7:0] c_state, c_next;
  logic       c_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lp_lfsr u_dut (.clk(clk), .rst_n(rst_n), .tpg_en(tpg_en), .en1(en1), .en2(en2), .tv(tv));
  // conventional generator for the switching-activity comparison
  lfsr u_conv (.clk(clk), .rst_n(rst_n), .en(c_en), .state(c_state), .next_state(c_next));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] step_model(logic [7:0] s);
    return {s[6:0], s[3] ^ s[4] ^ s[5] ^ s[7]};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m, mn, exp_tv, prev;
    int lp_toggles, lp_peak, conv_toggles, states_seen, t;
    rst_n = 1'b0; tpg_en = 1'b0; en1 = 1'b0; en2 = 1'b0; c_en = 1'b0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    m = 8'h01; exp_tv = 8'h01;
    check(tv == 8'h01, "reset value");
    // frozen while tpg_en = 0, whatever en1/en2 say
    en1 = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(tv == 8'h01, "hold while tpg_en=0");
    en1 = 1'b0;
    lp_toggles = 0; lp_peak = 0; states_seen = 0;
    tpg_en = 1'b1;
    for (int k = 0; k < 4 * 255; k++) begin
      mn = step_model(m);
      prev = tv;
      en1 = (k % 4 == 0);
      en2 = (k % 4 == 2);
      case (k % 4)
        0: exp_tv[3:0] = mn[3:0];
        1: for (int i = 4; i < 8; i++) exp_tv[i] = (exp_tv[i] == mn[i]) ? mn[i] : mn[0];
        2: begin exp_tv[7:4] = mn[7:4]; m = mn; end
        default: for (int i = 0; i < 4; i++) exp_tv[i] = (exp_tv[i] == mn[i]) ? mn[i] : mn[0];
      endcase
      @(posedge clk); @(negedge clk);
      check(tv == exp_tv, $sformatf("step %0d: tv=%h expected %h", k, tv, exp_tv));
      if (k % 4 == 0 || k % 4 == 3) check(((tv ^ prev) & 8'hF0) == 0, $sformatf("step %0d touched second half", k));
      else                          check(((tv ^ prev) & 8'h0F) == 0, $sformatf("step %0d touched first half", k));
      if (k % 4 == 2) begin
        check(tv == m, $sformatf("after step %0d tv=%h, LFSR state %h", k, tv, m));
        states_seen++;
      end
      t = $countones(tv ^ prev);
      lp_toggles += t;
      if (t > lp_peak) lp_peak = t;
    end
    check(states_seen == 255 && m == 8'h01, "full LFSR period walked");
    en1 = 1'b0; en2 = 1'b0; tpg_en = 1'b0;
    // conventional LFSR over the same 255 states, one per clock
    conv_toggles = 0;
    c_en = 1'b1;
    for (int k = 0; k < 255; k++) begin
      prev = c_state;
      @(posedge clk); @(negedge clk);
      conv_toggles += $countones(c_state ^ prev);
    end
    c_en = 1'b0;
    $display("switching: LP-LFSR %0d toggles in %0d clocks (peak %0d/clock), conventional %0d toggles in 255 clocks",
             lp_toggles, 4 * 255, lp_peak, conv_toggles);
    check(lp_peak <= 4, "peak toggles per clock above N/2");
    check(lp_toggles * 255 * 2 < conv_toggles * 4 * 255, "average toggles per clock not below half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr: self-checking testbench of the conventional LFSR.
//
// Three instances: the 3-bit LFSR with polynomial x^3+x+1 and the 3-bit LFSR
// with 1+x+x^2+x^3, both from seed D1D2D3=100, are checked state by state
// against the two reference tables (7-state and 4-state cycles); the default
// 8-bit LFSR is checked against a bit-serial recurrence model written here
// and must visit 255 distinct non-zero states before returning to its seed.
// en=0 must hold the state.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst_n;
  logic en;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [2:0] st_p, nx_p, st_n, nx_n;
  logic [7:0] st8, nx8;

  lfsr #(.N(3), .TAPS(3'b101), .SEED(3'b001)) u_prim (
    .clk(clk), .rst_n(rst_n), .en(en), .state(st_p), .next_state(nx_p));
  lfsr #(.N(3), .TAPS(3'b111), .SEED(3'b001)) u_nonprim (
    .clk(clk), .rst_n(rst_n), .en(en), .state(st_n), .next_state(nx_n));
  lfsr u_def (
    .clk(clk), .rst_n(rst_n), .en(en), .state(st8), .next_state(nx8));

  // Tables written as D1D2D3 strings; D1 is state bit 0.
  string tab1 [8] = '{"100","110","111","011","101","010","001","100"};
  string tab2 [5] = '{"100","110","011","001","100"};

  function automatic logic [2:0] from_str(string s);
    logic [2:0] v;
    for (int i = 0; i < 3; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    logic [7:0] model;
    bit seen [256];
    int period;
    rst_n = 1'b0; en = 1'b0;
    @(posedge clk); @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    model = 8'h01;
    // hold with en=0
    @(posedge clk); @(negedge clk);
    check(st_p == 3'b001 && st8 == 8'h01, "hold with en=0");
    en = 1'b1;
    period = 0;
    for (int t = 0; t < 260; t++) begin
      if (t < 8) check(st_p == from_str(tab1[t]), $sformatf("x^3+x+1 step %0d: %b", t, st_p));
      if (t < 5) check(st_n == from_str(tab2[t]), $sformatf("1+x+x^2+x^3 step %0d: %b", t, st_n));
      check(st8 == model, $sformatf("8-bit step %0d: %h vs %h", t, st8, model));
      if (t > 0 && period == 0 && st8 == 8'h01) period = t;
      if (period == 0) begin
        check(!seen[st8] && st8 != 0, $sformatf("8-bit state %h repeated early", st8));
        seen[st8] = 1'b1;
      end
      // model: D1 <= D4^D5^D6^D8, Di+1 <= Di
      model = {model[6:0], model[3] ^ model[4] ^ model[5] ^ model[7]};
      @(posedge clk); @(negedge clk);
    end
    check(period == 255, $sformatf("8-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

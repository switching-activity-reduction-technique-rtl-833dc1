// tb_pipo_reg: self-checking testbench of the 16-bit PIPO register: reset to
// zero, capture on load, hold without load, over random data.
module tb_pipo_reg;
  logic        clk = 1'b0;
  logic        rst_n, load;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipo_reg u_dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b1; d = 16'hFFFF;
    @(posedge clk); @(negedge clk);
    checks++;
    if (q != 16'h0) begin failures++; $display("FAIL: reset value %h", q); end
    model = 16'h0;
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      load = 1'($urandom);
      d    = 16'($urandom);
      @(posedge clk);
      if (load) model = d;
      @(negedge clk);
      checks++;
      if (q != model) begin failures++; $display("FAIL: cycle %0d q=%h expected %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

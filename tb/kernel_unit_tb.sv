// kernel_unit_tb: self-checking test of the square (d = 2) kernel.
// Feeds random 25-bit scalars, including 0 and the maximum, with a random
// enable, and checks k_out = s*s and k_valid one cycle later.
module kernel_unit_tb;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [24:0] s_in = '0;
  logic [49:0] k_out, expect_k;
  logic k_valid;
  int checks = 0, failures = 0;

  kernel_unit #(.IN_W(25), .OUT_W(50)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    expect_k = '0;
    for (int t = 0; t < 300; t++) begin
      logic [24:0] s;
      logic e;
      s = (t == 0) ? 25'h1ffffff : (t == 1) ? 25'd0 : 25'($urandom);
      e = (t < 2) || ($urandom_range(0, 3) != 0);
      en = e; s_in = s;
      @(negedge clk);
      check(k_valid == e, "k_valid");
      if (e) expect_k = 50'(s) * 50'(s);
      check(k_out == expect_k, $sformatf("square of %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// backend_mac_tb: self-checking test of the back-end MAC.
// Several rounds: clear, accumulate random kernel values times random
// signed alphas, add a random bias, and compare score and class with a
// model computed in 75-bit signed arithmetic. Both classes must occur.
module backend_mac_tb;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, bias_en = 1'b0;
  logic [49:0] k_in = '0;
  logic signed [17:0] alpha = '0;
  logic signed [74:0] bias = '0, score, model;
  logic class_pos;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  backend_mac #(.K_W(50), .ALPHA_W(18), .ACC_W(75)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s score=%0d model=%0d", what, score, model); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 20; r++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      model = '0;
      check(score == 0, "cleared");
      for (int i = 0; i < 30; i++) begin
        logic [49:0] kv;
        logic signed [17:0] av;
        kv = {$urandom, $urandom} & ((r % 2) ? 50'h3ffffffffffff : 50'hfffffffffff);
        av = 18'($urandom);
        en = ($urandom_range(0, 4) != 0);
        k_in = kv; alpha = av;
        if (en) model = model + 75'(signed'({1'b0, kv})) * 75'(av);
        @(negedge clk);
        check(score == model, "accumulate");
      end
      en = 1'b0;
      bias = 75'(signed'({$urandom, $urandom})) <<< 8;
      bias_en = 1'b1;
      model = model + bias;
      @(negedge clk);
      bias_en = 1'b0;
      check(score == model, "bias");
      check(class_pos == (model >= 0), "class");
      if (class_pos) n_pos++; else n_neg++;
    end
    check(n_pos > 0 && n_neg > 0, "both classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

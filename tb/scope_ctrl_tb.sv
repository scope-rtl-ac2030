// scope_ctrl_tb: self-checking test of the SCoPE control unit.
// With n = 4 PEs, k = 6 elements and 3 groups (the SV address generator's
// last flag is modelled here), it checks that a start without a ready
// vector is ignored, and then, per run, the exact sequence: k element issues
// per group with acc_reset on the first, one transfer load, n kernel/alpha
// enables starting one cycle after the load, group length n + k + (n + 2),
// the total (n + k + (n + 2)) * groups, one bias cycle and done after it.
module scope_ctrl_tb;
  localparam int unsigned N = 4;
  localparam int unsigned K = 6;
  localparam int unsigned S = 3;
  localparam int unsigned G = N + K + (N + 2);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, vec_ready = 1'b0, sv_last, iv_last;
  logic busy, done, ag_clr, elem_en, acc_reset, xfer_load, xfer_en;
  logic kern_en, alpha_en, mac_clr, bias_en, in_group;
  int checks = 0, failures = 0;
  int issued = 0;

  scope_ctrl #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  assign sv_last = elem_en && (issued == S*K - 1);
  assign iv_last = elem_en && ((issued % K) == K - 1);
  always_ff @(posedge clk) begin
    if (ag_clr) issued <= 0;
    else if (elem_en) issued <= (issued == S*K - 1) ? 0 : issued + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    start = 1'b1;                      // no vector yet: ignored
    @(negedge clk);
    start = 1'b0;
    check(!busy, "start without vector ignored");
    for (int run = 0; run < 2; run++) begin
      vec_ready = 1'b1;
      start = 1'b1;
      #1;
      check(ag_clr && mac_clr, "clear on start");
      @(negedge clk);
      start = 1'b0;
      vec_ready = 1'b0;
      for (int g = 0; g < S; g++) begin
        int load_at, n_elem, n_rst, n_kern, first_kern;
        n_elem = 0; n_rst = 0; n_kern = 0; load_at = -1; first_kern = -1;
        for (int c = 0; c < G; c++) begin
          check(in_group && busy, "in group");
          check(!bias_en && !done, "no bias/done inside a group");
          if (elem_en) begin
            n_elem++;
            check(c == n_elem - 1, "elements issued back to back from cycle 0");
          end
          if (acc_reset) begin n_rst++; check(c == 0, "acc_reset on first element"); end
          if (xfer_load) begin load_at = c; check(xfer_en, "load inside transfer"); end
          check(xfer_en == (c >= N + K), "transfer phase timing");
          check(alpha_en == kern_en, "alpha follows kernel enable");
          if (kern_en) begin
            n_kern++;
            if (first_kern < 0) first_kern = c;
          end
          @(negedge clk);
        end
        check(n_elem == K, "k elements per group");
        check(n_rst == 1, "one acc_reset per group");
        check(load_at == N + K, "transfer load after n + k cycles");
        check(n_kern == N, "n scalars to the kernel");
        check(first_kern == load_at + 1, "kernel starts after load");
      end
      check(!in_group && bias_en, "bias after the last group");
      @(negedge clk);
      check(done && busy, "done after bias");
      @(negedge clk);
      check(!busy && !done, "back to idle");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

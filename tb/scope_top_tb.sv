// scope_top_tb: end-to-end test of SCoPE at reduced size, three rows.
// n = 4 PEs, k = 10 elements, m = 10 SVs, so each PE has 3 SV slots and two
// slots are padding (alpha 0, random SV data). SV j sits in PE j % n, slot
// j / n; its alpha*y goes to alpha address slot*n + (n-1-pe). Three rows
// classify three different vectors per run; only row 0 holds SVs. For each
// row the testbench computes
//   score = sum_j alpha_j * (x . s_j)^2 + b
// in 75-bit arithmetic and compares score and class_pos with the design.
// It checks the cycle count (n + k + (n + 2)) * ceil(m/n) of the group
// phases, the start-to-done latency (plus ROWS-1 cycles of row skew), and
// counts how often each mechanism happened: start refused without a ready
// vector, acc_reset words, parallel transfer loads, padded slots, SV
// elements passed down to a memoryless row, every PE of every row in each
// of its IDLE / PROCESSING / TRANSFERRING states, and both classes.
module scope_top_tb;
  import scope_pkg::*;
  localparam int unsigned N    = 4;
  localparam int unsigned K    = 10;
  localparam int unsigned M    = 10;
  localparam int unsigned ROWS = 3;
  localparam int unsigned NV   = 4;        // runs
  localparam int unsigned S  = (M + N - 1) / N;
  localparam int unsigned SD = S * K;
  localparam int unsigned SVM_AW = $clog2(SD);
  localparam int unsigned IV_AW  = $clog2(K);
  localparam int unsigned PE_AW  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned G  = N + K + (N + 2);
  localparam longint WATCHDOG = 64'(N) * SD + 64'(NV) * (S * G + ROWS * K + 20) + 1000;

  logic clk = 1'b0, rst = 1'b1;
  logic iv_we = 1'b0, sv_we = 1'b0, alpha_we = 1'b0, start = 1'b0;
  logic [ROW_AW-1:0] iv_row = '0;
  logic [IV_AW-1:0] iv_waddr = '0;
  logic [7:0] iv_wdata = '0, sv_wdata = '0;
  logic [PE_AW-1:0] sv_wpe = '0;
  logic [SVM_AW-1:0] sv_waddr = '0;
  logic [10:0] alpha_waddr = '0;
  logic signed [17:0] alpha_wdata = '0;
  logic signed [74:0] bias = '0;
  logic signed [74:0] score [ROWS];
  logic class_pos [ROWS];
  pe_state_e pe_state [ROWS][N];
  logic vec_ready, busy, done, in_group;

  logic [7:0]         sv_data [M][K];
  logic signed [17:0] alpha_ref [M];
  logic [7:0]         x [ROWS][K];
  logic signed [74:0] sum [ROWS];

  int checks = 0, failures = 0;
  int n_refused = 0, n_accrst = 0, n_load = 0, n_pad = 0, n_pos = 0, n_neg = 0;
  int n_down = 0;
  int st_seen [ROWS][N][3];

  scope_top #(.N(N), .K(K), .M(M), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    if (!rst) begin
      if (dut.g_row[0].front_word.acc_reset) n_accrst++;
      if (dut.rc[0].xfer_load) n_load++;
      if (ROWS > 1 && dut.sv_v_valid[0][N-1]) n_down++;
      for (int r = 0; r < ROWS; r++)
        for (int p = 0; p < N; p++) st_seen[r][p][int'(pe_state[r][p])]++;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int p = 0; p < N; p++)
        for (int s = 0; s < 3; s++) st_seen[r][p][s] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // SVs and coefficients, padding slots included
    for (int p = 0; p < N; p++) begin
      for (int g = 0; g < S; g++) begin
        int j;
        j = g * N + p;
        if (j >= M) n_pad++;
        for (int e = 0; e < K; e++) begin
          logic [7:0] v;
          v = 8'($urandom);
          if (j < M) sv_data[j][e] = v;
          sv_we = 1'b1; sv_wpe = PE_AW'(p); sv_waddr = SVM_AW'(g*K + e); sv_wdata = v;
          @(negedge clk);
        end
        sv_we = 1'b0;
        alpha_we = 1'b1;
        alpha_waddr = 11'(g*N + (N-1-p));
        alpha_wdata = (j < M) ? 18'($urandom) : '0;
        if (j < M) alpha_ref[j] = alpha_wdata;
        @(negedge clk);
        alpha_we = 1'b0;
      end
    end
    // a start before any vector is written is refused
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (!busy) n_refused++;
    check(!busy, "start refused without vector");

    for (int v = 0; v < NV; v++) begin
      int t_start, cyc_group;
      for (int r = 0; r < ROWS; r++) begin
        for (int e = 0; e < K; e++) begin
          x[r][e] = (v == 0 && r == 0) ? 8'hff : 8'($urandom);
          iv_we = 1'b1; iv_row = ROW_AW'(r); iv_waddr = IV_AW'(e); iv_wdata = x[r][e];
          @(negedge clk);
        end
        iv_we = 1'b0;
        if (r < ROWS - 1) check(!vec_ready, "not ready before the last row");
      end
      check(vec_ready, "vector ready");
      for (int r = 0; r < ROWS; r++) begin
        sum[r] = '0;
        for (int j = 0; j < M; j++) begin
          logic [24:0] dot;
          logic [49:0] kv;
          dot = '0;
          for (int e = 0; e < K; e++) dot += 25'(x[r][e]) * 25'(sv_data[j][e]);
          kv = 50'(dot) * 50'(dot);
          sum[r] += 75'(signed'({1'b0, kv})) * 75'(alpha_ref[j]);
        end
      end
      // bias puts row 0 just above or just below the decision boundary
      bias = -sum[0] + ((v % 2) ? -75'sd1 - 75'($urandom_range(0, 1000)) : 75'($urandom_range(0, 1000)));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t_start = 0; cyc_group = 0;
      while (!done) begin
        if (in_group) cyc_group++;
        t_start++;
        check(busy, "busy until done");
        @(negedge clk);
      end
      if (v == 0) $display("cycles for one batch: %0d (formula: %0d)", cyc_group, G * S);
      check(cyc_group == G * S, $sformatf("group cycles %0d, expected %0d", cyc_group, G*S));
      check(t_start == G * S + 1 + (ROWS - 1), $sformatf("start to done %0d", t_start));
      for (int r = 0; r < ROWS; r++) begin
        logic signed [74:0] expect_score;
        expect_score = sum[r] + bias;
        check(score[r] == expect_score,
              $sformatf("row %0d score %0d expected %0d", r, score[r], expect_score));
        check(class_pos[r] == (expect_score >= 0), "class");
        if (class_pos[r]) n_pos++; else n_neg++;
      end
      @(negedge clk);
      check(!busy, "idle after done");
      check(!vec_ready, "start consumed the vectors");
    end

    $display("mechanisms: refused=%0d acc_reset=%0d loads=%0d padded=%0d down=%0d pos=%0d neg=%0d",
             n_refused, n_accrst, n_load, n_pad, n_down, n_pos, n_neg);
    check(n_refused > 0, "refused start seen");
    check(n_accrst == NV * S, "one acc_reset per group");
    check(n_load == NV * S, "one transfer load per group");
    check(n_pad > 0 || (M % N) == 0, "padded slot seen");
    check(n_down == NV * S * K || ROWS == 1, "SV elements passed down");
    check(n_pos > 0 && n_neg > 0, "both classes seen");
    for (int r = 0; r < ROWS; r++)
      for (int p = 0; p < N; p++)
        check(st_seen[r][p][0] > 0 && st_seen[r][p][1] > 0 && st_seen[r][p][2] > 0,
              $sformatf("row %0d PE %0d visited every state", r, p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint c = 0; c < WATCHDOG; c++) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

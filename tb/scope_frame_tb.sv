// scope_frame_tb: a whole 320x240 frame through the five-row array.
// A random 320x240 8-bit image is searched with 20x20 windows at a stride of
// 5 pixels: 61 x 45 = 2,745 windows (k = 400 elements each). Five rows of
// n = 100 PEs classify five windows per batch against m = 818 random SVs,
// 549 batches in all. Every window's score and class are compared with a
// model, each batch must take (100 + 400 + 102) * 9 + 2 + 4 = 5,424 cycles
// from start to done (inclusive), and the frame's compute cycles and the
// frame rate at 100 MHz are reported. Loading the windows into the input
// vector memories is not counted, as it would overlap in a system with a
// second buffer.
module scope_frame_tb;
  import scope_pkg::*;
  localparam int unsigned N    = N_PE;
  localparam int unsigned K    = K_ELEM;
  localparam int unsigned M    = M_SV;
  localparam int unsigned ROWS = 5;
  localparam int unsigned IMG_W = 320, IMG_H = 240, WIN = 20, STEP = 5;
  localparam int unsigned WX = (IMG_W - WIN) / STEP + 1;   // 61
  localparam int unsigned WY = (IMG_H - WIN) / STEP + 1;   // 45
  localparam int unsigned NWIN = WX * WY;                  // 2745
  localparam int unsigned NB = (NWIN + ROWS - 1) / ROWS;   // batches
  localparam int unsigned S  = (M + N - 1) / N;
  localparam int unsigned SD = S * K;
  localparam int unsigned SVM_AW = $clog2(SD);
  localparam int unsigned IV_AW  = $clog2(K);
  localparam int unsigned PE_AW  = $clog2(N);
  localparam int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned G  = N + K + (N + 2);
  localparam int unsigned BATCH = G * S + 2 + (ROWS - 1);
  localparam longint WATCHDOG = 64'(N) * SD + 64'(NB) * (BATCH + ROWS * K + 10) + 1000;

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

  logic [7:0]         img [IMG_H][IMG_W];
  logic [7:0]         sv_data [M][K];
  logic signed [17:0] alpha_ref [M];
  logic [7:0]         x [ROWS][K];
  logic signed [74:0] sum [ROWS];

  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  longint compute_cycles = 0;

  scope_top #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic signed [74:0] model(int unsigned r);
    logic signed [74:0] acc;
    acc = '0;
    for (int j = 0; j < M; j++) begin
      logic [24:0] dot;
      logic [49:0] kv;
      dot = '0;
      for (int e = 0; e < K; e++) dot += 25'(x[r][e]) * 25'(sv_data[j][e]);
      kv = 50'(dot) * 50'(dot);
      acc += 75'(signed'({1'b0, kv})) * 75'(alpha_ref[j]);
    end
    return acc;
  endfunction

  initial begin
    for (int yy = 0; yy < IMG_H; yy++)
      for (int xx = 0; xx < IMG_W; xx++) img[yy][xx] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < N; p++) begin
      for (int g = 0; g < S; g++) begin
        int j;
        j = g * N + p;
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

    for (int b = 0; b < NB; b++) begin
      int t;
      for (int r = 0; r < ROWS; r++) begin
        int w, wx0, wy0;
        w = b * ROWS + r;
        if (w >= NWIN) w = NWIN - 1;          // pad the last batch
        wx0 = (w % WX) * STEP;
        wy0 = (w / WX) * STEP;
        for (int e = 0; e < K; e++) begin
          x[r][e] = img[wy0 + e / WIN][wx0 + e % WIN];
          iv_we = 1'b1; iv_row = ROW_AW'(r); iv_waddr = IV_AW'(e); iv_wdata = x[r][e];
          @(negedge clk);
        end
        iv_we = 1'b0;
        sum[r] = model(r);
      end
      // one bias for the frame, centred on the first window's sum
      if (b == 0) bias = -sum[0];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t = 1;
      while (!done) begin
        t++;
        @(negedge clk);
      end
      compute_cycles += t;
      check(t == BATCH, $sformatf("batch %0d took %0d cycles, expected %0d", b, t, BATCH));
      for (int r = 0; r < ROWS; r++) begin
        if (b * ROWS + r < NWIN) begin
          check(score[r] == sum[r] + bias, $sformatf("batch %0d row %0d score", b, r));
          check(class_pos[r] == (sum[r] + bias >= 0), "class");
          if (class_pos[r]) n_pos++; else n_neg++;
        end
      end
      @(negedge clk);
    end
    $display("frame: %0d windows, %0d batches, %0d compute cycles, %0d.%02d frames/s at 100 MHz",
             NWIN, NB, compute_cycles, 100_000_000 / compute_cycles,
             (100_000_000 * 100 / compute_cycles) % 100);
    $display("windows classified +1: %0d, -1: %0d", n_pos, n_neg);
    check(n_pos + n_neg == NWIN, "every window classified");
    check(n_pos > 0 && n_neg > 0, "both classes seen");
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

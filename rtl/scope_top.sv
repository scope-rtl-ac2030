// scope_top: SCoPE, a systolic chain of processing elements for support
// vector machine (SVM) classification.
//
// The design evaluates D(x) = sign(sum_i alpha_i y_i K(x, s_i) + b) for a
// k-element input vector x against m support vectors s_i, with a chain of
// N identical PEs that each store ceil(m/n) SVs. Three regions:
//   front end : input vector memory, two address generators (element and SV
//               address) and the word register feeding the front-end PE;
//   middle    : PEs 0 .. n-1; PE 0 is the front-end PE, PE n-1 the back-end
//               PE whose transfer register feeds the back end;
//   back end  : polynomial kernel (square), alpha memory with its address
//               generator, and the 75-bit MAC that adds the bias.
// The control unit (scope_ctrl) sequences ceil(m/n) groups of
// n + k + (n + 2) cycles each, then one bias cycle.
//
// ROWS > 1 builds the multi-row array: ROWS chains classify ROWS input
// vectors at once against the same SVs. Only row 0 holds SV memories; its
// PEs pass every SV element straight down, one row per cycle, to memoryless
// PEs. Row r has its own input vector memory, element address generator,
// kernel and MAC, and runs every control signal r cycles after row 0 (one
// control unit, a delay line per row); the alpha coefficients read for row
// 0 are delayed the same way, and one bias serves all rows. The default,
// ROWS = 1, is the single chain.
//
// Use: write the SVs (sv_we, PE select, address slot*k + element), the
// alpha*y coefficients (alpha_we, address slot*n + (n-1-pe)) and the bias;
// write the k input elements of every row (iv_we, iv_row); vec_ready rises
// when every row has received its element k-1; pulse start. busy stays high
// until the cycle after done; done rises (ROWS-1 cycles after row 0 has
// finished) when all rows' results are settled in score[r] / class_pos[r],
// which hold until the next start. Memories may only be written while busy
// is low. A start clears vec_ready, so every vector is written in full
// before its start.
//
// The region split, the chain word, the sharing of one kernel and one MAC
// by all PEs of a chain, the sizes and the vertical SV movement are the
// published design; the host-side load ports, the start/done handshake and
// the row skew are this design's choices.
module scope_top
  import scope_pkg::*;
#(
  parameter int unsigned N        = N_PE,
  parameter int unsigned K        = K_ELEM,
  parameter int unsigned M        = M_SV,
  parameter int unsigned ROWS     = 1,
  parameter int unsigned S        = (M + N - 1) / N,        // SV slots per PE
  parameter int unsigned SV_DEPTH = S * K,
  parameter int unsigned SVM_AW   = $clog2(SV_DEPTH),
  parameter int unsigned IV_AW    = $clog2(K),
  parameter int unsigned PE_AW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned ROW_AW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned AL_DEPTH = S * N,
  parameter int unsigned AL_AW    = 11
) (
  input  logic                      clk,
  input  logic                      rst,
  // input vector loading
  input  logic                      iv_we,
  input  logic [ROW_AW-1:0]         iv_row,
  input  logic [IV_AW-1:0]          iv_waddr,
  input  logic [ELEM_W-1:0]         iv_wdata,
  output logic                      vec_ready,
  // SV loading
  input  logic                      sv_we,
  input  logic [PE_AW-1:0]          sv_wpe,
  input  logic [SVM_AW-1:0]         sv_waddr,
  input  logic [ELEM_W-1:0]         sv_wdata,
  // alpha loading and bias
  input  logic                      alpha_we,
  input  logic [AL_AW-1:0]          alpha_waddr,
  input  logic signed [ALPHA_W-1:0] alpha_wdata,
  input  logic signed [ACC_W-1:0]   bias,
  // run
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  output logic signed [ACC_W-1:0]   score [ROWS],
  output logic                      class_pos [ROWS],
  // observation
  output pe_state_e                 pe_state [ROWS][N],
  output logic                      in_group
);

  // Control signals that every row receives, row r delayed by r cycles.
  typedef struct packed {
    logic ag_clr;
    logic elem_en;
    logic acc_reset;
    logic xfer_load;
    logic xfer_en;
    logic kern_en;
    logic mac_clr;
    logic bias_en;
    logic done;
  } row_ctrl_t;

  // ---------------------------------------------------------------- control
  row_ctrl_t                 rc [ROWS];          // per-row control
  logic signed [ALPHA_W-1:0] al_row [ROWS];      // per-row alpha
  logic                      ctrl_busy, ctrl_done, ctrl_start;
  logic                      alpha_en, sv_last, iv_last0;
  logic                      rows_pending;
  logic [ROWS-1:0]           row_ready;

  assign ctrl_start = start && !rows_pending;

  scope_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk, .rst, .start(ctrl_start), .vec_ready, .iv_last(iv_last0), .sv_last,
    .busy(ctrl_busy), .done(ctrl_done),
    .ag_clr(rc[0].ag_clr), .elem_en(rc[0].elem_en), .acc_reset(rc[0].acc_reset),
    .xfer_load(rc[0].xfer_load), .xfer_en(rc[0].xfer_en),
    .kern_en(rc[0].kern_en), .alpha_en, .mac_clr(rc[0].mac_clr),
    .bias_en(rc[0].bias_en), .in_group
  );
  assign rc[0].done = ctrl_done;

  for (genvar r = 1; r < ROWS; r++) begin : g_skew
    always_ff @(posedge clk) begin
      if (rst) begin
        rc[r]     <= '0;
        al_row[r] <= '0;
      end else begin
        rc[r]     <= rc[r-1];
        al_row[r] <= al_row[r-1];
      end
    end
  end

  // rows below row 0 still finishing after the control unit is idle
  always_comb begin
    rows_pending = 1'b0;
    for (int r = 1; r < ROWS; r++) rows_pending |= rc[r].done;
  end

  assign busy      = ctrl_busy || rows_pending;
  assign done      = rc[ROWS-1].done;
  assign vec_ready = &row_ready;

  // ------------------------------------------------------------- SV address
  logic [SVM_AW-1:0] sv_addr;
  logic              sv_new;

  addr_gen #(.DEPTH(SV_DEPTH), .ADDR_W(SVM_AW)) u_sv_ag (
    .clk, .rst, .clr(rc[0].ag_clr), .en(rc[0].elem_en),
    .addr(sv_addr), .new_addr(sv_new), .last(sv_last)
  );

  // ------------------------------------------------------------ alpha memory
  logic [AL_AW-1:0] al_raddr;
  logic             al_new, al_last;

  addr_gen #(.DEPTH(AL_DEPTH), .ADDR_W(AL_AW)) u_al_ag (
    .clk, .rst, .clr(rc[0].ag_clr), .en(alpha_en),
    .addr(al_raddr), .new_addr(al_new), .last(al_last)
  );

  alpha_mem #(.DEPTH(AL_DEPTH), .DATA_W(ALPHA_W), .ADDR_W(AL_AW)) u_alpha (
    .clk, .we(alpha_we), .waddr(alpha_waddr), .wdata(alpha_wdata),
    .re(al_new), .raddr(al_raddr), .rdata(al_row[0])
  );

  // ------------------------------------------------------------------- rows
  logic [ELEM_W-1:0] sv_v       [ROWS][N];   // SV element passed down
  logic              sv_v_valid [ROWS][N];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    // front end
    logic [IV_AW-1:0]  iv_raddr;
    logic [ELEM_W-1:0] iv_rdata;
    logic              iv_rvalid, iv_new, iv_last;
    chain_word_t       front_nxt;   // word being formed (address stage)
    chain_word_t       front_word;  // word presented to the front-end PE
    logic              fr_rst, fr_en, fr_nd;
    logic [SVA_W-1:0]  fr_addr;

    addr_gen #(.DEPTH(K), .ADDR_W(IV_AW)) u_iv_ag (
      .clk, .rst, .clr(rc[r].ag_clr), .en(rc[r].elem_en),
      .addr(iv_raddr), .new_addr(iv_new), .last(iv_last)
    );

    iv_mem #(.DEPTH(K), .DATA_W(ELEM_W), .ADDR_W(IV_AW)) u_iv_mem (
      .clk, .rst, .clr(rc[0].ag_clr),
      .we(iv_we && (iv_row == ROW_AW'(r))), .waddr(iv_waddr), .wdata(iv_wdata),
      .re(iv_new), .raddr(iv_raddr), .rdata(iv_rdata), .rvalid(iv_rvalid),
      .vec_ready(row_ready[r])
    );

    if (r == 0) begin : g_last0
      assign iv_last0 = iv_last;
    end

    always_comb begin
      front_nxt           = '0;
      front_nxt.acc_reset = rc[r].acc_reset;
      front_nxt.mac_en    = iv_new;
      if (r == 0) begin
        front_nxt.nd_sv   = sv_new;
        front_nxt.sv_addr = SVA_W'(sv_addr);
      end
    end

    // Control fields are registered alongside the synchronous IV read.
    always_ff @(posedge clk) begin
      if (rst) begin
        fr_rst  <= 1'b0;
        fr_en   <= 1'b0;
        fr_nd   <= 1'b0;
        fr_addr <= '0;
      end else begin
        fr_rst  <= front_nxt.acc_reset;
        fr_en   <= front_nxt.mac_en;
        fr_nd   <= front_nxt.nd_sv;
        fr_addr <= front_nxt.sv_addr;
      end
    end

    always_comb begin
      front_word           = '0;
      front_word.acc_reset = fr_rst;
      front_word.mac_en    = fr_en && iv_rvalid;   // "vector ready"
      front_word.nd_sv     = fr_nd;
      front_word.elem      = iv_rdata;
      front_word.sv_addr   = fr_addr;
    end

    // chain
    chain_word_t w_out [N];
    chain_word_t w_nxt [N];

    for (genvar i = 0; i < N; i++) begin : g_pe
      chain_word_t      w_in;
      logic             rd_en;
      logic [SVA_W-1:0] rd_addr;
      logic [ELEM_W-1:0] sv_in;
      logic              sv_in_valid;

      if (i == 0) begin : g_front
        assign w_in    = front_word;
        assign rd_en   = front_nxt.nd_sv;
        assign rd_addr = front_nxt.sv_addr;
      end else begin : g_mid
        assign w_in    = w_out[i-1];
        assign rd_en   = w_nxt[i-1].nd_sv;
        assign rd_addr = w_nxt[i-1].sv_addr;
      end

      if (r == 0) begin : g_top_row
        assign sv_in       = '0;
        assign sv_in_valid = 1'b0;
      end else begin : g_lower_row
        assign sv_in       = sv_v[r-1][i];
        assign sv_in_valid = sv_v_valid[r-1][i];
      end

      scope_pe #(.SV_DEPTH(SV_DEPTH), .SVM_AW(SVM_AW), .HAS_SV_MEM(r == 0)) u_pe (
        .clk, .rst,
        .word_in      (w_in),
        .rd_en        (rd_en),
        .rd_addr      (rd_addr),
        .word_out     (w_out[i]),
        .word_nxt     (w_nxt[i]),
        .xfer_load    (rc[r].xfer_load),
        .xfer_en      (rc[r].xfer_en),
        .sv_we        (sv_we && (r == 0) && (sv_wpe == PE_AW'(i))),
        .sv_waddr     (sv_waddr),
        .sv_wdata     (sv_wdata),
        .sv_in        (sv_in),
        .sv_in_valid  (sv_in_valid),
        .sv_out       (sv_v[r][i]),
        .sv_out_valid (sv_v_valid[r][i]),
        .scalar       (),
        .state        (pe_state[r][i])
      );
    end

    // back end
    logic [KERN_W-1:0] k_val;
    logic              k_valid;

    kernel_unit #(.IN_W(WORD_W), .OUT_W(KERN_W)) u_kernel (
      .clk, .rst, .en(rc[r].kern_en), .s_in(WORD_W'(w_out[N-1])),
      .k_out(k_val), .k_valid
    );

    backend_mac #(.K_W(KERN_W), .ALPHA_W(ALPHA_W), .ACC_W(ACC_W)) u_mac (
      .clk, .rst, .clr(rc[r].mac_clr), .en(k_valid), .k_in(k_val),
      .alpha(al_row[r]), .bias_en(rc[r].bias_en), .bias,
      .score(score[r]), .class_pos(class_pos[r])
    );
  end

  // ------------------------------------------------------------- assertions
  initial begin
    assert (SVM_AW <= SVA_W) else $error("scope_top: SV memory too deep for the word");
    assert (AL_DEPTH <= (1 << AL_AW)) else $error("scope_top: alpha memory too deep");
  end

  always_ff @(posedge clk) begin
    // the last alpha address is read while the last scalar leaves the chain
    if (!rst && al_last) assert (rc[0].xfer_en) else $error("scope_top: alpha read outside transfer");
    if (!rst && (iv_we || sv_we || alpha_we)) assert (!busy) else $error("scope_top: memory write while busy");
  end

endmodule

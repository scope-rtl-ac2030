// scope_pe_tb: self-checking test of one SCoPE processing element.
// The testbench plays the previous PE: each cycle it presents the SV read
// strobe/address of the word it will register next, and the registered
// word itself. For each of 3 SV slots it streams 8 elements (first one with
// acc_reset, random idle bubbles in between), then checks the 25-bit dot
// product against a model, the one-cycle pass-through of every word, the
// PE state, the parallel load of the scalar in TRANSFERRING and that
// scalars passing through during transfer do not disturb the MAC.
// A second, memoryless PE (as in the lower rows of a multi-row array) sits
// below the first: it gets the first PE's registered words and the SV
// elements passed down, with every control one cycle later, and must reach
// the same dot products one cycle after the first PE.
module scope_pe_tb;
  import scope_pkg::*;
  localparam int unsigned S  = 3;
  localparam int unsigned K  = 8;
  localparam int unsigned SD = S * K;
  localparam int unsigned AW = $clog2(SD);

  logic clk = 1'b0, rst = 1'b1;
  chain_word_t word_in, word_out, word_nxt, nxt, prev_in;
  logic rd_en;
  logic [SVA_W-1:0] rd_addr;
  logic xfer_load = 1'b0, xfer_en = 1'b0;
  logic sv_we = 1'b0;
  logic [AW-1:0] sv_waddr = '0;
  logic [7:0] sv_wdata = '0;
  logic [WORD_W-1:0] scalar;
  logic [7:0] sv_in = '0, sv_out;
  logic sv_in_valid = 1'b0, sv_out_valid;
  pe_state_e state;

  logic [7:0] sv_ref [SD];
  logic [7:0] x_ref [K];
  int checks = 0, failures = 0;
  int seen_idle = 0, seen_proc = 0, seen_xfer = 0;

  scope_pe #(.SV_DEPTH(SD), .SVM_AW(AW)) dut (.*);

  // memoryless PE one row below
  logic xl_d = 1'b0, xe_d = 1'b0;
  chain_word_t b_out, b_nxt;
  logic [WORD_W-1:0] b_scalar;
  logic [7:0] b_sv_out;
  logic b_sv_out_valid;
  pe_state_e b_state;
  always_ff @(posedge clk) begin
    xl_d <= xfer_load;
    xe_d <= xfer_en;
  end

  scope_pe #(.SV_DEPTH(SD), .SVM_AW(AW), .HAS_SV_MEM(1'b0)) dut_below (
    .clk, .rst,
    .word_in(word_out), .rd_en(1'b0), .rd_addr('0),
    .word_out(b_out), .word_nxt(b_nxt),
    .xfer_load(xl_d), .xfer_en(xe_d),
    .sv_we(1'b0), .sv_waddr('0), .sv_wdata('0),
    .sv_in(sv_out), .sv_in_valid(sv_out_valid),
    .sv_out(b_sv_out), .sv_out_valid(b_sv_out_valid),
    .scalar(b_scalar), .state(b_state)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (scalar=%0d)", what, scalar); end
  endtask

  // previous-PE model: nxt is registered into word_in at each edge
  assign rd_en   = nxt.nd_sv;
  assign rd_addr = nxt.sv_addr;
  always_ff @(posedge clk) begin
    if (rst) word_in <= '0;
    else     word_in <= nxt;
  end

  always @(negedge clk) begin
    if (!rst) begin
      case (state)
        PE_IDLE:         seen_idle++;
        PE_PROCESSING:   seen_proc++;
        PE_TRANSFERRING: seen_xfer++;
        default: ;
      endcase
    end
  end

  // pass-through: every registered word appears on word_out one cycle later
  always @(posedge clk) prev_in <= word_nxt;

  task automatic step();
    @(negedge clk);
    if (!rst) check(word_out == prev_in, "register holds mux output");
  endtask

  initial begin
    nxt = '0;
    for (int i = 0; i < SD; i++) begin
      sv_ref[i] = (i == 0) ? 8'hff : 8'($urandom);
      @(negedge clk);
      sv_we = 1'b1; sv_waddr = AW'(i); sv_wdata = sv_ref[i];
    end
    @(negedge clk);
    sv_we = 1'b0;
    rst = 1'b0;
    for (int g = 0; g < S; g++) begin
      logic [WORD_W-1:0] dot;
      dot = '0;
      for (int e = 0; e < K; e++) begin
        x_ref[e] = (e == 0) ? 8'hff : 8'($urandom);
        dot += WORD_W'(x_ref[e]) * WORD_W'(sv_ref[g*K + e]);
      end
      for (int e = 0; e < K; e++) begin
        while ($urandom_range(0, 3) == 0) begin   // idle bubble
          nxt = '0;
          step();
        end
        nxt = '0;
        nxt.acc_reset = (e == 0);
        nxt.mac_en    = 1'b1;
        nxt.nd_sv     = 1'b1;
        nxt.elem      = x_ref[e];
        nxt.sv_addr   = SVA_W'(g*K + e);
        step();
        if (e > 0) check(state == PE_PROCESSING, "processing state");
      end
      nxt = '0;
      step();
      step();
      check(scalar == dot, $sformatf("dot product slot %0d", g));
      check(b_scalar == dot, $sformatf("memoryless PE dot product slot %0d", g));
      // transfer: parallel load, then shift junk through
      xfer_en = 1'b1;
      xfer_load = 1'b1;
      #1;
      check(state == PE_TRANSFERRING, "transferring state");
      step();
      xfer_load = 1'b0;
      check(word_out == chain_word_t'(dot), "scalar loaded");
      check(b_out != chain_word_t'(dot) || dot == 0, "below loads one cycle later");
      for (int t = 0; t < 4; t++) begin
        nxt = chain_word_t'($urandom);
        nxt.mac_en = 1'b1;
        nxt.acc_reset = (t == 1);
        step();
        if (t == 0) check(b_out == chain_word_t'(dot), "below scalar loaded");
      end
      nxt = '0;
      step();
      step();
      check(scalar == dot, "MAC untouched during transfer");
      check(b_scalar == dot, "memoryless MAC untouched during transfer");
      xfer_en = 1'b0;
      step();
      step();
      check(state == PE_IDLE && b_state == PE_IDLE, "idle state");
    end
    check(seen_idle > 0 && seen_proc > 0 && seen_xfer > 0, "all three states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

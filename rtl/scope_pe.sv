// scope_pe: one processing element (PE) of the SCoPE chain.
//
// A PE computes the kernel vector operation (here a dot product) between
// the input vector, which streams past it one element per cycle, and each SV
// held in its own memory bank. It contains
//   * an SV memory bank (sv_mem),
//   * an 8x8-bit unsigned multiply-accumulate unit with a 25-bit sum,
//   * a 2-to-1 multiplexer and a 25-bit transfer register.
// In PROCESSING the register forwards the incoming chain word unchanged to
// the next PE one cycle later; the word's fields drive this PE's MAC:
// MAC enable = element valid (mac_en bit) AND SV data valid, and the MAC is
// cleared by the global reset OR the word's acc_reset bit. In TRANSFERRING
// the control unit raises `xfer_load` (the mux select) for one cycle, which
// loads this PE's 25-bit scalar into the register; with `xfer_load` low the
// register again takes the incoming word, so the n scalars shift out of the
// chain, back-end PE first. `xfer_en` marks the whole transfer phase, in
// which the incoming words are scalars and are not decoded.
//
// Timing: the SV memory is read with the address of the word that the
// previous PE is about to register (`rd_en`/`rd_addr`, taken from the
// previous PE's mux output, or from the address generator for the first
// PE). The memory data therefore arrive in the same cycle as the word on
// `word_in`, and the MAC adds the product at the end of that cycle; the read
// strobe is ignored while `xfer_en` is high. Reading
// ahead like this is this design's choice; it keeps the cost of a group of
// n SVs at the published n + k + (n + 2) cycles. acc_reset clears the old
// sum and, if mac_en is also set, loads the new product in the same cycle
// (this design's choice, so a reset costs no cycle).
//
// Rows of a multi-row array (HAS_SV_MEM = 0): such a PE has no memory; it
// takes the SV element and its valid flag from the PE above (`sv_in`,
// `sv_in_valid`), which arrive one cycle after that PE used them, in step
// with this row's input words that run one cycle behind the row above.
// Every PE passes the SV element it used down on `sv_out`/`sv_out_valid`,
// registered. Removing the memory from the lower rows and moving SV
// elements vertically follows the published systolic extension; the
// one-cycle skew per row is this design's choice.
module scope_pe
  import scope_pkg::*;
#(
  parameter int unsigned SV_DEPTH   = 3600,
  parameter int unsigned SVM_AW     = $clog2(SV_DEPTH),
  parameter bit          HAS_SV_MEM = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  // chain
  input  chain_word_t       word_in,    // register of the previous PE
  input  logic              rd_en,      // next word's nd_sv bit
  input  logic [SVA_W-1:0]  rd_addr,    // next word's SV address
  output chain_word_t       word_out,   // this PE's transfer register
  output chain_word_t       word_nxt,   // mux output, register input
  // control unit
  input  logic              xfer_load,  // multiplexer select
  input  logic              xfer_en,    // TRANSFERRING state
  // SV memory loading
  input  logic              sv_we,
  input  logic [SVM_AW-1:0] sv_waddr,
  input  logic [ELEM_W-1:0] sv_wdata,
  // vertical SV element path (multi-row arrays)
  input  logic [ELEM_W-1:0] sv_in,
  input  logic              sv_in_valid,
  output logic [ELEM_W-1:0] sv_out,
  output logic              sv_out_valid,
  // status
  output logic [WORD_W-1:0] scalar,     // current MAC value
  output pe_state_e         state
);

  logic [ELEM_W-1:0] sv_elem;
  logic              sv_ready;
  logic              sv_re;
  logic              iv_ready;
  logic              mac_enable;
  logic              mac_reset;
  logic [WORD_W-1:0] product;
  logic [WORD_W-1:0] acc;

  // In TRANSFERRING the words are scalars, so their read strobe is ignored.
  assign sv_re = rd_en && !xfer_en;

  if (HAS_SV_MEM) begin : g_mem
    sv_mem #(.DEPTH(SV_DEPTH), .DATA_W(ELEM_W), .ADDR_W(SVM_AW)) u_svmem (
      .clk   (clk),
      .we    (sv_we),
      .waddr (sv_waddr),
      .wdata (sv_wdata),
      .re    (sv_re),
      .raddr (rd_addr[SVM_AW-1:0]),
      .rdata (sv_elem)
    );

    // SV data valid one cycle after the read strobe
    always_ff @(posedge clk) begin
      if (rst) sv_ready <= 1'b0;
      else     sv_ready <= sv_re;
    end
  end else begin : g_from_above
    assign sv_elem  = sv_in;
    assign sv_ready = sv_in_valid;
  end

  // SV element handed to the PE below, one cycle later
  always_ff @(posedge clk) begin
    if (rst) begin
      sv_out       <= '0;
      sv_out_valid <= 1'b0;
    end else begin
      sv_out       <= sv_elem;
      sv_out_valid <= sv_ready;
    end
  end

  assign iv_ready   = word_in.mac_en && !xfer_en;
  assign mac_enable = iv_ready && sv_ready;
  assign mac_reset  = word_in.acc_reset && !xfer_en;
  assign product    = WORD_W'(word_in.elem) * WORD_W'(sv_elem);

  always_ff @(posedge clk) begin
    if (rst)             acc <= '0;
    else if (mac_reset)  acc <= mac_enable ? product : '0;
    else if (mac_enable) acc <= acc + product;
  end

  assign scalar   = acc;
  assign word_nxt = xfer_load ? chain_word_t'(acc) : word_in;

  always_ff @(posedge clk) begin
    if (rst) word_out <= '0;
    else     word_out <= word_nxt;
  end

  always_comb begin
    if (xfer_en)       state = PE_TRANSFERRING;
    else if (iv_ready) state = PE_PROCESSING;
    else               state = PE_IDLE;
  end

endmodule

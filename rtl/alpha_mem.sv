// alpha_mem: alpha coefficient memory of the SCoPE back end.
//
// One signed 18-bit coefficient per SV slot, holding alpha_i * y_i (the SV
// weight with its class label folded in), stored in the order in which the
// back end receives the PE results: entry g*n + j belongs to slot g of
// PE n-1-j. Slots that hold no SV (m is not a multiple of n) keep 0, so they
// add nothing. Synchronous read, one cycle after `re`; a write port loads
// the coefficients. The 18-bit fixed-point width and the 11-bit address are
// published; the folding of y_i, the order and the ports are this design's.
module alpha_mem #(
  parameter int unsigned DEPTH  = 900,
  parameter int unsigned DATA_W = 18,
  parameter int unsigned ADDR_W = 11
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic signed [DATA_W-1:0] wdata,
  input  logic                     re,
  input  logic [ADDR_W-1:0]        raddr,
  output logic signed [DATA_W-1:0] rdata
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic signed [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[IDX_W-1:0]] <= wdata;
    if (re) rdata <= mem[raddr[IDX_W-1:0]];
  end

  initial assert (DEPTH <= (1 << ADDR_W)) else $error("alpha_mem: DEPTH exceeds address range");

endmodule

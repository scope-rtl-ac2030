// sv_mem: support vector memory bank inside one SCoPE processing element.
//
// Each PE stores its share of the SVs: slot g (g = 0 .. ceil(m/n)-1) holds
// the k elements of one SV at addresses g*k .. g*k+k-1, so every PE of the
// chain uses the same address for the same step. With the defaults that is
// 9 x 400 = 3600 8-bit words. The read is synchronous: a strobe on `re`
// (the "new address" bit of the chain word) returns `mem[raddr]` on `rdata`
// in the next cycle. A write port loads the trained SVs before use.
// Storing the SVs per PE follows the published design; the layout and the
// write port are this design's choices.
module sv_mem #(
  parameter int unsigned DEPTH  = 3600,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

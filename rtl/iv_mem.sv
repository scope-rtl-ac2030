// iv_mem: input vector memory of the SCoPE front end.
//
// Holds the k elements of the vector being classified (one 20x20 window of
// 8-bit pixels by default). Elements are written one per cycle through the
// write port; `vec_ready` goes high when the element at address k-1 has been
// written and stays high until `clr`. Reads are synchronous: the element at
// `raddr` appears on `rdata` one cycle after `re`, and `rvalid` marks it.
// The memory itself is published; the write port, the ready rule and the
// one-cycle read latency are this design's choices.
module iv_mem #(
  parameter int unsigned DEPTH  = 400,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,       // a new vector is about to be loaded
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  output logic              rvalid,
  output logic              vec_ready  // whole vector written
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid    <= 1'b0;
      vec_ready <= 1'b0;
    end else begin
      rvalid <= re;
      if (clr)                                      vec_ready <= 1'b0;
      else if (we && waddr == ADDR_W'(DEPTH - 1))  vec_ready <= 1'b1;
    end
  end

endmodule

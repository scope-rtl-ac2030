// kernel_unit: kernel module of the SCoPE back end.
//
// Implements the polynomial kernel K = (gamma * s + r)^d with the evaluated
// settings gamma = 1, r = 0, d = 2, i.e. the square of the 25-bit dot
// product s that leaves the chain, computed with logic (not a look-up
// table) into a 50-bit result. One register stage: `k_out`/`k_valid` follow
// `s_in`/`en` by one clock. The kernel settings and widths are published;
// the single pipeline stage is this design's choice, and it is one of the
// two cycles that the published "+2" in the transfer time accounts for.
module kernel_unit #(
  parameter int unsigned IN_W  = 25,
  parameter int unsigned OUT_W = 2 * IN_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,        // s_in holds a PE scalar
  input  logic [IN_W-1:0]  s_in,
  output logic [OUT_W-1:0] k_out,
  output logic             k_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      k_out   <= '0;
      k_valid <= 1'b0;
    end else begin
      k_valid <= en;
      if (en) k_out <= OUT_W'(s_in) * OUT_W'(s_in);
    end
  end

endmodule

// backend_mac: back-end multiply-accumulate unit of SCoPE.
//
// Forms the sum of equation (1): for every kernel value k_i it adds
// alpha_i*y_i * k_i to a signed 75-bit accumulator, then adds the bias b and
// outputs the sign as the class. `clr` empties the accumulator before a new
// vector. When `en` is high, `k_in` (unsigned 50 bits) times `alpha`
// (signed 18 bits) is added at the clock edge. `bias_en` adds `bias` at the
// clock edge; `score` is the accumulator and `class_pos` is 1 when it is
// >= 0 (class +1). The 18/50/75-bit widths are published; treating alpha
// as a signed integer (its binary point is only a scale common to the whole
// sum, which the bias must share) and the >= 0 rule are this design's.
module backend_mac #(
  parameter int unsigned K_W     = 50,
  parameter int unsigned ALPHA_W = 18,
  parameter int unsigned ACC_W   = 75
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr,
  input  logic                    en,
  input  logic [K_W-1:0]          k_in,
  input  logic signed [ALPHA_W-1:0] alpha,
  input  logic                    bias_en,
  input  logic signed [ACC_W-1:0] bias,
  output logic signed [ACC_W-1:0] score,
  output logic                    class_pos
);

  logic signed [ACC_W-1:0] k_ext;   // kernel value, zero-extended
  logic signed [ACC_W-1:0] a_ext;   // coefficient, sign-extended
  logic signed [ACC_W-1:0] term;

  assign k_ext = signed'(ACC_W'(k_in));
  assign a_ext = ACC_W'(alpha);
  assign term  = k_ext * a_ext;

  always_ff @(posedge clk) begin
    if (rst || clr)   score <= '0;
    else if (en)      score <= score + term;
    else if (bias_en) score <= score + bias;
  end

  assign class_pos = !score[ACC_W-1];

endmodule

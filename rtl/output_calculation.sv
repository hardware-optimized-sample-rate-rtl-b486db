// output_calculation: linear interpolation between the two FIR results.
//
// The output sample is (1-alpha)*y1 + alpha*y2, where y1 comes from FIR 1
// (polyphase filter l) and y2 from FIR 2 (filter l+1). It is computed as
// y1 + alpha*(y2-y1), which needs a single multiplier; the product is
// truncated towards minus infinity after the alpha fraction is removed.
// The sum is then rounded to nearest (half up) from the accumulator format
// Q.(SAMPLE_W-1+COEF_FRAC) to a Q1.15 sample and saturated. The rounding and
// saturation are this design's choices. One register stage, advanced by `en`.
module output_calculation #(
  parameter int unsigned SAMPLE_W  = src_pkg::SAMPLE_W,
  parameter int unsigned ACC_W     = src_pkg::acc_width(src_pkg::SAMPLE_W, src_pkg::COEF_W, src_pkg::N_TAPS),
  parameter int unsigned ALPHA_W   = src_pkg::ALPHA_W,
  parameter int unsigned COEF_FRAC = src_pkg::COEF_FRAC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [ACC_W-1:0]    y1,
  input  logic signed [ACC_W-1:0]    y2,
  input  logic        [ALPHA_W-1:0]  alpha,
  output logic signed [SAMPLE_W-1:0] y
);

  localparam int unsigned D_W = ACC_W + 1;
  localparam int unsigned P_W = D_W + ALPHA_W + 1;

  logic signed [D_W-1:0]      diff;
  logic signed [P_W-1:0]      prod;
  logic signed [D_W-1:0]      interp;
  logic signed [D_W-1:0]      rounded;
  logic signed [SAMPLE_W-1:0] sat;

  localparam logic signed [D_W-1:0] MAX_S = D_W'((2 ** (SAMPLE_W - 1)) - 1);
  localparam logic signed [D_W-1:0] MIN_S = -D_W'(2 ** (SAMPLE_W - 1));

  always_comb begin
    diff    = D_W'(y2) - D_W'(y1);
    prod    = P_W'(diff) * $signed({1'b0, alpha});
    interp  = D_W'(y1) + D_W'(prod >>> ALPHA_W);
    rounded = (interp + D_W'(2 ** (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (rounded > MAX_S)      sat = MAX_S[SAMPLE_W-1:0];
    else if (rounded < MIN_S) sat = MIN_S[SAMPLE_W-1:0];
    else                      sat = rounded[SAMPLE_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= sat;
  end

endmodule

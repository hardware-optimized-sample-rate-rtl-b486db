// fir_filter: one branch of the polyphase filter bank (FIR 1 or FIR 2).
//
// Multiplies the N_TAPS samples of the registerbank with the N_TAPS real
// coefficients of the selected polyphase filter and adds the products. All
// taps are computed in parallel, so one filter result is produced per clock,
// which is what allows a full output sample per cycle; the result is
// registered when `en` is high (one clock of latency).
//
// Interface: taps[0] is the newest sample; coefs[j] multiplies taps[j].
// Samples are signed Q1.15 and coefficients signed Q2.14 (this design's
// formats); the sum is kept at full precision (Q(3+log2 N).29).
module fir_filter #(
  parameter int unsigned N_TAPS   = src_pkg::N_TAPS,
  parameter int unsigned SAMPLE_W = src_pkg::SAMPLE_W,
  parameter int unsigned COEF_W   = src_pkg::COEF_W,
  localparam int unsigned ACC_W   = src_pkg::acc_width(SAMPLE_W, COEF_W, N_TAPS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [SAMPLE_W-1:0] taps  [N_TAPS],
  input  logic signed [COEF_W-1:0]   coefs [N_TAPS],
  output logic signed [ACC_W-1:0]    y
);

  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int j = 0; j < N_TAPS; j++) begin
      sum += ACC_W'(taps[j] * coefs[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= sum;
  end

endmodule

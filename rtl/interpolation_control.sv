// interpolation_control (IPC): polyphase index and interpolation weight.
//
// Time Generation hands over the distance between the output time tout and
// the time tin of the newest input sample, phase = tout - tin, which lies in
// [0, T1). With T3 = 2**FRAC_W LSB and T1 = M*T3, the integer part of the
// phase in T3 units is the polyphase index l_k (which of the M filters), and the
// following ALPHA_W fraction bits are the interpolation weight alpha_k. `wrap`
// flags l_k = M-1, the case where FIR 2 must use filter one
// shifted by one sample. l, wrap and alpha are combinational, for the FIR
// stage of the same clock; alpha_q is alpha registered with `en`, aligned
// with the FIR results one clock later. M must be a power of two.
// Because T1 is a power of two in T3 units, l and alpha are plain bit
// fields of phase: these outputs are wiring, with no logic between them
// and the input.
module interpolation_control #(
  parameter int unsigned M       = src_pkg::M_PHASES,
  parameter int unsigned TIME_W  = src_pkg::TIME_W,
  parameter int unsigned FRAC_W  = src_pkg::FRAC_W,
  parameter int unsigned ALPHA_W = src_pkg::ALPHA_W,
  localparam int unsigned L_W    = (M > 1) ? $clog2(M) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [TIME_W-1:0]  phase,
  output logic [L_W-1:0]     l,
  output logic               wrap,
  output logic [ALPHA_W-1:0] alpha,
  output logic [ALPHA_W-1:0] alpha_q
);

  initial assert (M >= 2 && (M & (M - 1)) == 0) else $error("M must be a power of two");
  initial assert (FRAC_W >= ALPHA_W && FRAC_W + L_W <= TIME_W) else $error("time format too small");

  always_comb begin
    l     = phase[FRAC_W +: L_W];
    wrap  = (l == L_W'(M - 1));
    alpha = phase[FRAC_W - 1 -: ALPHA_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  alpha_q <= '0;
    else if (en) alpha_q <= alpha;
  end

endmodule

// coefficient_select: coefficient sets for the two FIR branches.
//
// FIR 1 gets polyphase filter l and FIR 2 gets filter (l+1) mod M. In the
// wrap case l = M-1, the interpolation formula needs filter one (index 0)
// applied to the input samples shifted by one. Filter one of a windowed-sinc prototype is a
// single 1.0 at the centre tap and zeros elsewhere, so instead of shifting
// the samples the 1.0 is moved one tap towards the newest sample: tap
// CENTER is forced to 0 and tap CENTER-1 to 1.0. These two values are
// hard-wired; every other coefficient comes from the loaded bank.
// Purely combinational.
module coefficient_select #(
  parameter int unsigned N_TAPS    = src_pkg::N_TAPS,
  parameter int unsigned M         = src_pkg::M_PHASES,
  parameter int unsigned COEF_W    = src_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = src_pkg::COEF_FRAC,
  localparam int unsigned L_W      = (M > 1) ? $clog2(M) : 1
) (
  input  logic signed [COEF_W-1:0] coef_bank [M][N_TAPS],
  input  logic [L_W-1:0]           l,
  input  logic                     wrap,
  output logic signed [COEF_W-1:0] coefs1 [N_TAPS],
  output logic signed [COEF_W-1:0] coefs2 [N_TAPS]
);

  localparam int unsigned CENTER = (N_TAPS - 1) / 2;
  localparam logic signed [COEF_W-1:0] ONE = COEF_W'(2 ** COEF_FRAC);

  logic [L_W-1:0] l_next;

  always_comb begin
    l_next = wrap ? '0 : l + 1'b1;
    for (int j = 0; j < N_TAPS; j++) begin
      coefs1[j] = coef_bank[l][j];
      coefs2[j] = coef_bank[l_next][j];
    end
    if (wrap) begin
      coefs2[CENTER]     = '0;
      coefs2[CENTER - 1] = ONE;
    end
  end

endmodule

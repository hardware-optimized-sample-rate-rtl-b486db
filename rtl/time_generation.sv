// time_generation (Time Generation): decides, every clock, whether the next
// input sample must enter the registerbank or an output sample is computed.
//
// For each channel it keeps two 70-bit times: tin, the time of the newest
// sample in the registerbank, and tout, the time of the next output sample.
// Times count in units of T3 (the spacing of the prototype filter taps) with
// FRAC_W fraction bits; input samples are T1 = M*T3 apart, output samples
// T2 apart, T2 being set per channel by software (1 Hz resolution needs the
// long fraction). Rule per clock, for the active channel `chan`:
//   tout - tin >= T1 : the next input is needed; it is taken when in_valid
//                      (shift = 1, tin += T1), otherwise the filter waits
//   tout - tin <  T1 : an output is computed at phase = tout - tin
//                      (issue = 1, tout += T2)
// Nothing happens while `en` (output side not stalled) or `run` (channel
// scheduler and start-up) is low. This one rule covers both upsampling
// (T2 < T1: several outputs per input) and downsampling (T2 > T1).
// `clear` restarts every channel: tin = 0 (the registerbank holds zeros)
// and tout = PRIME_TAPS*T1, so a channel first takes PRIME_TAPS input
// samples and produces its first output only once its registerbank is full
// (the published start-up rule: registerbank and interpolation
// control run until they give a first result before outputs flow). Times
// wrap modulo 2**TIME_W; only their difference is used. shift/issue/phase
// are combinational.
module time_generation #(
  parameter int unsigned M      = src_pkg::M_PHASES,
  parameter int unsigned TIME_W = src_pkg::TIME_W,
  parameter int unsigned FRAC_W = src_pkg::FRAC_W,
  parameter int unsigned MAX_CH = src_pkg::MAX_CH,
  parameter int unsigned PRIME_TAPS = src_pkg::N_TAPS,
  localparam int unsigned CH_W  = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic              run,
  input  logic [CH_W-1:0]   chan,
  input  logic [TIME_W-1:0] t2_step,
  input  logic              in_valid,
  output logic              in_ready,
  output logic              shift,
  output logic              issue,
  output logic [TIME_W-1:0] phase
);

  localparam logic [TIME_W-1:0] T1    = TIME_W'(M) << FRAC_W;
  localparam logic [TIME_W-1:0] START = TIME_W'(PRIME_TAPS) * T1;

  logic [TIME_W-1:0] tin  [MAX_CH];
  logic [TIME_W-1:0] tout [MAX_CH];
  logic              need_input;

  always_comb begin
    phase      = tout[chan] - tin[chan];
    need_input = (phase >= T1);
    in_ready   = en && run && need_input;
    shift      = in_ready && in_valid;
    issue      = en && run && !need_input;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tin  <= '{default: '0};
      tout <= '{default: START};
    end else if (clear) begin
      tin  <= '{default: '0};
      tout <= '{default: START};
    end else begin
      if (shift) tin[chan]  <= tin[chan] + T1;
      if (issue) tout[chan] <= tout[chan] + t2_step;
    end
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(shift && issue));

endmodule

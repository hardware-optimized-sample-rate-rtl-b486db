// src_top: fractional sample rate converter (SRC) for up to MAX_CH complex
// channels, based on bandlimited interpolation.
//
// Each output sample is a sum of the last N_TAPS input samples weighted by a
// windowed-sinc prototype filter that is stored as M polyphase filters of
// N_TAPS taps. The output time generally falls between two stored phases l
// and l+1, so two FIRs run in parallel and their results are interpolated
// linearly with weight alpha (bandlimited interpolation, see README). Shared
// by the real and imaginary datapaths are: Load_Coefficients (coefficients
// from the memory subsystem into registers), Coefficient Select, the
// Interpolation Control (l, alpha), Time Generation (70-bit times, decides
// between taking an input and producing an output; stalls the filter) and
// Control (software registers). A channel scheduler runs the channels in
// turn, saving and restoring registerbank contexts in the two local RAMs
// while the filter keeps running.
//
// Streams: one input and one output valid/ready stream per direction (RX:
// from the radio side to the platform, TX: the reverse). The active
// channel's direction selects which input stream is read; each output
// carries its channel number and leaves on the stream of its direction.
// in_chan is the channel whose input is being requested. Software flow:
// write COEFBASE, write CTRL.bit1 and wait for STATUS.bit0, program NUM_CH,
// SWITCH and each channel's T2 and direction, then set CTRL.bit0. Latency:
// an output leaves two enabled clocks after Time Generation issues it; a
// full output pipeline (output valid and not ready) stops everything.
// The block structure follows the SRC architecture; stream handshakes,
// register map and pipeline are this design's own.
module src_top #(
  parameter int unsigned N_TAPS   = src_pkg::N_TAPS,
  parameter int unsigned M        = src_pkg::M_PHASES,
  parameter int unsigned COEF_W   = src_pkg::COEF_W,
  parameter int unsigned SAMPLE_W = src_pkg::SAMPLE_W,
  parameter int unsigned TIME_W   = src_pkg::TIME_W,
  parameter int unsigned FRAC_W   = src_pkg::FRAC_W,
  parameter int unsigned ALPHA_W  = src_pkg::ALPHA_W,
  parameter int unsigned MAX_CH   = src_pkg::MAX_CH,
  parameter int unsigned MAX_PER_DIR = 4,
  localparam int unsigned CH_W    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration bus
  input  logic                       cfg_we,
  input  logic [7:0]                 cfg_addr,
  input  logic [31:0]                cfg_wdata,
  output logic [31:0]                cfg_rdata,
  // memory subsystem read port (coefficients)
  output logic                       mss_rd,
  output logic [15:0]                mss_addr,
  input  logic [COEF_W-1:0]          mss_rdata,
  // input streams
  output logic [CH_W-1:0]            in_chan,
  input  logic                       rx_in_valid,
  output logic                       rx_in_ready,
  input  logic signed [SAMPLE_W-1:0] rx_in_re,
  input  logic signed [SAMPLE_W-1:0] rx_in_im,
  input  logic                       tx_in_valid,
  output logic                       tx_in_ready,
  input  logic signed [SAMPLE_W-1:0] tx_in_re,
  input  logic signed [SAMPLE_W-1:0] tx_in_im,
  // output streams
  output logic [CH_W-1:0]            out_chan,
  output logic signed [SAMPLE_W-1:0] out_re,
  output logic signed [SAMPLE_W-1:0] out_im,
  output logic                       rx_out_valid,
  input  logic                       rx_out_ready,
  output logic                       tx_out_valid,
  input  logic                       tx_out_ready
);

  import src_pkg::*;

  localparam int unsigned L_W = (M > 1) ? $clog2(M) : 1;

  // control
  logic                enable, start, load_coef;
  logic [CH_W:0]       num_ch;
  logic [15:0]         switch_count;
  logic [15:0]         coef_base;
  logic [TIME_W-1:0]   t2_step [MAX_CH];
  dir_e                dir [MAX_CH];
  logic                coef_done, running;
  // coefficients
  logic signed [COEF_W-1:0] coef_bank [M][N_TAPS];
  logic signed [COEF_W-1:0] coefs1 [N_TAPS];
  logic signed [COEF_W-1:0] coefs2 [N_TAPS];
  // scheduling and timing
  logic [CH_W-1:0]     act_chan;
  logic                sched_run, switch_now;
  ctx_op_e             ctx_op;
  logic [CTX_W-1:0]    ctx_idx;
  logic [CH_W-1:0]     ctx_chan;
  logic                en, tg_in_valid, tg_in_ready, shift, issue;
  logic [TIME_W-1:0]   phase;
  logic [L_W-1:0]      l;
  logic                wrap;
  logic [ALPHA_W-1:0]  alpha, alpha_q;
  dir_e                act_dir;
  logic signed [SAMPLE_W-1:0] din_re, din_im;
  // output pipeline tags
  logic                v1, v2;
  logic [CH_W-1:0]     ch1, ch2;
  dir_e                dir1, dir2;

  src_control #(.M(M), .TIME_W(TIME_W), .FRAC_W(FRAC_W), .MAX_CH(MAX_CH)) u_control (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .coef_done, .running, .active_chan(act_chan),
    .enable, .start, .load_coef, .num_ch, .switch_count, .coef_base, .t2_step, .dir
  );

  load_coefficients #(.N_TAPS(N_TAPS), .M(M), .COEF_W(COEF_W)) u_loadcoef (
    .clk, .rst_n, .start(load_coef), .base(coef_base),
    .mss_rd, .mss_addr, .mss_rdata, .coef_bank, .done(coef_done)
  );

  assign running = enable && coef_done;

  channel_scheduler #(.N_TAPS(N_TAPS), .MAX_CH(MAX_CH)) u_sched (
    .clk, .rst_n, .start, .num_ch, .switch_count, .issue,
    .chan(act_chan), .run(sched_run), .switch_now, .ctx_op, .ctx_idx, .ctx_chan
  );

  always_comb begin
    act_dir     = dir[act_chan];
    tg_in_valid = (act_dir == DIR_TX) ? tx_in_valid : rx_in_valid;
    din_re      = (act_dir == DIR_TX) ? tx_in_re : rx_in_re;
    din_im      = (act_dir == DIR_TX) ? tx_in_im : rx_in_im;
    rx_in_ready = tg_in_ready && (act_dir == DIR_RX);
    tx_in_ready = tg_in_ready && (act_dir == DIR_TX);
    in_chan     = act_chan;
    // the whole filter stops while a finished output is not taken
    en = !v2 || ((dir2 == DIR_TX) ? tx_out_ready : rx_out_ready);
  end

  time_generation #(.M(M), .TIME_W(TIME_W), .FRAC_W(FRAC_W), .MAX_CH(MAX_CH)) u_timegen (
    .clk, .rst_n, .clear(start), .en, .run(running && sched_run && !start), .chan(act_chan),
    .t2_step(t2_step[act_chan]), .in_valid(tg_in_valid), .in_ready(tg_in_ready),
    .shift, .issue, .phase
  );

  interpolation_control #(.M(M), .TIME_W(TIME_W), .FRAC_W(FRAC_W), .ALPHA_W(ALPHA_W)) u_ipc (
    .clk, .rst_n, .en, .phase, .l, .wrap, .alpha, .alpha_q
  );

  coefficient_select #(.N_TAPS(N_TAPS), .M(M), .COEF_W(COEF_W)) u_coefsel (
    .coef_bank, .l, .wrap, .coefs1, .coefs2
  );

  processing_part #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W), .ALPHA_W(ALPHA_W),
                    .MAX_CH(MAX_CH)) u_real (
    .clk, .rst_n, .clear(start), .en, .shift, .din(din_re), .swap(switch_now),
    .coefs1, .coefs2, .alpha_q, .ctx_op, .ctx_idx, .ctx_chan, .y(out_re)
  );

  processing_part #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W), .ALPHA_W(ALPHA_W),
                    .MAX_CH(MAX_CH)) u_imag (
    .clk, .rst_n, .clear(start), .en, .shift, .din(din_im), .swap(switch_now),
    .coefs1, .coefs2, .alpha_q, .ctx_op, .ctx_idx, .ctx_chan, .y(out_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      ch1 <= '0;  ch2 <= '0;
      dir1 <= DIR_RX; dir2 <= DIR_RX;
    end else if (start) begin
      v1 <= 1'b0; v2 <= 1'b0;
    end else if (en) begin
      v1   <= issue;
      ch1  <= act_chan;
      dir1 <= act_dir;
      v2   <= v1;
      ch2  <= ch1;
      dir2 <= dir1;
    end
  end

  always_comb begin
    out_chan     = ch2;
    rx_out_valid = v2 && (dir2 == DIR_RX);
    tx_out_valid = v2 && (dir2 == DIR_TX);
  end

  // At most MAX_PER_DIR channels per direction.
  logic [CH_W:0] n_rx, n_tx;
  always_comb begin
    n_rx = '0;
    n_tx = '0;
    for (int c = 0; c < MAX_CH; c++) begin
      if ((CH_W+1)'(c) < num_ch) begin
        if (dir[c] == DIR_TX) n_tx += 1'b1;
        else                  n_rx += 1'b1;
      end
    end
  end
  a_per_dir_limit: assert property (@(posedge clk) disable iff (!rst_n)
    running |-> (32'(n_rx) <= MAX_PER_DIR && 32'(n_tx) <= MAX_PER_DIR));

endmodule

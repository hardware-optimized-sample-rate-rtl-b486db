// processing_part: datapath for one component (real or imaginary) of the
// complex samples. The SRC has two identical instances.
//
// Input samples enter the registerbank on `shift`. On an output request the
// registerbank taps go through FIR 1 (coefs1, filter l) and FIR 2 (coefs2,
// filter l+1) in parallel; their results are registered and, one clock
// later, combined by Output Calculation with the weight alpha (which the
// caller delivers aligned with the FIR results). The pipeline has two
// register stages, both advanced by `en`, so `y` belongs to the request
// issued two enabled clocks earlier. Ram Connection and the local RAM save
// and restore the registerbank's shadow set on the scheduler's ctx_* orders.
// The block structure follows the published SRC architecture; the pipeline
// depth is this design's own.
module processing_part #(
  parameter int unsigned N_TAPS   = src_pkg::N_TAPS,
  parameter int unsigned SAMPLE_W = src_pkg::SAMPLE_W,
  parameter int unsigned COEF_W   = src_pkg::COEF_W,
  parameter int unsigned ALPHA_W  = src_pkg::ALPHA_W,
  parameter int unsigned MAX_CH   = src_pkg::MAX_CH,
  parameter int unsigned IDX_W    = src_pkg::CTX_W,
  localparam int unsigned CH_W    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       en,
  input  logic                       shift,
  input  logic signed [SAMPLE_W-1:0] din,
  input  logic                       swap,
  input  logic signed [COEF_W-1:0]   coefs1 [N_TAPS],
  input  logic signed [COEF_W-1:0]   coefs2 [N_TAPS],
  input  logic [ALPHA_W-1:0]         alpha_q,
  input  src_pkg::ctx_op_e           ctx_op,
  input  logic [IDX_W-1:0]           ctx_idx,
  input  logic [CH_W-1:0]            ctx_chan,
  output logic signed [SAMPLE_W-1:0] y
);

  localparam int unsigned ACC_W = src_pkg::acc_width(SAMPLE_W, COEF_W, N_TAPS);

  logic signed [SAMPLE_W-1:0] taps [N_TAPS];
  logic signed [ACC_W-1:0]    y1, y2;
  logic [IDX_W-1:0]           sh_ridx, sh_widx;
  logic signed [SAMPLE_W-1:0] sh_rdata, sh_wdata;
  logic                       sh_we;
  logic                       ram_we;
  logic [CH_W+IDX_W-1:0]      ram_addr;
  logic [SAMPLE_W-1:0]        ram_wdata, ram_rdata;

  registerbank #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W), .IDX_W(IDX_W)) u_regbank (
    .clk, .rst_n, .clear, .shift, .din, .swap, .taps,
    .sh_ridx, .sh_rdata, .sh_we, .sh_widx, .sh_wdata
  );

  fir_filter #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W)) u_fir1 (
    .clk, .rst_n, .en, .taps, .coefs(coefs1), .y(y1)
  );

  fir_filter #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W)) u_fir2 (
    .clk, .rst_n, .en, .taps, .coefs(coefs2), .y(y2)
  );

  output_calculation #(.SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W), .ALPHA_W(ALPHA_W)) u_outcalc (
    .clk, .rst_n, .en, .y1, .y2, .alpha(alpha_q), .y
  );

  ram_connection #(.SAMPLE_W(SAMPLE_W), .CH_W(CH_W), .IDX_W(IDX_W)) u_ramconn (
    .clk, .rst_n, .ctx_op, .ctx_idx, .ctx_chan,
    .sh_ridx, .sh_rdata, .sh_we, .sh_widx, .sh_wdata,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata
  );

  local_ram #(.DEPTH(2 ** (CH_W + IDX_W)), .W(SAMPLE_W)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

endmodule

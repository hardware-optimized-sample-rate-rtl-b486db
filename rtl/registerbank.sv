// registerbank: input sample shift register of one processing part.
//
// Holds the last N_TAPS input samples of the running channel, newest in
// taps[0], and feeds them to both FIR branches. It has two register sets:
// the active set, which shifts and feeds the FIRs, and a shadow set, which
// holds the context of another channel while that context is written to or
// read from the local RAM (one word per clock through the sh_* ports).
// `swap` exchanges the roles of the two sets in one clock, so a channel
// switch costs no cycle. `clear` zeroes both sets. All updates happen on
// the rising clock edge; taps and sh_rdata are read combinationally.
// Two register sets per module follow the published scheme of the context
// switch; the word-wise shadow access is this design's own.
module registerbank #(
  parameter int unsigned N_TAPS   = src_pkg::N_TAPS,
  parameter int unsigned SAMPLE_W = src_pkg::SAMPLE_W,
  parameter int unsigned IDX_W    = src_pkg::CTX_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       shift,
  input  logic signed [SAMPLE_W-1:0] din,
  input  logic                       swap,
  output logic signed [SAMPLE_W-1:0] taps [N_TAPS],
  input  logic [IDX_W-1:0]           sh_ridx,
  output logic signed [SAMPLE_W-1:0] sh_rdata,
  input  logic                       sh_we,
  input  logic [IDX_W-1:0]           sh_widx,
  input  logic signed [SAMPLE_W-1:0] sh_wdata
);

  logic signed [SAMPLE_W-1:0] regs [2][N_TAPS];
  logic                       sel;   // index of the active set

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= 1'b0;
      regs <= '{default: '0};
    end else if (clear) begin
      sel  <= 1'b0;
      regs <= '{default: '0};
    end else begin
      if (shift) begin
        regs[sel][0] <= din;
        for (int j = 1; j < N_TAPS; j++) regs[sel][j] <= regs[sel][j-1];
      end
      if (sh_we && 32'(sh_widx) < N_TAPS) regs[!sel][sh_widx] <= sh_wdata;
      if (swap) sel <= !sel;
    end
  end

  always_comb begin
    for (int j = 0; j < N_TAPS; j++) taps[j] = regs[sel][j];
    sh_rdata = (32'(sh_ridx) < N_TAPS) ? regs[!sel][sh_ridx] : '0;
  end

  // The shadow set must not be written in the clock it becomes active.
  a_no_write_on_swap: assert property (@(posedge clk) disable iff (!rst_n) !(swap && sh_we));

endmodule

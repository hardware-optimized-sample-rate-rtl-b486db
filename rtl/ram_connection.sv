// ram_connection: moves context words between a registerbank shadow set
// and the local RAM.
//
// Per clock the channel scheduler asks for one operation on word ctx_idx
// of channel ctx_chan:
//   CTX_STORE  shadow word -> RAM[ctx_chan*2**IDX_W + ctx_idx] (same clock)
//   CTX_LOAD   RAM word -> shadow word; the RAM read takes one clock, so the
//              shadow write happens one clock after the request
//   CTX_ZERO   zero -> shadow word, also one clock later (a channel that
//              has never run starts from an empty registerbank)
// The address layout and the zero operation are this design's choices.
// The RAM address (for stores and loads), the store data and the shadow
// read index are the request fields wired straight through; only the
// shadow write of a load or zero fill passes through a one-clock register.
module ram_connection #(
  parameter int unsigned SAMPLE_W = src_pkg::SAMPLE_W,
  parameter int unsigned CH_W     = src_pkg::CH_W,
  parameter int unsigned IDX_W    = src_pkg::CTX_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  src_pkg::ctx_op_e           ctx_op,
  input  logic [IDX_W-1:0]           ctx_idx,
  input  logic [CH_W-1:0]            ctx_chan,
  // shadow set of the registerbank
  output logic [IDX_W-1:0]           sh_ridx,
  input  logic signed [SAMPLE_W-1:0] sh_rdata,
  output logic                       sh_we,
  output logic [IDX_W-1:0]           sh_widx,
  output logic signed [SAMPLE_W-1:0] sh_wdata,
  // local RAM
  output logic                       ram_we,
  output logic [CH_W+IDX_W-1:0]      ram_addr,
  output logic [SAMPLE_W-1:0]        ram_wdata,
  input  logic [SAMPLE_W-1:0]        ram_rdata
);

  import src_pkg::*;

  logic             pend;       // a load or zero completes this clock
  logic             pend_zero;
  logic [IDX_W-1:0] pend_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      pend_zero <= 1'b0;
      pend_idx  <= '0;
    end else begin
      pend      <= (ctx_op == CTX_LOAD) || (ctx_op == CTX_ZERO);
      pend_zero <= (ctx_op == CTX_ZERO);
      pend_idx  <= ctx_idx;
    end
  end

  always_comb begin
    sh_ridx   = ctx_idx;
    ram_we    = (ctx_op == CTX_STORE);
    ram_addr  = {ctx_chan, ctx_idx};
    ram_wdata = sh_rdata;
    sh_we     = pend;
    sh_widx   = pend_idx;
    sh_wdata  = pend_zero ? '0 : $signed(ram_rdata);
  end

endmodule

// local_ram: context memory of one processing part.
//
// Single-port RAM with a synchronous (registered) read: the word at `addr`
// appears on `rdata` one clock later; a write stores `wdata` at the edge.
// It keeps the registerbank contents of every channel while the channel is
// not running. Size (8 channels x 32 words) is this design's choice; it is
// written as an array so that synthesis can map it to a block RAM.
module local_ram #(
  parameter int unsigned DEPTH = src_pkg::MAX_CH * src_pkg::CTX_WORDS,
  parameter int unsigned W     = src_pkg::SAMPLE_W,
  localparam int unsigned A_W  = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [A_W-1:0] addr,
  input  logic [W-1:0]   wdata,
  output logic [W-1:0]   rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule

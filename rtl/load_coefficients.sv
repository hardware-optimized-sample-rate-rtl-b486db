// load_coefficients (Load_Coefficients): fetches the filter coefficients
// from the memory subsystem (MSS) into registers.
//
// A `start` pulse reads M*N_TAPS words, one per clock, from MSS addresses
// base, base+1, ... The MSS read port is assumed to return the data one clock
// after the read strobe, without wait states. Word l*N_TAPS + j is tap j of
// polyphase filter l (phase-major order, this design's choice). `done`
// rises after the last word is written and stays high until the next
// `start`. The registers feed Coefficient Select directly, so the filter
// should not run while coefficients are being reloaded.
module load_coefficients #(
  parameter int unsigned N_TAPS = src_pkg::N_TAPS,
  parameter int unsigned M      = src_pkg::M_PHASES,
  parameter int unsigned COEF_W = src_pkg::COEF_W,
  parameter int unsigned ADDR_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [ADDR_W-1:0]        base,
  output logic                     mss_rd,
  output logic [ADDR_W-1:0]        mss_addr,
  input  logic [COEF_W-1:0]        mss_rdata,
  output logic signed [COEF_W-1:0] coef_bank [M][N_TAPS],
  output logic                     done
);

  localparam int unsigned TOTAL = M * N_TAPS;
  localparam int unsigned CNT_W = $clog2(TOTAL + 1);
  localparam int unsigned L_W   = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned J_W   = $clog2(N_TAPS);

  logic             busy;
  logic [CNT_W-1:0] cnt;       // words requested so far
  logic [ADDR_W-1:0] base_q;
  // position of the word returning this clock
  logic             ret_v;
  logic [L_W-1:0]   ret_l;
  logic [J_W-1:0]   ret_j;
  logic [L_W-1:0]   req_l;
  logic [J_W-1:0]   req_j;

  assign mss_rd   = busy;
  assign mss_addr = base_q + ADDR_W'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      base_q    <= '0;
      ret_v     <= 1'b0;
      ret_l     <= '0;
      ret_j     <= '0;
      req_l     <= '0;
      req_j     <= '0;
      done      <= 1'b0;
      coef_bank <= '{default: '0};
    end else begin
      ret_v <= busy;
      ret_l <= req_l;
      ret_j <= req_j;
      if (start) begin
        busy   <= 1'b1;
        cnt    <= '0;
        base_q <= base;
        req_l  <= '0;
        req_j  <= '0;
        done   <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (32'(req_j) == N_TAPS - 1) begin
          req_j <= '0;
          req_l <= req_l + 1'b1;
        end else begin
          req_j <= req_j + 1'b1;
        end
        if (32'(cnt) == TOTAL - 1) busy <= 1'b0;
      end
      if (ret_v) begin
        coef_bank[ret_l][ret_j] <= $signed(mss_rdata);
        if (!busy && !start) done <= 1'b1;
      end
    end
  end

endmodule

// channel_scheduler: time-multiplexes the SRC over up to MAX_CH channels.
//
// Channels 0..num_ch-1 run in turn. A channel runs until it has issued
// `switch_count` output samples; then the scheduler switches to the next
// channel. While a channel runs, the shadow register sets of the
// registerbanks are first written to the local RAMs (the context of the
// channel that ran before) and then loaded with the context of the channel
// that runs next, one word per clock (CTX_STORE, then CTX_LOAD, or CTX_ZERO
// for a channel that has never been stored). With channel n running, n-1 is
// stored and n+1 loaded. The switch (`switch_now`, one clock) swaps active
// and shadow sets and changes `chan`; it happens in the same clock as the
// last output of the slot when the load has finished, so it costs no cycle.
// If the load has not finished, `run` drops and the channel waits. With
// num_ch = 1 nothing is switched. `start` (one clock) restarts at channel 0
// with all channels marked as never stored.
// The zero fill and the one-word-per-clock transfer are this design's
// choices; the switching rule (fixed output count per slot, store the
// previous context before loading the next one while the current channel
// runs, switch as soon as the load is done) follows the published
// architecture.
module channel_scheduler #(
  parameter int unsigned N_TAPS   = src_pkg::N_TAPS,
  parameter int unsigned MAX_CH   = src_pkg::MAX_CH,
  parameter int unsigned SWITCH_W = 16,
  parameter int unsigned IDX_W    = src_pkg::CTX_W,
  localparam int unsigned CH_W    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [CH_W:0]         num_ch,
  input  logic [SWITCH_W-1:0]   switch_count,
  input  logic                  issue,
  output logic [CH_W-1:0]       chan,
  output logic                  run,
  output logic                  switch_now,
  output src_pkg::ctx_op_e      ctx_op,
  output logic [IDX_W-1:0]      ctx_idx,
  output logic [CH_W-1:0]       ctx_chan
);

  import src_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_STORE, S_LOAD, S_WAIT, S_READY} state_e;

  state_e              state;
  logic [SWITCH_W-1:0] count;
  logic [MAX_CH-1:0]   stored;
  logic [CH_W-1:0]     prev_chan;   // context in the shadow set, to store
  logic [CH_W-1:0]     next_chan;   // context to load into the shadow set
  logic                multi;
  logic                slot_full;
  logic                last_issue;

  function automatic logic [CH_W-1:0] succ(logic [CH_W-1:0] c, logic [CH_W:0] n);
    return ((CH_W+1)'(c) + 1'b1 >= n) ? '0 : c + 1'b1;
  endfunction

  always_comb begin
    multi      = (num_ch > 1);
    slot_full  = (count >= switch_count);
    last_issue = issue && (count + 1'b1 >= switch_count);
    switch_now = multi && (state == S_READY) && (slot_full || last_issue);
    run        = !multi || !slot_full;
    ctx_chan   = '0;
    ctx_op     = CTX_NONE;
    case (state)
      S_STORE: begin ctx_op = CTX_STORE; ctx_chan = prev_chan; end
      S_LOAD:  begin ctx_op = stored[next_chan] ? CTX_LOAD : CTX_ZERO; ctx_chan = next_chan; end
      default: ;
    endcase
  end

  logic [IDX_W-1:0] idx;
  assign ctx_idx = (state == S_STORE || state == S_LOAD) ? idx : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      count     <= '0;
      stored    <= '0;
      chan      <= '0;
      prev_chan <= '0;
      next_chan <= '0;
      idx       <= '0;
    end else if (start) begin
      count     <= '0;
      stored    <= '0;
      chan      <= '0;
      prev_chan <= '0;
      next_chan <= succ('0, num_ch);
      idx       <= '0;
      state     <= (num_ch > 1) ? S_LOAD : S_IDLE;
    end else begin
      if (switch_now) begin
        count     <= '0;
        chan      <= next_chan;
        prev_chan <= chan;
        next_chan <= succ(next_chan, num_ch);
        idx       <= '0;
        state     <= S_STORE;
      end else if (issue && multi) begin
        count <= count + 1'b1;
      end
      case (state)
        S_STORE: begin
          if (32'(idx) == N_TAPS - 1) begin
            stored[prev_chan] <= 1'b1;
            idx   <= '0;
            state <= S_LOAD;
          end else idx <= idx + 1'b1;
        end
        S_LOAD: begin
          if (32'(idx) == N_TAPS - 1) begin
            idx   <= '0;
            state <= S_WAIT;
          end else idx <= idx + 1'b1;
        end
        S_WAIT:  state <= S_READY;
        default: ;
      endcase
    end
  end

  a_switch_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    switch_now |-> state == S_READY);

endmodule

// tb_channel_scheduler: three channels, 28 outputs per slot, random output
// requests (`issue` is only driven while `run` is high, as Time Generation
// does). Checked against a model of the rules:
//  - channels run in the order 0,1,2,0,...; `chan` changes only on a switch
//  - a switch happens only when the slot's 28th output is issued in that
//    clock or was issued before, and only after the context transfer ended
//  - no output beyond 28 per slot (`run` low)
//  - after each switch: 19 stores of the previous channel (words 0..18),
//    then 19 loads of the next channel, as zero fills while that channel has
//    never been stored; after start only the load part
//  - a switch in the same clock as the last output costs no clock
//  - with one channel nothing switches and `run` stays high
module tb_channel_scheduler;
  import src_pkg::*;
  localparam int N = 19, NCH = 3, SC = 28;
  logic clk = 0, rst_n = 0, start = 0, issue = 0;
  always #5 clk = !clk;
  logic [3:0]  num_ch = 4'(NCH);
  logic [15:0] switch_count = 16'(SC);
  logic [2:0]  chan, ctx_chan;
  logic        run, switch_now;
  ctx_op_e     ctx_op;
  logic [4:0]  ctx_idx;
  int checks = 0, failures = 0, nswitch = 0, nzero = 0, nload = 0, nstore = 0, nfast = 0, nwait = 0;

  channel_scheduler dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t op=%0d ch=%0d ix=%0d exp %0d %0d %0d", s, $time, ctx_op, ctx_chan, ctx_idx, exp_op.size() > 0 ? exp_op[0] : CTX_NONE, exp_ch.size() > 0 ? exp_ch[0] : -1, exp_ix.size() > 0 ? exp_ix[0] : -1); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected transfer stream
  ctx_op_e exp_op [$];
  int      exp_ch [$];
  int      exp_ix [$];
  bit      stored [NCH];
  int      m_chan, m_count;

  task automatic plan(int prev, int nxt, bit with_store);
    if (with_store) for (int i = 0; i < N; i++) begin exp_op.push_back(CTX_STORE); exp_ch.push_back(prev); exp_ix.push_back(i); end
    for (int i = 0; i < N; i++) begin
      exp_op.push_back(CTX_LOAD); exp_ch.push_back(nxt); exp_ix.push_back(i);
    end
  endtask

  initial begin
    int idle_after;
    bit sw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    m_chan = 0; m_count = 0;
    foreach (stored[c]) stored[c] = 0;
    plan(0, 1, 0);
    idle_after = 0;
    for (int t = 0; t < 3000; t++) begin
      issue = run && (($urandom % 3) != 0);
      #1;
      // transfer stream
      if (exp_op.size() > 0) begin
        automatic ctx_op_e e = exp_op[0];
        if (e == CTX_LOAD && !stored[exp_ch[0]]) e = CTX_ZERO;
        chk(ctx_op == e && int'(ctx_chan) == exp_ch[0] && int'(ctx_idx) == exp_ix[0], "transfer order");
        if (ctx_op == CTX_STORE) nstore++;
        if (ctx_op == CTX_LOAD) nload++;
        if (ctx_op == CTX_ZERO) nzero++;
        if (exp_op[0] == CTX_STORE && exp_ix[0] == N - 1) stored[exp_ch[0]] = 1;
        void'(exp_op.pop_front()); void'(exp_ch.pop_front()); void'(exp_ix.pop_front());
        idle_after = 0;
      end else begin
        chk(ctx_op == CTX_NONE, "no transfer when done");
        idle_after++;
      end
      chk(int'(chan) == m_chan, "active channel");
      chk(run == (m_count < SC), "run until the slot is full");
      if (!run) nwait++;
      // switch rule: slot complete and transfer finished (the last loaded word is written one clock after its request)
      chk(switch_now == ((m_count + int'(issue) >= SC) && exp_op.size() == 0 && idle_after >= 2),
          "switch condition");
      sw = switch_now;
      @(negedge clk);
      if (sw) begin
        if (issue) nfast++;
        nswitch++;
        plan(m_chan, (m_chan + 2) % NCH, 1);
        m_chan = (m_chan + 1) % NCH;
        m_count = 0;
        idle_after = 0;
      end else if (issue) m_count++;
    end
    chk(nswitch > 20 && nzero == 2 * N && nload > 0 && nstore > 0 && nfast > 0 && nwait > 0, "coverage");
    $display("switches=%0d zero=%0d load=%0d store=%0d no-delay=%0d wait=%0d", nswitch, nzero, nload, nstore, nfast, nwait);
    // single channel: never switches
    num_ch = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int t = 0; t < 200; t++) begin
      issue = 1;
      #1;
      chk(run && !switch_now && chan == 0 && ctx_op == CTX_NONE, "single channel");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

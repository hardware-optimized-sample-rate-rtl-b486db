// tb_processing_part: one datapath at default sizes. Random clocks shift in
// samples or request an output with a random phase l and weight alpha
// (coefficients taken from the Kaiser-sinc prototype, FIR 2 getting phase
// l+1), with random pipeline stalls. Each output, two enabled clocks after
// its request, is compared with (1-alpha)*FIR_l + alpha*FIR_l+1 over a model
// history. In the middle the context is switched away and back through the
// local RAM: zero fill and swap (history must vanish from the taps), store
// of the old history to channel 5, load of channel 5 and swap again (the
// history must be back and outputs must continue to match).
module tb_processing_part;
  import src_ref_pkg::*;
  import src_pkg::CTX_NONE, src_pkg::CTX_STORE, src_pkg::CTX_LOAD, src_pkg::CTX_ZERO, src_pkg::ctx_op_e;
  logic clk = 0, rst_n = 0, clear = 0, en = 1, shift = 0, swap = 0;
  always #5 clk = !clk;
  logic signed [15:0] din = 0, y;
  logic signed [15:0] coefs1 [N];
  logic signed [15:0] coefs2 [N];
  logic [15:0] alpha_q = 0;
  ctx_op_e    ctx_op = CTX_NONE;
  logic [4:0] ctx_idx = 0;
  logic [2:0] ctx_chan = 0;
  int checks = 0, failures = 0, nout = 0;

  processing_part dut (.*);

  longint hist [N];
  longint exp_q [$];
  bit     pipe [2] = '{0, 0};

  function automatic longint ref_y(int l, longint a);
    longint y1 = 0, y2 = 0, v;
    for (int j = 0; j < N; j++) begin
      y1 += longint'(proto(j * M + l)) * hist[j];
      y2 += longint'(proto(j * M + l + 1)) * hist[j];
    end
    v = y1 + floor_div((y2 - y1) * a, 65536);
    v = floor_div(v + 8192, 16384);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic transfer(ctx_op_e op, int ch);
    for (int i = 0; i < N; i++) begin
      @(negedge clk); ctx_op = op; ctx_chan = 3'(ch); ctx_idx = 5'(i);
    end
    @(negedge clk); ctx_op = CTX_NONE;
    @(negedge clk);
  endtask

  // random traffic for `cycles` clocks, checking outputs
  task automatic traffic(int cycles);
    int l;
    longint a;
    bit iss;
    for (int t = 0; t < cycles + 2; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      iss = 0;
      shift = 0;
      if (t < cycles) begin
        if (($urandom % 2) != 0) begin
          shift = en;
          din = 16'($urandom % 20000) - 16'sd10000;
        end else if (en) begin
          iss = 1;
          l = $urandom % M;
          a = {32'd0, $urandom % 32'd65536};
          for (int j = 0; j < N; j++) begin
            coefs1[j] = 16'(proto(j * M + l));
            coefs2[j] = 16'(proto(j * M + l + 1));
          end
          exp_q.push_back(ref_y(l, a));
        end
      end
      @(posedge clk);
      if (en) begin
        // the output register has just loaded the request of the previous
        // enabled clock (FIR register plus alpha_q)
        pipe[1] = pipe[0];
        pipe[0] = iss;
        if (pipe[1]) begin
          #1;
          checks++;
          if (longint'(y) != exp_q[0]) begin failures++; $display("got %0d exp %0d", y, exp_q[0]); end
          void'(exp_q.pop_front());
          nout++;
        end
        alpha_q = 16'(a);
      end
      if (shift) begin
        for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(din);
      end
    end
    shift = 0;
    en = 1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint saved [N];
    for (int j = 0; j < N; j++) begin hist[j] = 0; coefs1[j] = 0; coefs2[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    traffic(400);
    // switch away: shadow zero-filled, swap
    saved = hist;
    transfer(CTX_ZERO, 1);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    for (int j = 0; j < N; j++) hist[j] = 0;
    for (int j = 0; j < N; j++) begin checks++; if (dut.u_regbank.taps[j] != 0) failures++; end
    // store old history (now in the shadow set) to channel 5
    transfer(CTX_STORE, 5);
    traffic(200);
    // bring channel 5 back
    transfer(CTX_LOAD, 5);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    hist = saved;
    for (int j = 0; j < N; j++) begin checks++; if (longint'(dut.u_regbank.taps[j]) != hist[j]) failures++; end
    traffic(400);
    checks++;
    if (nout < 200) failures++;
    $display("outputs=%0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

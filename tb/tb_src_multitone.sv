// tb_src_multitone: the SRC at default sizes, fed with the four-tone test
// signal used for the published SINR table, 1/4 sin(w) + sin(w/3) +
// sin(w/2) + cos(w) (imaginary part: each term a quarter period later), at
// that table's ratios and the white-noise case's ratio: upsampling by 1.45,
// 2 and 2.5 on RX, downsampling by 4.3 and 5 on TX. The highest tone sits at
// 5 % of the lower of the two sampling rates. Every output is compared bit
// for bit with the reference model; the SINR of each channel against the
// ideal signal (delayed by the filter's 10 input samples) is printed and
// must exceed 60 dB. Slots of 32 outputs, then of 6, so that channel
// switches both with and without waiting for a context load occur.
module tb_src_multitone;
  import src_ref_pkg::*;

  localparam int NCH = 5;
  localparam int OUTS_PER_CH = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        cfg_we = 0;
  logic [7:0]  cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic        mss_rd;
  logic [15:0] mss_addr, mss_rdata;
  logic [2:0]  in_chan, out_chan;
  logic        rx_in_valid, rx_in_ready, tx_in_valid, tx_in_ready;
  logic signed [15:0] rx_in_re, rx_in_im, tx_in_re, tx_in_im, out_re, out_im;
  logic        rx_out_valid, rx_out_ready, tx_out_valid, tx_out_ready;

  src_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // memory subsystem model: coefficient table at word 0x100, phase-major
  logic [15:0] mss [0:1023];
  always_ff @(posedge clk) mss_rdata <= mss[mss_addr[9:0]];

  // channel setup: ratio F_out/F_in and direction
  // F_in and F_out in Hz (only the ratio matters)
  // slots NCH..7 are unused
  longint      f_in  [8] = '{100, 1, 2, 43, 5, 1, 1, 1};
  longint      f_out [8] = '{145, 2, 5, 10, 1, 1, 1, 1};
  real         ratio [8];
  bit          is_tx [8] = '{0, 0, 0, 1, 1, 0, 0, 0};
  real         p_sig [8], p_err [8];
  logic [69:0] t2 [8];
  longint      n_in [8];
  longint      n_out [8];

  task automatic cfg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // random stalls
  bit in_gate, out_gate_rx, out_gate_tx;
  always @(negedge clk) begin
    in_gate     <= ($urandom % 100) < 85;
    out_gate_rx <= ($urandom % 100) < 80;
    out_gate_tx <= ($urandom % 100) < 90;
  end
  bit drive;
  always_comb begin
    rx_in_valid  = drive && in_gate && !is_tx[in_chan];
    tx_in_valid  = drive && in_gate &&  is_tx[in_chan];
    rx_in_re = 16'(sample(int'(in_chan), n_in[in_chan], 0));
    rx_in_im = 16'(sample(int'(in_chan), n_in[in_chan], 1));
    tx_in_re = rx_in_re;
    tx_in_im = rx_in_im;
    rx_out_ready = out_gate_rx;
    tx_out_ready = out_gate_tx;
  end

  // mechanism counters
  int n_in_stall = 0, n_out_stall = 0, n_switch = 0, n_store = 0, n_load = 0, n_zero = 0;
  int n_wait = 0, n_wrap = 0, n_rx_out = 0, n_tx_out = 0, n_idle = 0, n_up = 0, n_down = 0;
  bit lat_pipe [2] = '{0, 0};

  always @(posedge clk) if (rst_n && dut.running) begin
    if (dut.tg_in_ready && !dut.tg_in_valid) n_in_stall++;
    if (!dut.en) n_out_stall++;
    if (dut.switch_now) n_switch++;
    if (dut.ctx_op == src_pkg::CTX_STORE && dut.ctx_idx == 0) n_store++;
    if (dut.ctx_op == src_pkg::CTX_LOAD && dut.ctx_idx == 0) n_load++;
    if (dut.ctx_op == src_pkg::CTX_ZERO && dut.ctx_idx == 0) n_zero++;
    if (!dut.u_sched.run) n_wait++;
    if (dut.issue && dut.wrap) n_wrap++;
    if (dut.issue && ratio[dut.act_chan] > 1.0) n_up++;
    if (dut.issue && ratio[dut.act_chan] < 1.0) n_down++;
    // no lost clock: with input available and the pipeline free, something happens
    if (dut.en && dut.u_timegen.run && dut.tg_in_valid && !(dut.shift || dut.issue)) n_idle++;
    // latency: an output appears exactly two enabled clocks after its issue
    if (dut.en) begin
      check((rx_out_valid || tx_out_valid) == lat_pipe[1], "two-clock output latency");
      lat_pipe[1] <= lat_pipe[0];
      lat_pipe[0] <= dut.issue;
    end
  end

  // input handshake bookkeeping and output checking
  always @(posedge clk) if (rst_n) begin
    if ((rx_in_valid && rx_in_ready) || (tx_in_valid && tx_in_ready)) n_in[in_chan]++;
    if ((rx_out_valid && rx_out_ready) || (tx_out_valid && tx_out_ready)) begin
      automatic int c = int'(out_chan);
      check(is_tx[c] == tx_out_valid, "output direction");
      if (tx_out_valid) n_tx_out++; else n_rx_out++;
      check(int'(out_re) == expected(c, n_out[c], t2[c], 0), $sformatf("ch%0d out %0d re", c, n_out[c]));
      check(int'(out_im) == expected(c, n_out[c], t2[c], 1), $sformatf("ch%0d out %0d im", c, n_out[c]));
      begin
        // ideal tone at the output time, in input samples, minus the delay
        automatic real pos = real'(N) + real'(n_out[c]) * (real'(t2[c] >> 20) / (2.0 ** 43)) - 1.0 - real'(C);
        begin
          p_sig[c] += tone_value(c, pos, 0) ** 2 + tone_value(c, pos, 1) ** 2;
          p_err[c] += (real'(out_re) - tone_value(c, pos, 0)) ** 2 + (real'(out_im) - tone_value(c, pos, 1)) ** 2;
        end
      end
      n_out[c]++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit done_all;
    for (int i = 0; i < 1024; i++) mss[i] = 16'h0;
    for (int l = 0; l < M; l++)
      for (int j = 0; j < N; j++) mss[256 + l * N + j] = 16'(proto(j * M + l));
    pure_tone = 1;
    multi_tone = 1;
    tone_amp = 9000.0;
    for (int c = 0; c < NCH; c++) begin
      ratio[c] = real'(f_out[c]) / real'(f_in[c]);
      // T2 = T1 * F_in / F_out with T1 = 2**63
      t2[c] = 70'((128'(f_in[c]) << 63) / 128'(f_out[c]));
      tone_f[c] = 0.05 * ((ratio[c] < 1.0) ? ratio[c] : 1.0);
      p_sig[c] = 0.0;
      p_err[c] = 0.0;
      n_in[c] = 0;
      n_out[c] = 0;
    end
    drive = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_write(8'h03, 32'h100);
    cfg_write(8'h00, 32'h2);
    repeat (M * N + 4) @(posedge clk);
    @(negedge clk); cfg_addr = 8'h04; #1;
    check(cfg_rdata[0] == 1'b1, "coefficients loaded");
    for (int l = 0; l < M; l++)
      for (int j = 0; j < N; j++)
        check(dut.coef_bank[l][j] == 16'(proto(j * M + l)), "coefficient register");
    cfg_write(8'h01, NCH);
    cfg_write(8'h02, 32);
    for (int c = 0; c < NCH; c++) begin
      cfg_write(8'(32'h10 + 4 * c + 0), t2[c][31:0]);
      cfg_write(8'(32'h10 + 4 * c + 1), t2[c][63:32]);
      cfg_write(8'(32'h10 + 4 * c + 2), 32'(t2[c][69:64]));
      cfg_write(8'(32'h10 + 4 * c + 3), 32'(is_tx[c]));
    end
    drive = 1;
    cfg_write(8'h00, 32'h1);
    // first half with long slots, then short slots that must wait for loads
    wait (n_out[4] >= longint'(OUTS_PER_CH) / 2);
    cfg_write(8'h02, 6);
    do begin
      @(posedge clk);
      done_all = 1;
      for (int c = 0; c < NCH; c++) if (n_out[c] < longint'(OUTS_PER_CH)) done_all = 0;
    end while (!done_all);
    $display("outputs rx=%0d tx=%0d in_stall=%0d out_stall=%0d switch=%0d store=%0d load=%0d zero=%0d wait=%0d wrap=%0d up=%0d down=%0d",
             n_rx_out, n_tx_out, n_in_stall, n_out_stall, n_switch, n_store, n_load, n_zero, n_wait, n_wrap, n_up, n_down);
    for (int c = 0; c < NCH; c++) begin
      automatic real sinr = 10.0 * $log10(p_sig[c] / p_err[c]);
      $display("channel %0d  F_out/F_in = %f  SINR = %.1f dB", c, ratio[c], sinr);
      check(sinr > 60.0, "SINR above 60 dB");
    end
    check(n_idle == 0, "no idle clock while input available");
    check(n_in_stall > 0, "input stall happened");
    check(n_out_stall > 0, "output stall happened");
    check(n_switch > 2 * NCH, "channel switches happened");
    check(n_store > 0, "context store happened");
    check(n_load > 0, "context restore happened");
    check(n_zero > 0, "zero fill of a new channel happened");
    check(n_wait > 0, "wait for context load happened");
    check(n_wrap > 0, "wrap case of coefficient select happened");
    check(n_rx_out > 0 && n_tx_out > 0, "both directions used");
    check(n_up > 0 && n_down > 0, "both upsampling and downsampling happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_src_top: end-to-end test of the SRC at its default sizes (19 taps,
// 8 polyphase filters, 70-bit times, 8 channel slots).
//
// Software sequence through the register bus: coefficient load from a
// memory-subsystem model, then four channels are run at once with the rate
// ratios 1.45 and 2 (upsampling) and 4.3 and 5 (downsampling), two RX and
// two TX. Inputs and output readiness are randomly withheld. Every output
// sample is compared with a reference computed from absolute times
// (src_ref_pkg), per channel and component. Also checked: the coefficient
// registers, the two-clock output latency, that no clock is lost while the
// input is available, and that every mechanism occurred: input stalls,
// output stalls, channel switches, context stores, restores and zero fills,
// a wait for the context load, the wrap case of the coefficient selection,
// and both directions.
module tb_src_top;
  import src_ref_pkg::*;

  localparam int NCH = 4;
  localparam int OUTS_PER_CH = 300;

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
  real         ratio [8] = '{1.45, 1.0 / 4.3, 2.0, 1.0 / 5.0, 1.0, 1.0, 1.0, 1.0};
  bit          is_tx [8] = '{0, 0, 1, 1, 0, 0, 0, 0};
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
    for (int c = 0; c < NCH; c++) begin
      // T2 = T1 / ratio, T1 = 2**63: ratio given to 2**-20
      t2[c] = 70'(longint'(1048576.0 / ratio[c])) << 43;
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
    cfg_write(8'h02, 40);
    for (int c = 0; c < NCH; c++) begin
      cfg_write(8'(32'h10 + 4 * c + 0), t2[c][31:0]);
      cfg_write(8'(32'h10 + 4 * c + 1), t2[c][63:32]);
      cfg_write(8'(32'h10 + 4 * c + 2), 32'(t2[c][69:64]));
      cfg_write(8'(32'h10 + 4 * c + 3), 32'(is_tx[c]));
    end
    drive = 1;
    cfg_write(8'h00, 32'h1);
    // first half with long slots, then short slots that must wait for loads
    wait (n_out[0] >= longint'(OUTS_PER_CH) / 2);
    cfg_write(8'h02, 6);
    do begin
      @(posedge clk);
      done_all = 1;
      for (int c = 0; c < NCH; c++) if (n_out[c] < longint'(OUTS_PER_CH)) done_all = 0;
    end while (!done_all);
    $display("outputs rx=%0d tx=%0d in_stall=%0d out_stall=%0d switch=%0d store=%0d load=%0d zero=%0d wait=%0d wrap=%0d up=%0d down=%0d",
             n_rx_out, n_tx_out, n_in_stall, n_out_stall, n_switch, n_store, n_load, n_zero, n_wait, n_wrap, n_up, n_down);
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

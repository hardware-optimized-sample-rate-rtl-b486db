// tb_src_kaiser_sweep: SINR of the SRC at default sizes as a function of
// the prototype's Kaiser window parameter beta and of the input level.
//
// For beta in {5, 7, 10, 14} the coefficient table is recomputed, loaded
// over the memory port, and one channel (upsampling by 1.45, a complex
// tone at 5 % of the input rate) is run at amplitudes of 0.1 to 1.5 times
// full scale; above full scale the input is clipped, as a converter would
// clip it. Each run starts from reset. Every output is compared bit for bit
// with the reference model, and the SINR against the ideal, unclipped tone
// is printed as a table. The checks on the trend: for every beta, SINR
// collapses once the input clips (below 30 dB at 1.5); a stronger window
// (beta = 10) beats beta = 5 at full scale; at beta = 10 SINR is higher
// at half scale than at 0.1 of it, because the fixed rounding noise
// matters less.
// The beta values and the amplitude axis follow the published sweep; the
// ratio and tone frequency are this testbench's choice.
module tb_src_kaiser_sweep;
  import src_ref_pkg::*;

  localparam int OUTS = 300;
  localparam int NB = 4, NA = 5;

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

  real    beta_v [NB] = '{5.0, 7.0, 10.0, 14.0};
  real    amp_v  [NA] = '{0.1, 0.5, 1.0, 1.2, 1.5};
  real    sinr   [NB][NA];
  logic [69:0] t2;
  longint n_in, n_out;
  real    p_sig, p_err;
  bit     drive;

  task automatic cfg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // one RX channel, input always offered, output always taken
  always_comb begin
    rx_in_valid  = drive && in_chan == 3'd0;
    tx_in_valid  = 1'b0;
    rx_in_re     = 16'(sample(0, n_in, 0));
    rx_in_im     = 16'(sample(0, n_in, 1));
    tx_in_re     = '0;
    tx_in_im     = '0;
    rx_out_ready = 1'b1;
    tx_out_ready = 1'b1;
  end

  always @(posedge clk) if (rst_n && drive) begin
    if (rx_in_valid && rx_in_ready) n_in++;
    if (rx_out_valid) begin
      check(out_chan == 3'd0, "output channel");
      check(int'(out_re) == expected(0, n_out, t2, 0), $sformatf("out %0d re", n_out));
      check(int'(out_im) == expected(0, n_out, t2, 1), $sformatf("out %0d im", n_out));
      begin
        // ideal tone at the output time, in input samples, minus the delay
        automatic real pos = real'(N) + real'(n_out) * (real'(t2 >> 20) / (2.0 ** 43)) - 1.0 - real'(C);
        p_sig += tone_value(0, pos, 0) ** 2 + tone_value(0, pos, 1) ** 2;
        p_err += (real'(out_re) - tone_value(0, pos, 0)) ** 2 + (real'(out_im) - tone_value(0, pos, 1)) ** 2;
      end
      n_out++;
    end
    check(!tx_out_valid, "no TX output");
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pure_tone = 1;
    tone_f[0] = 0.05;
    t2 = 70'((128'(100) << 63) / 128'(145));
    for (int i = 0; i < 1024; i++) mss[i] = 16'h0;
    for (int b = 0; b < NB; b++) begin
      kaiser_beta = beta_v[b];
      for (int l = 0; l < M; l++)
        for (int j = 0; j < N; j++) mss[256 + l * N + j] = 16'(proto(j * M + l));
      for (int a = 0; a < NA; a++) begin
        tone_amp = amp_v[a] * 32767.0;
        drive = 0;
        rst_n = 0;
        repeat (3) @(posedge clk);
        rst_n = 1;
        n_in = 0;
        n_out = 0;
        p_sig = 0.0;
        p_err = 0.0;
        cfg_write(8'h03, 32'h100);
        cfg_write(8'h00, 32'h2);
        repeat (M * N + 4) @(posedge clk);
        @(negedge clk); cfg_addr = 8'h04; #1;
        check(cfg_rdata[0] == 1'b1, "coefficients loaded");
        cfg_write(8'h01, 1);
        cfg_write(8'h10, t2[31:0]);
        cfg_write(8'h11, t2[63:32]);
        cfg_write(8'h12, 32'(t2[69:64]));
        cfg_write(8'h13, 0);
        drive = 1;
        cfg_write(8'h00, 32'h1);
        wait (n_out >= longint'(OUTS));
        @(negedge clk);
        drive = 0;
        sinr[b][a] = 10.0 * $log10(p_sig / p_err);
      end
    end
    $display("SINR in dB, rows: beta, columns: amplitude / full scale");
    $display("beta    0.1    0.5    1.0    1.2    1.5");
    for (int b = 0; b < NB; b++)
      $display("%4.0f %6.1f %6.1f %6.1f %6.1f %6.1f", beta_v[b],
               sinr[b][0], sinr[b][1], sinr[b][2], sinr[b][3], sinr[b][4]);
    for (int b = 0; b < NB; b++) check(sinr[b][NA - 1] < 30.0, "SINR collapses when the input clips");
    check(sinr[2][2] > sinr[0][2], "beta 10 beats beta 5 at full scale");
    check(sinr[2][1] > sinr[2][0], "SINR rises with the level below full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_time_generation: three channels with different T2 (up- and
// downsampling), switched every few events, random input availability and
// random output stalls. An independent model keeps, per channel, how many
// inputs and outputs have happened; from absolute times it knows whether
// the next event must be an input (the next input time (n+1)*T1 is not
// after the next output time 19*T1 + k*T2) and what the phase of an output
// must be. The 19*T1 start offset makes each channel take 19 inputs first.
module tb_time_generation;
  localparam int NCH = 3;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, run = 0, in_valid = 0;
  always #5 clk = !clk;
  logic [2:0]  chan = 0;
  logic [69:0] t2_step;
  logic        in_ready, shift, issue;
  logic [69:0] phase;
  int checks = 0, failures = 0, nshift = 0, nissue = 0, nwait = 0;
  logic [69:0] t2 [8];
  longint n [8], k [8];

  time_generation dut (.*);
  assign t2_step = t2[chan];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] tin, tout;
    bit want_in;
    t2[0] = 70'(longint'(1048576.0 / 1.45)) << 43;   // T1 / 1.45
    t2[1] = 70'(longint'(1048576.0 * 4.3)) << 43;
    t2[2] = 70'(5) << 60;                            // 5/8 T1, exact
    for (int c = 0; c < NCH; c++) begin n[c] = 0; k[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (t % 17 == 0) chan = 3'($urandom % NCH);
      en = ($urandom % 10) != 0;
      run = ($urandom % 10) != 0;
      in_valid = ($urandom % 4) != 0;
      #1;
      // model: r[0] is input n-1, at time n*T1; output k at time k*T2
      tin  = 128'(n[chan]) << 63;
      tout = (128'(19) << 63) + 128'(k[chan]) * 128'(t2[chan]);
      want_in = (tout - tin) >= (128'(1) << 63);
      checks++;
      if (!(en && run)) begin
        if (shift || issue || in_ready) failures++;
      end else if (want_in) begin
        if (!(in_ready && !issue && shift == in_valid)) failures++;
        if (!in_valid) nwait++;
      end else begin
        if (!(issue && !in_ready && !shift)) failures++;
        checks++;
        if (phase != 70'(tout - tin)) failures++;
      end
      @(posedge clk);
      if (shift) begin n[chan]++; nshift++; end
      if (issue) begin k[chan]++; nissue++; end
    end
    checks++;
    if (nshift == 0 || nissue == 0 || nwait == 0) failures++;
    $display("shifts=%0d issues=%0d waits=%0d", nshift, nissue, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

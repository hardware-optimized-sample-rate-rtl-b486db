// tb_interpolation_control: random phases in [0, T1) with T1 = 8 * 2**60;
// l must be floor(phase / 2**60), alpha the next 16 bits of the fraction,
// wrap set exactly for l = 7, and alpha_q alpha delayed by one enabled clock.
module tb_interpolation_control;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = !clk;
  logic [69:0] phase;
  logic [2:0]  l;
  logic        wrap;
  logic [15:0] alpha, alpha_q;
  int checks = 0, failures = 0, nwrap = 0;

  interpolation_control dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p;
    longint el, ea, prev_a;
    phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_a = -1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      p = 128'({$urandom, $urandom}) % (128'(8) << 60);
      phase = 70'(p);
      en = 1;
      #1;
      el = longint'(p / (128'(1) << 60));
      ea = longint'((p % (128'(1) << 60)) / (128'(1) << 44));
      checks += 3;
      if (longint'(l) != el) failures++;
      if (longint'(alpha) != ea) failures++;
      if (wrap != (el == 7)) failures++;
      if (wrap) nwrap++;
      if (prev_a >= 0) begin
        checks++;
        if (longint'(alpha_q) != prev_a) failures++;
      end
      prev_a = ea;
    end
    checks++;
    if (nwrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_filter: random samples and coefficients at the default 19 taps;
// the registered sum is compared with a sum of products computed in
// 64-bit integers. Also checks that the result holds while `en` is low
// and appears one clock after the inputs.
module tb_fir_filter;
  localparam int N = 19;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = !clk;
  logic signed [15:0] taps [N];
  logic signed [15:0] coefs [N];
  logic signed [36:0] y;
  int checks = 0, failures = 0;

  fir_filter dut (.*);

  function automatic longint ref_sum();
    longint s = 0;
    for (int j = 0; j < N; j++) s += longint'(taps[j]) * longint'(coefs[j]);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv, held;
    for (int j = 0; j < N; j++) begin taps[j] = 0; coefs[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        // extremes now and then
        taps[j]  = (t % 50 == 0) ? -16'sd32768 : 16'($urandom);
        coefs[j] = (t % 50 == 0) ? -16'sd32768 : 16'($urandom);
      end
      en = 1;
      expv = ref_sum();
      @(negedge clk);
      checks++;
      if (longint'(y) != expv) begin failures++; $display("mismatch %0d vs %0d", y, expv); end
      // hold with en low
      en = 0; held = expv;
      for (int j = 0; j < N; j++) taps[j] = 16'($urandom);
      @(negedge clk);
      checks++;
      if (longint'(y) != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

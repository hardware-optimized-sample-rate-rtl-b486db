// tb_output_calculation: random FIR results and weights, plus values that
// saturate; expected value computed as (1-a)*y1 + a*y2 with floor, round
// half up at 2**14 and clipping to 16 bits, in 64-bit integers.
module tb_output_calculation;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = !clk;
  logic signed [36:0] y1, y2;
  logic [15:0] alpha;
  logic signed [15:0] y;
  int checks = 0, failures = 0, nsat = 0;

  output_calculation dut (.*);

  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  function automatic longint ref_out(longint a1, longint a2, longint a);
    // (1-a)*y1 + a*y2 == y1 + a*(y2-y1); written with the weight on y2
    longint v = a1 + fdiv(a * (a2 - a1), 65536);
    longint r = fdiv(v + 8192, 16384);
    if (r > 32767) begin r = 32767; nsat++; end
    if (r < -32768) begin r = -32768; nsat++; end
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    y1 = 0; y2 = 0; alpha = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 3 == 0) begin   // in range
        y1 = 37'(longint'($signed($urandom)) >>> 2);
        y2 = 37'(longint'($signed($urandom)) >>> 2);
      end else begin          // full range, often saturating
        y1 = 37'({$urandom, $urandom});
        y2 = 37'({$urandom, $urandom});
      end
      alpha = (t % 7 == 0) ? 16'hffff : 16'($urandom);
      en = 1;
      e = ref_out(longint'(y1), longint'(y2), longint'(alpha));
      @(negedge clk);
      en = 0;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("y1=%0d y2=%0d a=%0d got %0d exp %0d", y1, y2, alpha, y, e);
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

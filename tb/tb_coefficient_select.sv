// tb_coefficient_select: a Kaiser-sinc bank (filter 0 is one 1.0 at the
// centre tap) is presented for every phase. Expected FIR 1 and FIR 2 sets
// come from the prototype itself: tap j of phase p is prototype sample
// j*M + p, and for p = M this reads filter 0 one tap further, which is the
// shifted single 1.0.
module tb_coefficient_select;
  import src_ref_pkg::*;
  logic signed [15:0] coef_bank [M][N];
  logic [2:0] l;
  logic       wrap;
  logic signed [15:0] coefs1 [N];
  logic signed [15:0] coefs2 [N];
  int checks = 0, failures = 0;

  coefficient_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < M; p++)
      for (int j = 0; j < N; j++) coef_bank[p][j] = 16'(proto(j * M + p));
    for (int p = 0; p < M; p++) begin
      l = 3'(p);
      wrap = (p == M - 1);
      #1;
      for (int j = 0; j < N; j++) begin
        checks += 2;
        if (int'(coefs1[j]) != proto(j * M + p)) failures++;
        if (int'(coefs2[j]) != proto(j * M + p + 1)) begin
          failures++;
          $display("phase %0d tap %0d: got %0d exp %0d", p, j, coefs2[j], proto(j * M + p + 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

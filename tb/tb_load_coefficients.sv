// tb_load_coefficients: a memory model with one clock of read latency holds
// a random table at a chosen base. After `start`, every coefficient
// register must hold word base + l*19 + j, the read strobe must be active
// for exactly 152 clocks and `done` must rise on the 153rd clock edge after the one that samples
// `start` (152 reads plus one clock of read latency).
// A second load from another base checks that `done` drops and the bank is
// replaced.
module tb_load_coefficients;
  localparam int N = 19, M = 8;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = !clk;
  logic [15:0] base = 0, mss_addr, mss_rdata;
  logic        mss_rd, done;
  logic signed [15:0] coef_bank [M][N];
  logic [15:0] mem [0:1023];
  int checks = 0, failures = 0, nrd = 0;

  load_coefficients dut (.*);

  always_ff @(posedge clk) begin
    mss_rdata <= mem[mss_addr[9:0]];
    if (mss_rd) nrd++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_check(int b);
    int cyc = 0;
    nrd = 0;
    @(negedge clk); base = 16'(b); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (done) failures++;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != M * N + 1) begin failures++; $display("done after %0d clocks", cyc); end
    checks++;
    if (nrd != M * N) begin failures++; $display("%0d reads", nrd); end
    for (int l = 0; l < M; l++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (coef_bank[l][j] != $signed(mem[b + l * N + j])) failures++;
      end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_and_check(100);
    load_and_check(517);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

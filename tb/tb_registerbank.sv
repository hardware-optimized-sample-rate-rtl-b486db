// tb_registerbank: random shifts into the active set are checked against a
// model history (taps[j] = j-th newest sample). The shadow set is written
// with random words, read back, and after `swap` the former shadow words
// must appear on the taps while the former active history is readable
// through the shadow port. `clear` must zero both sets.
module tb_registerbank;
  localparam int N = 19;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0, swap = 0, sh_we = 0;
  always #5 clk = !clk;
  logic signed [15:0] din = 0, sh_rdata, sh_wdata = 0;
  logic signed [15:0] taps [N];
  logic [4:0] sh_ridx = 0, sh_widx = 0;
  int checks = 0, failures = 0;
  logic signed [15:0] act [N];
  logic signed [15:0] shd [N];

  registerbank dut (.*);

  task automatic chk(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  task automatic compare_all();
    for (int j = 0; j < N; j++) chk(taps[j] == act[j]);
    for (int j = 0; j < N; j++) begin
      sh_ridx = 5'(j); #1;
      chk(sh_rdata == shd[j]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] tmp [N];
    for (int j = 0; j < N; j++) begin act[j] = 0; shd[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      // shifts interleaved with shadow writes
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        shift = ($urandom % 2) == 1;
        din = 16'($urandom);
        sh_we = ($urandom % 2) == 1;
        sh_widx = 5'($urandom % N);
        sh_wdata = 16'($urandom);
        @(posedge clk); #1;
        if (shift) begin
          for (int j = N - 1; j > 0; j--) act[j] = act[j-1];
          act[0] = din;
        end
        if (sh_we) shd[sh_widx] = sh_wdata;
        shift = 0; sh_we = 0;
        compare_all();
      end
      // swap
      @(negedge clk); swap = 1;
      @(posedge clk); #1; swap = 0;
      tmp = act; act = shd; shd = tmp;
      compare_all();
    end
    @(negedge clk); clear = 1;
    @(posedge clk); #1; clear = 0;
    for (int j = 0; j < N; j++) begin act[j] = 0; shd[j] = 0; end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

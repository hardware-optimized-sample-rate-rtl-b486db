// tb_local_ram: random writes and reads against an associative-array model;
// read data must appear exactly one clock after the address.
module tb_local_ram;
  logic clk = 0, we = 0;
  always #5 clk = !clk;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;

  local_ram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      a = $urandom % 256;
      addr = 8'(a);
      wdata = 16'($urandom);
      if (!we) begin
        @(negedge clk);
        we = 0;
        checks++;
        if (rdata != model[a]) failures++;
      end else model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

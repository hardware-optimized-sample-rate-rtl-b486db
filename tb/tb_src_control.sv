// tb_src_control: writes every register and reads it back, checks the
// decoded outputs, the one-clock start pulse on the 0->1 enable write
// (and none on a repeated write), the load pulse and the status word.
module tb_src_control;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  always #5 clk = !clk;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic coef_done = 0, running = 0;
  logic [2:0] active_chan = 0;
  logic enable, start, load_coef;
  logic [3:0] num_ch;
  logic [15:0] switch_count, coef_base;
  logic [69:0] t2_step [8];
  src_pkg::dir_e dir [8];
  int checks = 0, failures = 0, nstart = 0, nload = 0;

  src_control dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (start) nstart++;
    if (load_coef) nload++;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
    @(negedge clk);   // let a pulse from this write be counted
  endtask
  task automatic rd_check(logic [7:0] a, logic [31:0] e);
    @(negedge clk); cfg_addr = a; #1;
    checks++;
    if (cfg_rdata !== e) begin failures++; $display("addr %h read %h exp %h", a, cfg_rdata, e); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [69:0] v [8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks += 3;
    if (num_ch != 1 || switch_count != 16 || enable) failures++;
    if (t2_step[3] != (70'(8) << 60)) failures++;
    if (dir[5] != src_pkg::DIR_RX) failures++;
    for (int c = 0; c < 8; c++) begin
      v[c] = {6'($urandom), $urandom, $urandom};
      wr(8'(16 + 4 * c), v[c][31:0]);
      wr(8'(16 + 4 * c + 1), v[c][63:32]);
      wr(8'(16 + 4 * c + 2), 32'(v[c][69:64]));
      wr(8'(16 + 4 * c + 3), 32'(c % 2));
    end
    for (int c = 0; c < 8; c++) begin
      checks += 2;
      if (t2_step[c] != v[c]) failures++;
      if (dir[c] != src_pkg::dir_e'(c % 2)) failures++;
      rd_check(8'(16 + 4 * c), v[c][31:0]);
      rd_check(8'(16 + 4 * c + 1), v[c][63:32]);
      rd_check(8'(16 + 4 * c + 2), 32'(v[c][69:64]));
      rd_check(8'(16 + 4 * c + 3), 32'(c % 2));
    end
    wr(8'h01, 4);  rd_check(8'h01, 4);
    wr(8'h02, 77); rd_check(8'h02, 77);
    wr(8'h03, 32'h1234); rd_check(8'h03, 32'h1234);
    checks += 3;
    if (num_ch != 4 || switch_count != 77 || coef_base != 16'h1234) failures++;
    if (nstart != 0 || nload != 0) failures++;
    wr(8'h00, 2);
    checks++; if (nload != 1 || nstart != 0) failures++;
    wr(8'h00, 1);
    wr(8'h00, 1);
    checks++; if (nstart != 1 || !enable) failures++;
    coef_done = 1; running = 1; active_chan = 5;
    rd_check(8'h04, 32'h503);
    wr(8'h00, 0);
    wr(8'h00, 1);
    checks++; if (nstart != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ram_connection: the block is wired to a registerbank-like shadow array
// and a RAM model. For several channels it stores random shadow contents,
// overwrites the shadow, loads the channels back in another order and
// compares; zero fills must clear the shadow. Store addresses must be
// channel*32 + word.
module tb_ram_connection;
  import src_pkg::*;
  localparam int N = 19;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  ctx_op_e    ctx_op = CTX_NONE;
  logic [4:0] ctx_idx = 0, sh_ridx, sh_widx;
  logic [2:0] ctx_chan = 0;
  logic signed [15:0] sh_rdata, sh_wdata;
  logic sh_we, ram_we;
  logic [7:0] ram_addr;
  logic [15:0] ram_wdata, ram_rdata;
  logic signed [15:0] shadow [32];
  logic [15:0] ram [256];
  logic signed [15:0] saved [8][N];
  int checks = 0, failures = 0;

  ram_connection dut (.*);

  assign sh_rdata = shadow[sh_ridx];
  always_ff @(posedge clk) begin
    if (sh_we) shadow[sh_widx] <= sh_wdata;
    if (ram_we) ram[ram_addr] <= ram_wdata;
    ram_rdata <= ram[ram_addr];
  end

  task automatic xfer(ctx_op_e op, int ch);
    for (int i = 0; i < N; i++) begin
      @(negedge clk); ctx_op = op; ctx_chan = 3'(ch); ctx_idx = 5'(i);
      if (op == CTX_STORE) begin
        #1; checks++;
        if (!(ram_we && ram_addr == 8'(ch * 32 + i) && ram_wdata == shadow[i])) failures++;
      end
    end
    @(negedge clk); ctx_op = CTX_NONE;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ch = 0; ch < 8; ch++) begin
      for (int i = 0; i < 32; i++) shadow[i] = 16'($urandom);
      for (int i = 0; i < N; i++) saved[ch][i] = shadow[i];
      xfer(CTX_STORE, ch);
    end
    for (int k = 0; k < 8; k++) begin
      automatic int ch = (k * 5 + 3) % 8;
      for (int i = 0; i < 32; i++) shadow[i] = 16'($urandom);
      xfer(CTX_LOAD, ch);
      for (int i = 0; i < N; i++) begin checks++; if (shadow[i] != saved[ch][i]) failures++; end
      xfer(CTX_ZERO, ch);
      for (int i = 0; i < N; i++) begin checks++; if (shadow[i] != 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

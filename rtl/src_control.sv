// src_control (Control): software-visible configuration of the SRC.
//
// A simple synchronous register bus (write on cfg_we at the clock edge,
// combinational read) stands in for the platform's VCI target. Register map
// (word addresses, 32-bit data; this design's own layout):
//   0x00 CTRL     bit0 enable (a 0->1 write emits `start`),
//                 bit1 write 1: load the coefficients (`load_coef` pulse)
//   0x01 NUM_CH   number of channels in the schedule, 1..MAX_CH
//   0x02 SWITCH   output samples per channel slot, >= 1
//   0x03 COEFBASE MSS word address of the coefficient table
//   0x04 STATUS   read only: bit0 coefficients loaded, bit1 running,
//                 bits 8+ active channel
//   0x10+4c+0/1/2 T2 of channel c, bits 31:0, 63:32, TIME_W-1:64
//   0x10+4c+3     direction of channel c (0 RX, 1 TX)
// T2 is in units of T3 with FRAC_W fraction bits (T1 = M*T3), so the rate
// ratio F_in/F_out of a channel equals T2/T1. Reset: disabled, one channel,
// 16 outputs per slot, every T2 equal to T1 (ratio 1), all channels RX.
module src_control #(
  parameter int unsigned M        = src_pkg::M_PHASES,
  parameter int unsigned TIME_W   = src_pkg::TIME_W,
  parameter int unsigned FRAC_W   = src_pkg::FRAC_W,
  parameter int unsigned MAX_CH   = src_pkg::MAX_CH,
  parameter int unsigned SWITCH_W = 16,
  parameter int unsigned ADDR_W   = 16,
  localparam int unsigned CH_W    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [7:0]            cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata,
  input  logic                  coef_done,
  input  logic                  running,
  input  logic [CH_W-1:0]       active_chan,
  output logic                  enable,
  output logic                  start,
  output logic                  load_coef,
  output logic [CH_W:0]         num_ch,
  output logic [SWITCH_W-1:0]   switch_count,
  output logic [ADDR_W-1:0]     coef_base,
  output logic [TIME_W-1:0]     t2_step [MAX_CH],
  output src_pkg::dir_e         dir [MAX_CH]
);

  import src_pkg::*;

  localparam logic [TIME_W-1:0] T1 = TIME_W'(M) << FRAC_W;

  logic       is_ch;
  logic [CH_W-1:0] ch_sel;
  logic [1:0] ch_reg;

  always_comb begin
    is_ch  = (cfg_addr >= 8'h10) && (32'(cfg_addr - 8'h10) < 4 * MAX_CH);
    ch_sel = CH_W'((cfg_addr - 8'h10) >> 2);
    ch_reg = cfg_addr[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable       <= 1'b0;
      start        <= 1'b0;
      load_coef    <= 1'b0;
      num_ch       <= (CH_W+1)'(1);
      switch_count <= SWITCH_W'(16);
      coef_base    <= '0;
      t2_step      <= '{default: T1};
      dir          <= '{default: DIR_RX};
    end else begin
      start     <= 1'b0;
      load_coef <= 1'b0;
      if (cfg_we) begin
        if (is_ch) begin
          case (ch_reg)
            2'd0: t2_step[ch_sel][31:0]  <= cfg_wdata;
            2'd1: t2_step[ch_sel][63:32] <= cfg_wdata;
            2'd2: t2_step[ch_sel][TIME_W-1:64] <= cfg_wdata[TIME_W-65:0];
            2'd3: dir[ch_sel] <= dir_e'(cfg_wdata[0]);
          endcase
        end else begin
          case (cfg_addr)
            8'h00: begin
              enable    <= cfg_wdata[0];
              start     <= cfg_wdata[0] && !enable;
              load_coef <= cfg_wdata[1];
            end
            8'h01: num_ch       <= cfg_wdata[CH_W:0];
            8'h02: switch_count <= cfg_wdata[SWITCH_W-1:0];
            8'h03: coef_base    <= cfg_wdata[ADDR_W-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (is_ch) begin
      case (ch_reg)
        2'd0: cfg_rdata = t2_step[ch_sel][31:0];
        2'd1: cfg_rdata = t2_step[ch_sel][63:32];
        2'd2: cfg_rdata = 32'(t2_step[ch_sel][TIME_W-1:64]);
        2'd3: cfg_rdata = 32'(dir[ch_sel]);
      endcase
    end else begin
      case (cfg_addr)
        8'h00: cfg_rdata = 32'(enable);
        8'h01: cfg_rdata = 32'(num_ch);
        8'h02: cfg_rdata = 32'(switch_count);
        8'h03: cfg_rdata = 32'(coef_base);
        8'h04: cfg_rdata = 32'({active_chan, 6'd0, running, coef_done});
        default: ;
      endcase
    end
  end

  initial assert (TIME_W > 64 && TIME_W <= 96) else $error("T2 register map assumes 64 < TIME_W <= 96");
  initial assert (MAX_CH <= 8) else $error("register map holds at most 8 channels");

endmodule

// tc_top: LVDS / mobile DDR interface testchip.
// The chip sends a pseudo random 35-bit word per core clock (SRD_DATA, with
// SRD_CLK) to an external 5-channel 7:1 LVDS serializer and receives the
// serialized stream back on five LVDS lanes. tcDes deserializes it, tcPattGen
// finds the loop latency with a training pattern and compares the returned
// words with a locally regenerated copy, counting bit errors and logging
// erroneous words. tc_ber turns the counts into a total and a per-period bit
// error rate on the double precision FPU, and lcd_ctrl shows both on a
// character LCD. All settings, counters, results and memories are reached
// from a JTAG port through an OCP bus into tcReg. A simple script-driven
// controller exercises a mobile DDR device through a DFI port.
// Clocks: sys_clk is the core clock (106 MHz in the document); rx_hs_clk
// (7x, inverted) and rx_ls_clk come from the deserializer PLL, whose analog
// part is outside this RTL, as are the LVDS input buffers (rx_lane is their
// single-ended output) and the DDR PHY (DFI signals are ports).
// 'bypass' loops the deserialized words straight back to SRD_DATA instead of
// the generated pattern. The debug port shows the expected and received 7
// bits of the channel chosen by data_sel (0..4 = A..E).
// The block set and connections follow the document's architecture figure;
// the bypass pin and the debug channel select encoding are this design's.
module tc_top
  import tc_pkg::*;
#(
  parameter int unsigned ERR_DEPTH = 512,
  parameter int unsigned DDR_DEPTH = 2048,
  parameter int unsigned T_PWRUP   = 1_600_000,
  parameter int unsigned T_EXEC    = 4_300,
  parameter int unsigned T_CLEAR   = 175_000,
  parameter logic [2:0]  PHASE_RST = 3'd2
) (
  input  logic          sys_clk,
  input  logic          rst_ni,
  // deserializer PLL and LVDS receivers
  input  logic          rx_hs_clk,
  input  logic          rx_ls_clk,
  input  logic          pll_locked,
  input  logic [4:0]    rx_lane,
  // parallel output to the serializer
  output logic          srd_clk,
  output word_t         srd_data,
  input  logic          bypass,
  // debug port
  input  logic [2:0]    data_sel,
  output logic [6:0]    exp_data_o,
  output logic [6:0]    rec_data_o,
  // JTAG
  input  logic          tck,
  input  logic          tms,
  input  logic          tdi,
  input  logic          trst_n,
  output logic          tdo,
  output logic          tdo_en,
  // LCD
  output logic          lcd_e,
  output logic          lcd_rs,
  output logic          lcd_rw,
  output logic [7:0]    lcd_db,
  // DFI to the DDR PHY
  output logic [13:0]   dfi_address,
  output logic [1:0]    dfi_bank,
  output logic          dfi_cs_n,
  output logic          dfi_ras_n,
  output logic          dfi_cas_n,
  output logic          dfi_we_n,
  output logic          dfi_cke,
  output logic          dfi_wrdata_en,
  output logic [63:0]   dfi_wrdata,
  output logic [7:0]    dfi_wrdata_mask,
  output logic          dfi_rddata_en,
  input  logic [63:0]   dfi_rddata,
  input  logic          dfi_rddata_valid
);
  localparam int unsigned EAW = $clog2(ERR_DEPTH);
  localparam int unsigned DAW = $clog2(DDR_DEPTH);

  ocp_if ocp (.clk(sys_clk), .rst_n(rst_ni));

  pg_cfg_t   cfg;
  pg_stat_t  stat;
  ber_in_t   ber_cnt;
  logic      ber_trig, ber_valid, ber_upd, locked;
  logic [2:0]  phase;
  logic [14:0] delay;
  word_t     rx_word, tx_word, dbg_exp, dbg_rec, err_exp, err_rec;
  logic [63:0] ber_tot, ber_per;
  dec_t      dec_tot, dec_per;
  logic            err_ren;
  logic [EAW-1:0]  err_raddr;
  logic            ddr_start, ddr_busy, ddr_done;
  logic [15:0]     ddr_tx_first, ddr_tx_last, ddr_rx_first, ddr_rx_count;
  logic [15:0]     txm_we;
  logic [DAW-1:0]  txm_addr, rxm_addr;
  logic [127:0]    txm_wdata, txm_rdata;
  logic            txm_ren, rxm_ren;
  logic [63:0]     rxm_rdata;
  logic            lcd_ready;

  tc_des u_des (
    .hs_clk(rx_hs_clk), .ls_clk(rx_ls_clk), .clk(sys_clk), .rst_n(rst_ni),
    .pll_locked, .sdata(rx_lane), .phase, .delay, .data(rx_word), .locked);

  tc_pattgen #(.ERR_DEPTH(ERR_DEPTH)) u_pattgen (
    .clk(sys_clk), .rst_n(rst_ni), .cfg, .locked, .tx_data(tx_word), .rx_data(rx_word),
    .stat, .ber_cnt, .ber_trig, .dbg_exp, .dbg_rec,
    .mem_ren(err_ren), .mem_raddr(err_raddr), .mem_exp(err_exp), .mem_rec(err_rec));

  tc_ber u_ber (
    .clk(sys_clk), .rst_n(rst_ni), .trig(ber_trig), .cnt(ber_cnt),
    .ber_tot, .ber_per, .dec_tot, .dec_per, .valid(ber_valid), .upd(ber_upd));

  lcd_ctrl #(.T_PWRUP(T_PWRUP), .T_EXEC(T_EXEC), .T_CLEAR(T_CLEAR)) u_lcd (
    .clk(sys_clk), .rst_n(rst_ni), .dec_tot, .dec_per, .upd(ber_upd),
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_db, .ready(lcd_ready));

  jtag_ctrl u_jtag (
    .tck, .tms, .tdi, .trst_n, .tdo, .tdo_en,
    .bsr_sel(), .bsr_capture(), .bsr_shift(), .bsr_update(), .bsr_tdi(),
    .bsr_tdo(1'b0), .ocp(ocp.master));

  tc_reg #(.PHASE_RST(PHASE_RST), .ERR_DEPTH(ERR_DEPTH), .DDR_DEPTH(DDR_DEPTH)) u_reg (
    .ocp(ocp.slave), .cfg, .phase, .delay, .locked, .stat,
    .ber_tot, .ber_per, .dec_tot, .dec_per, .ber_valid,
    .err_ren, .err_raddr, .err_exp, .err_rec,
    .ddr_start, .ddr_tx_first, .ddr_tx_last, .ddr_rx_first, .ddr_busy, .ddr_done,
    .ddr_rx_count, .txm_we, .txm_addr, .txm_wdata, .txm_ren, .txm_rdata,
    .rxm_ren, .rxm_addr, .rxm_rdata);

  ddr_ctrl #(.DEPTH(DDR_DEPTH)) u_ddr (
    .clk(sys_clk), .rst_n(rst_ni), .start(ddr_start), .tx_first(ddr_tx_first),
    .tx_last(ddr_tx_last), .rx_first(ddr_rx_first), .busy(ddr_busy), .done(ddr_done),
    .rx_count(ddr_rx_count), .txm_we, .txm_addr, .txm_wdata, .txm_ren, .txm_rdata,
    .rxm_ren, .rxm_addr, .rxm_rdata,
    .dfi_address, .dfi_bank, .dfi_cs_n, .dfi_ras_n, .dfi_cas_n, .dfi_we_n, .dfi_cke,
    .dfi_wrdata_en, .dfi_wrdata, .dfi_wrdata_mask, .dfi_rddata_en, .dfi_rddata,
    .dfi_rddata_valid);

  assign srd_clk  = sys_clk;
  assign srd_data = bypass ? rx_word : tx_word;

  always_comb begin
    exp_data_o = '0;
    rec_data_o = '0;
    for (int unsigned c = 0; c < CHANNELS; c++)
      if (data_sel == 3'(c)) begin
        exp_data_o = dbg_exp[RATIO*c +: RATIO];
        rec_data_o = dbg_rec[RATIO*c +: RATIO];
      end
  end
endmodule

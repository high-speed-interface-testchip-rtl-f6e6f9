// tc_reg: tcReg, configuration and status registers of the testchip with
// windows onto its memories, as a byte-wide OCP slave over 64 KB.
// Map (byte addresses, multi-byte fields little endian), see tc_pkg:
//   0x0000.. control/status/counters/BER results/DDR control registers
//   0x2000 error memory, expected words   (8-byte stride, read only)
//   0x3000 error memory, received words   (8-byte stride, read only)
//   0x4000 DDR receive memory  2k x 64    (8-byte stride, read only)
//   0x8000 DDR transmit memory 2k x 128   (16-byte stride, read/write)
// Every command is accepted at once; the response (DVA, with read data) comes
// in the next cycle, after the one-cycle memory read. Writes to read-only
// locations are ignored, unmapped reads return 0. The reset values of the
// phase and delay registers are parameters, so the values found by timing
// analysis can be built in and changed later over JTAG, as the document
// describes. The document gives the role of tcReg; the map is this design's.
module tc_reg
  import tc_pkg::*;
#(
  parameter logic [2:0] PHASE_RST  = 3'd2,
  parameter logic [14:0] DELAY_RST = '0,
  parameter logic [7:0] MAXLAT_RST = 8'd64,
  parameter int unsigned ERR_DEPTH = 512,
  parameter int unsigned DDR_DEPTH = 2048
) (
  ocp_if.slave          ocp,
  output pg_cfg_t       cfg,
  output logic [2:0]    phase,
  output logic [14:0]   delay,
  input  logic          locked,
  input  pg_stat_t      stat,
  input  logic [63:0]   ber_tot,
  input  logic [63:0]   ber_per,
  input  dec_t          dec_tot,
  input  dec_t          dec_per,
  input  logic          ber_valid,
  // error memories
  output logic                          err_ren,
  output logic [$clog2(ERR_DEPTH)-1:0]  err_raddr,
  input  word_t                         err_exp,
  input  word_t                         err_rec,
  // DDR controller
  output logic                          ddr_start,
  output logic [15:0]                   ddr_tx_first,
  output logic [15:0]                   ddr_tx_last,
  output logic [15:0]                   ddr_rx_first,
  input  logic                          ddr_busy,
  input  logic                          ddr_done,
  input  logic [15:0]                   ddr_rx_count,
  output logic [15:0]                   txm_we,
  output logic [$clog2(DDR_DEPTH)-1:0]  txm_addr,
  output logic [127:0]                  txm_wdata,
  output logic                          txm_ren,
  input  logic [127:0]                  txm_rdata,
  output logic                          rxm_ren,
  output logic [$clog2(DDR_DEPTH)-1:0]  rxm_addr,
  input  logic [63:0]                   rxm_rdata
);
  localparam int unsigned EAW = $clog2(ERR_DEPTH);
  localparam int unsigned DAW = $clog2(DDR_DEPTH);

  logic        wr, rd;
  logic [15:0] a;
  logic [7:0]  d;
  logic        pend;
  logic [15:0] a_q;
  logic [7:0]  reg_rd;

  assign wr = (ocp.MCmd == OCP_WR);
  assign rd = (ocp.MCmd == OCP_RD);
  assign a  = ocp.MAddr;
  assign d  = ocp.MData;
  assign ocp.SCmdAccept = 1'b1;

  // ---------------- writable registers ----------------
  always_ff @(posedge ocp.clk or negedge ocp.rst_n)
    if (!ocp.rst_n) begin
      cfg          <= '0;
      cfg.auto_lat <= 1'b1;
      cfg.max_lat  <= MAXLAT_RST;
      phase        <= PHASE_RST;
      delay        <= DELAY_RST;
      ddr_start    <= 1'b0;
      ddr_tx_first <= '0;
      ddr_tx_last  <= '0;
      ddr_rx_first <= '0;
    end else if (wr) begin
      unique case (a)
        A_CTRL:   {cfg.auto_lat, cfg.start} <= d[1:0];
        A_MAXLAT: cfg.max_lat <= d;
        A_MANLAT: cfg.man_lat <= d;
        A_PHASE:  phase <= d[2:0];
        A_DDRCTRL: ddr_start <= d[0];
        default: ;
      endcase
      for (int unsigned c = 0; c < 5; c++)
        if (a == A_DELAY + 16'(c)) delay[3*c +: 3] <= d[2:0];
      for (int unsigned k = 0; k < 4; k++) begin
        if (a == A_NUMPAT  + 16'(k)) cfg.num_pat[8*k +: 8]  <= d;
        if (a == A_STOPERR + 16'(k)) cfg.stop_err[8*k +: 8] <= d;
        if (a == A_PERIOD  + 16'(k)) cfg.period[8*k +: 8]   <= d;
      end
      for (int unsigned k = 0; k < 2; k++) begin
        if (a == A_DDRTXS + 16'(k)) ddr_tx_first[8*k +: 8] <= d;
        if (a == A_DDRTXE + 16'(k)) ddr_tx_last[8*k +: 8]  <= d;
        if (a == A_DDRRXS + 16'(k)) ddr_rx_first[8*k +: 8] <= d;
      end
    end

  // ---------------- memory ports ----------------
  assign err_ren   = rd && a[15:13] == 3'b001;            // 0x2000-0x3FFF
  assign err_raddr = EAW'(a[11:3]);
  assign rxm_ren   = rd && a[15:14] == 2'b01;             // 0x4000-0x7FFF
  assign rxm_addr  = DAW'(a[13:3]);
  assign txm_ren   = rd && a[15];                         // 0x8000-0xFFFF
  assign txm_addr  = DAW'(a[14:4]);
  assign txm_wdata = {16{d}};
  always_comb begin
    txm_we = '0;
    if (wr && a[15]) txm_we[a[3:0]] = 1'b1;
  end

  // ---------------- read data ----------------
  // Bytes 0x00-0x0F are single-byte registers; from 0x10 on, each 8-byte
  // aligned slot holds one little-endian field.
  logic [63:0] fld;
  always_comb begin
    unique case (a_q[15:3])
      13'h0002: fld = {cfg.stop_err, cfg.num_pat};
      13'h0003: fld = 64'(cfg.period);
      13'h0004: fld = 64'(stat.err_words);
      13'h0005: fld = 64'(stat.wrong_bits);
      13'h0006: fld = 64'(stat.tot_bits);
      13'h0007: fld = 64'(stat.err_ptr);
      13'h0008: fld = ber_tot;
      13'h0009: fld = ber_per;
      13'h000A: fld = 64'(dec_tot);  // byte 0 = exponent, bytes 1-5 = mantissa
      13'h000B: fld = 64'(dec_per);
      13'h000C: fld = {ddr_rx_first, ddr_tx_last, ddr_tx_first,
                       6'd0, ddr_done, ddr_busy, 7'd0, ddr_start};
      13'h000D: fld = 64'(ddr_rx_count);
      default:  fld = '0;
    endcase
    unique case (a_q[3:0])
      4'h0: reg_rd = {6'd0, cfg.auto_lat, cfg.start};
      4'h1: reg_rd = {1'b0, ber_valid, stat.running, stat.stopped, stat.done,
                      stat.lat_err, stat.lat_found, locked};
      4'h2: reg_rd = cfg.max_lat;
      4'h3: reg_rd = cfg.man_lat;
      4'h4: reg_rd = stat.latency;
      4'h5: reg_rd = {5'd0, phase};
      4'h6: reg_rd = {5'd0, delay[2:0]};
      4'h7: reg_rd = {5'd0, delay[5:3]};
      4'h8: reg_rd = {5'd0, delay[8:6]};
      4'h9: reg_rd = {5'd0, delay[11:9]};
      4'hA: reg_rd = {5'd0, delay[14:12]};
      default: reg_rd = 8'h00;
    endcase
    if (a_q[15:4] != 12'h000) reg_rd = fld[8*a_q[2:0] +: 8];
  end

  always_ff @(posedge ocp.clk or negedge ocp.rst_n)
    if (!ocp.rst_n) begin
      pend <= 1'b0; a_q <= '0;
    end else begin
      pend <= wr || rd;
      if (wr || rd) a_q <= a;
    end

  always_comb begin
    ocp.SResp = pend ? OCP_DVA : OCP_NULL;
    if (a_q[15])                    ocp.SRespData = txm_rdata[8*a_q[3:0] +: 8];
    else if (a_q[15:14] == 2'b01)   ocp.SRespData = rxm_rdata[8*a_q[2:0] +: 8];
    else if (a_q[15:12] == 4'h2)    ocp.SRespData = 8'(64'(err_exp) >> (8*a_q[2:0]));
    else if (a_q[15:12] == 4'h3)    ocp.SRespData = 8'(64'(err_rec) >> (8*a_q[2:0]));
    else if (a_q[15:12] == 4'h0)    ocp.SRespData = reg_rd;
    else                            ocp.SRespData = 8'h00;
  end
endmodule

// jtag_ctrl: IEEE 1149.1 TAP controller with an OCP master port.
// TCK, TMS, TDI and TRST_N are synchronised into the system clock 'clk' (which
// must run at least 4x faster than TCK); the TAP acts on the detected TCK
// rising edges and updates TDO on the falling edges, so the whole controller
// and its OCP port live in one clock domain. The 16-state TAP machine, a
// 4-bit instruction register and these data registers are provided:
//   BYPASS    4'hF  1 bit
//   IDCODE    4'h2  32 bit, value IDCODE (selected after reset)
//   EXTEST    4'h0, SAMPLE 4'h1: boundary-scan register outside, reached by
//             the bsr_* pins (not used on this testchip)
//   OCP_ADDR  4'h8  16 bit: Update-DR sets the OCP address
//   OCP_WRITE 4'h9  8 bit:  Update-DR writes the byte, address increments
//   OCP_READ  4'hA  9 bit:  Capture-DR loads {valid, last read byte};
//                           Update-DR starts a read, address increments
// The TAP states and the BYPASS/IDCODE/boundary-scan behaviour follow IEEE
// 1149.1 as the document requires; the user instructions mapping JTAG to OCP
// are this design's own (the document only says user commands map to OCP).
module jtag_ctrl
  import tc_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1A5C_0001
) (
  input  logic  tck,
  input  logic  tms,
  input  logic  tdi,
  input  logic  trst_n,
  output logic  tdo,
  output logic  tdo_en,
  // boundary-scan register interface
  output logic  bsr_sel,
  output logic  bsr_capture,
  output logic  bsr_shift,
  output logic  bsr_update,
  output logic  bsr_tdi,
  input  logic  bsr_tdo,
  ocp_if.master ocp
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] I_EXTEST = 4'h0, I_SAMPLE = 4'h1, I_IDCODE = 4'h2,
                         I_OADDR = 4'h8, I_OWRITE = 4'h9, I_OREAD = 4'hA,
                         I_BYPASS = 4'hF;

  logic       clk, rst_n;
  assign clk   = ocp.clk;
  assign rst_n = ocp.rst_n;

  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s, trst_s;
  logic       rise, fall, tmsb, tdib, trst_l;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tck_s <= '0; tms_s <= '1; tdi_s <= '0; trst_s <= '0;
    end else begin
      tck_s  <= {tck_s[1:0], tck};
      tms_s  <= {tms_s[0], tms};
      tdi_s  <= {tdi_s[0], tdi};
      trst_s <= {trst_s[0], trst_n};
    end

  assign rise   = tck_s[1] && !tck_s[2];
  assign fall   = !tck_s[1] && tck_s[2];
  assign tmsb   = tms_s[1];
  assign tdib   = tdi_s[1];
  assign trst_l = !trst_s[1];

  tap_e st, nst;
  always_comb begin
    unique case (st)
      TLR:    nst = tmsb ? TLR    : RTI;
      RTI:    nst = tmsb ? SEL_DR : RTI;
      SEL_DR: nst = tmsb ? SEL_IR : CAP_DR;
      CAP_DR: nst = tmsb ? EX1_DR : SH_DR;
      SH_DR:  nst = tmsb ? EX1_DR : SH_DR;
      EX1_DR: nst = tmsb ? UPD_DR : PA_DR;
      PA_DR:  nst = tmsb ? EX2_DR : PA_DR;
      EX2_DR: nst = tmsb ? UPD_DR : SH_DR;
      UPD_DR: nst = tmsb ? SEL_DR : RTI;
      SEL_IR: nst = tmsb ? TLR    : CAP_IR;
      CAP_IR: nst = tmsb ? EX1_IR : SH_IR;
      SH_IR:  nst = tmsb ? EX1_IR : SH_IR;
      EX1_IR: nst = tmsb ? UPD_IR : PA_IR;
      PA_IR:  nst = tmsb ? EX2_IR : PA_IR;
      EX2_IR: nst = tmsb ? UPD_IR : SH_IR;
      default: nst = tmsb ? SEL_DR : RTI;   // UPD_IR
    endcase
  end

  logic [3:0]  ir, ir_sh;
  logic [31:0] dr;            // shared DR shift register, LSB shifted out
  logic [15:0] addr;
  logic [7:0]  rbyte;
  logic        rvalid, busy, is_rd;
  logic [5:0]  drlen;

  always_comb begin
    unique case (ir)
      I_IDCODE: drlen = 6'd32;
      I_OADDR:  drlen = 6'd16;
      I_OWRITE: drlen = 6'd8;
      I_OREAD:  drlen = 6'd9;
      default:  drlen = 6'd1;
    endcase
  end

  logic bsr_path;
  assign bsr_path = (ir == I_EXTEST) || (ir == I_SAMPLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= TLR; ir <= I_IDCODE; ir_sh <= '0; dr <= '0; addr <= '0;
      tdo <= 1'b0; tdo_en <= 1'b0;
      ocp.MCmd <= OCP_IDLE; ocp.MAddr <= '0; ocp.MData <= '0;
      rbyte <= '0; rvalid <= 1'b0; busy <= 1'b0; is_rd <= 1'b0;
    end else begin
      if (ocp.MCmd != OCP_IDLE && ocp.SCmdAccept) ocp.MCmd <= OCP_IDLE;
      if (busy && ocp.SResp == OCP_DVA) begin
        busy <= 1'b0;
        if (is_rd) begin
          rbyte  <= ocp.SRespData;
          rvalid <= 1'b1;
        end
      end
      if (trst_l) begin
        st <= TLR; ir <= I_IDCODE;
      end else if (rise) begin
        st <= nst;
        unique case (st)
          TLR:    ir <= I_IDCODE;
          CAP_IR: ir_sh <= 4'b0001;
          SH_IR:  ir_sh <= {tdib, ir_sh[3:1]};
          UPD_IR: ir <= ir_sh;
          CAP_DR: begin
            unique case (ir)
              I_IDCODE: dr <= IDCODE;
              I_OADDR:  dr <= 32'(addr);
              I_OREAD:  dr <= 32'({rvalid, rbyte});
              default:  dr <= '0;
            endcase
          end
          SH_DR: begin
            dr <= dr >> 1;
            dr[drlen-1] <= tdib;
          end
          UPD_DR: begin
            unique case (ir)
              I_OADDR: addr <= dr[15:0];
              I_OWRITE: if (!busy) begin
                ocp.MCmd <= OCP_WR; ocp.MAddr <= addr; ocp.MData <= dr[7:0];
                addr <= addr + 1'b1; busy <= 1'b1; is_rd <= 1'b0;
              end
              I_OREAD: if (!busy) begin
                ocp.MCmd <= OCP_RD; ocp.MAddr <= addr;
                addr <= addr + 1'b1; busy <= 1'b1; rvalid <= 1'b0; is_rd <= 1'b1;
              end
              default: ;
            endcase
          end
          default: ;
        endcase
      end else if (fall) begin
        tdo_en <= (st == SH_DR) || (st == SH_IR);
        tdo    <= (st == SH_IR) ? ir_sh[0] : bsr_path ? bsr_tdo : dr[0];
      end
    end

  // boundary-scan register control, valid for one clk at each TCK rising edge
  assign bsr_sel     = bsr_path;
  assign bsr_capture = bsr_path && rise && st == CAP_DR;
  assign bsr_shift   = bsr_path && rise && st == SH_DR;
  assign bsr_update  = bsr_path && rise && st == UPD_DR && ir == I_EXTEST;
  assign bsr_tdi     = tdib;
endmodule

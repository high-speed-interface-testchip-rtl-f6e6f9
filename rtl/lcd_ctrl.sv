// lcd_ctrl: LCD controller showing the two bit error rates on a two-line
// character display: line 1 the total BER, line 2 the BER of the last period,
// each as "d.dddde-XX" (five significant digits, signed two-digit exponent).
// After reset the FSM waits T_PWRUP clocks and initialises the display
// (0x38 function set 8-bit/2 lines, 0x0C display on, 0x01 clear, 0x06 entry
// mode). Whenever 'upd' pulses, both values are latched and, for each line,
// the mantissa goes through lcd_bin2bcd, the leading digit is found, the
// displayed exponent is exp + (number of digits - 1), the digits pass through
// bcd_to_ascii, and the line address command and ten characters are sent with
// lcd_write. An update that arrives while the lines are being written is
// shown after them. Inputs are value = mant * 10^exp, mant 40 bits, exp 8 bits.
// The FSM + lcd_write + bcd_to_ascii structure, the BCD conversion, the
// exponential format and the line contents follow the document; the command
// sequence and the timing are this design's.
module lcd_ctrl
  import tc_pkg::*;
#(
  parameter int unsigned T_PWRUP = 1_600_000,  // 15 ms at 106 MHz
  parameter int unsigned T_EXEC  = 4_300,      // 40 us
  parameter int unsigned T_CLEAR = 175_000,    // 1.64 ms
  parameter int unsigned T_PW    = 25          // E pulse, 236 ns
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dec_t       dec_tot,
  input  dec_t       dec_per,
  input  logic       upd,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [7:0] lcd_db,
  output logic       ready      // initialised and idle
);
  localparam int unsigned ND = 13;
  typedef enum logic [3:0] {
    C_PWR, C_INIT, C_IDLE, C_CONV, C_CONVW, C_ADDR, C_CHAR, C_WAITW
  } st_e;
  st_e st, ret;
  logic [23:0] cnt;
  logic [1:0]  init_i;
  logic        line, pend;
  dec_t        v_tot, v_per, cur;
  logic        w_req, w_rs, w_busy;
  logic [7:0]  w_data;
  logic [23:0] w_wait;
  logic        b_start, b_done;
  logic [4*ND-1:0] bcd;
  logic [3:0]  ci;                 // character index 0..9
  logic [3:0]  nd;                 // number of digits of the mantissa
  logic signed [9:0] edisp;
  logic [6:0]  eabs;
  logic [3:0]  dsel;
  logic [7:0]  dch, chr;

  lcd_write #(.T_PW(T_PW)) u_wr (.clk, .rst_n, .req(w_req), .rs(w_rs), .data(w_data),
    .wait_cyc(w_wait), .busy(w_busy), .lcd_e, .lcd_rs, .lcd_rw, .lcd_db);

  lcd_bin2bcd #(.W(40), .ND(ND)) u_bcd (.clk, .rst_n, .start(b_start), .bin(cur.mant),
    .done(b_done), .bcd);

  // digits and exponent of the current line
  always_comb begin
    nd = 4'd1;
    for (int unsigned k = 0; k < ND; k++) if (bcd[4*k +: 4] != 0) nd = 4'(k + 1);
    edisp = (cur.mant == '0) ? 10'sd0 : 10'(cur.exp) + 10'(nd) - 10'sd1;
    eabs  = (edisp < 0) ? 7'(-edisp) : 7'(edisp);
    if (eabs > 7'd99) eabs = 7'd99;
    // significant digit j (0 = leading) sits at bcd position nd-1-j
    dsel = 4'd0;
    unique case (ci)
      4'd0: dsel = bcd[4*(nd-1) +: 4];
      4'd2, 4'd3, 4'd4, 4'd5:
            dsel = (nd >= ci) ? bcd[4*(nd-ci) +: 4] : 4'd0;
      default: dsel = 4'd0;
    endcase
  end

  bcd_to_ascii u_asc (.bcd(dsel), .ascii(dch));

  always_comb begin
    unique case (ci)
      4'd1:    chr = 8'h2E;                               // '.'
      4'd6:    chr = 8'h65;                               // 'e'
      4'd7:    chr = (edisp < 0) ? 8'h2D : 8'h2B;         // '-' / '+'
      4'd8:    chr = 8'h30 + 8'(eabs / 7'd10);
      4'd9:    chr = 8'h30 + 8'(eabs % 7'd10);
      default: chr = dch;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= C_PWR; ret <= C_PWR; cnt <= '0; init_i <= '0; line <= 1'b0; pend <= 1'b0;
      v_tot <= '0; v_per <= '0; cur <= '0; ci <= '0;
      w_req <= 1'b0; w_rs <= 1'b0; w_data <= '0; w_wait <= '0; b_start <= 1'b0;
    end else begin
      w_req   <= 1'b0;
      b_start <= 1'b0;
      if (upd) begin
        v_tot <= dec_tot; v_per <= dec_per; pend <= 1'b1;
      end
      unique case (st)
        C_PWR: begin
          cnt <= cnt + 1'b1;
          if (cnt == 24'(T_PWRUP - 1)) st <= C_INIT;
        end
        C_INIT: begin
          unique case (init_i)
            2'd0: w_data <= 8'h38;
            2'd1: w_data <= 8'h0C;
            2'd2: w_data <= 8'h01;
            default: w_data <= 8'h06;
          endcase
          w_rs   <= 1'b0;
          w_wait <= (init_i == 2'd2) ? 24'(T_CLEAR) : 24'(T_EXEC);
          w_req  <= 1'b1;
          init_i <= init_i + 1'b1;
          ret    <= (init_i == 2'd3) ? C_IDLE : C_INIT;
          st     <= C_WAITW;
        end
        C_IDLE: if (pend && !upd) begin
          pend <= 1'b0; line <= 1'b0; cur <= v_tot; st <= C_CONV;
        end
        C_CONV: begin
          b_start <= 1'b1; st <= C_CONVW;
        end
        C_CONVW: if (b_done) st <= C_ADDR;
        C_ADDR: begin
          w_rs <= 1'b0; w_data <= line ? 8'hC0 : 8'h80; w_wait <= 24'(T_EXEC);
          w_req <= 1'b1; ci <= '0; ret <= C_CHAR; st <= C_WAITW;
        end
        C_CHAR: begin
          w_rs <= 1'b1; w_data <= chr; w_wait <= 24'(T_EXEC); w_req <= 1'b1;
          st <= C_WAITW;
          if (ci == 4'd9) begin
            if (!line) begin
              line <= 1'b1; ret <= C_CONV;
            end else ret <= C_IDLE;
          end else ret <= C_CHAR;
        end
        default: if (!w_busy && !w_req) begin   // C_WAITW
          if (ret == C_CHAR && st == C_WAITW && w_rs) ci <= ci + 1'b1;
          if (ret == C_CONV) cur <= v_per;
          st <= ret;
        end
      endcase
    end

  assign ready = (st == C_IDLE) && !pend;
endmodule

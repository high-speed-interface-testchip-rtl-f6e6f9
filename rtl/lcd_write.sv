// lcd_write: one write cycle to an HD44780-style character LCD in 8-bit mode.
// On 'req' it drives RS and DB, waits T_SU clocks (address setup), raises E
// for T_PW clocks, lowers it and holds the data T_H clocks, then waits 'wait_cyc'
// clocks for the display to execute the instruction before dropping 'busy'.
// RW is always 0 (write only; the busy flag is not polled).
// The document names this module; the timing and protocol come from the usual
// HD44780-compatible controller interface and are this design's assumption.
module lcd_write #(
  parameter int unsigned T_SU = 2,
  parameter int unsigned T_PW = 25,
  parameter int unsigned T_H  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        rs,
  input  logic [7:0]  data,
  input  logic [23:0] wait_cyc,
  output logic        busy,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic [7:0]  lcd_db
);
  typedef enum logic [2:0] {W_IDLE, W_SU, W_PW, W_H, W_EXEC} st_e;
  st_e st;
  logic [23:0] cnt, wait_q;

  assign lcd_rw = 1'b0;
  assign busy   = (st != W_IDLE) || req;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= W_IDLE; cnt <= '0; wait_q <= '0; lcd_e <= 1'b0; lcd_rs <= 1'b0; lcd_db <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (st)
        W_IDLE: if (req) begin
          lcd_rs <= rs; lcd_db <= data; wait_q <= wait_cyc; cnt <= '0; st <= W_SU;
        end
        W_SU: if (cnt == 24'(T_SU - 1)) begin
          lcd_e <= 1'b1; cnt <= '0; st <= W_PW;
        end
        W_PW: if (cnt == 24'(T_PW - 1)) begin
          lcd_e <= 1'b0; cnt <= '0; st <= W_H;
        end
        W_H: if (cnt == 24'(T_H - 1)) begin
          cnt <= '0; st <= W_EXEC;
        end
        default: if (cnt >= wait_q) st <= W_IDLE;
      endcase
    end
endmodule

// ddr_ctrl: simplified DDR2 / mobile DDR controller for interface testing,
// driving a DFI (DDR PHY Interface) at one 64-bit data word (two 32-bit
// beats) per clock. The transmit memory (2k x 128) holds a script: every
// entry is one DFI cycle
//   [127:64] write data         [63:56] write data mask (1 = masked byte)
//   [55] cs_n [54] ras_n [53] cas_n [52] we_n   [51] cke
//   [50:49] bank  [48:35] address  [34] wrdata_en  [33] rddata_en
//   [15:0] idle: number of NOP cycles (cs_n = 1) to insert after the entry
// On a rising edge of 'start' the programmable address counter steps from
// tx_first to tx_last, one entry per clock plus the idle cycles, then 'done'
// is set until 'start' is cleared. Every read word the PHY returns with
// dfi_rddata_valid is stored in the receive memory (2k x 64) at an address
// counter starting at rx_first; rx_count counts them. The host fills the
// script and reads back the data through tcReg (second ports of both RAMs).
// Memory sizes, script-driven transmit and stored receive data follow the
// document; the entry format and the DFI subset are this design's.
module ddr_ctrl #(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   tx_first,
  input  logic [15:0]   tx_last,
  input  logic [15:0]   rx_first,
  output logic          busy,
  output logic          done,
  output logic [15:0]   rx_count,
  // host side of the memories
  input  logic [15:0]   txm_we,
  input  logic [AW-1:0] txm_addr,
  input  logic [127:0]  txm_wdata,
  input  logic          txm_ren,
  output logic [127:0]  txm_rdata,
  input  logic          rxm_ren,
  input  logic [AW-1:0] rxm_addr,
  output logic [63:0]   rxm_rdata,
  // DFI
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
  typedef enum logic [2:0] {D_IDLE, D_FETCH, D_EXEC, D_WAIT, D_DONE} st_e;
  st_e st;
  logic          start_q, ren;
  logic [AW-1:0] ptr, rptr, rx_ptr;
  logic [127:0]  ent;
  logic [15:0]   wcnt;
  logic          last;

  tc_ram #(.W(128), .DEPTH(DEPTH)) u_txmem (
    .clk, .we(txm_we), .waddr(txm_addr), .wdata(txm_wdata),
    .ren_a(ren), .raddr_a(rptr), .rdata_a(ent),
    .ren_b(txm_ren), .raddr_b(txm_addr), .rdata_b(txm_rdata));

  tc_ram #(.W(64), .DEPTH(DEPTH)) u_rxmem (
    .clk, .we({8{dfi_rddata_valid}}), .waddr(rx_ptr), .wdata(dfi_rddata),
    .ren_a(rxm_ren), .raddr_a(rxm_addr), .rdata_a(rxm_rdata),
    .ren_b(1'b0), .raddr_b('0), .rdata_b());

  assign last = (ptr == AW'(tx_last));
  assign busy = (st != D_IDLE) && (st != D_DONE);
  assign done = (st == D_DONE);

  // fetch the entry at ptr (D_FETCH) or the next one while executing
  always_comb begin
    ren  = 1'b0;
    rptr = ptr;
    if (st == D_FETCH) ren = 1'b1;
    else if ((st == D_EXEC && ent[15:0] == 0 && !last) ||
             (st == D_WAIT && wcnt == 16'd1 && !last)) begin
      ren = 1'b1; rptr = ptr + 1'b1;
    end
  end

  task automatic nop();
    dfi_cs_n <= 1'b1; dfi_ras_n <= 1'b1; dfi_cas_n <= 1'b1; dfi_we_n <= 1'b1;
    dfi_wrdata_en <= 1'b0; dfi_rddata_en <= 1'b0;
  endtask

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= D_IDLE; start_q <= 1'b0; ptr <= '0; wcnt <= '0;
      dfi_address <= '0; dfi_bank <= '0; dfi_cke <= 1'b0; dfi_wrdata <= '0;
      dfi_wrdata_mask <= '0;
      nop();
    end else begin
      start_q <= start;
      unique case (st)
        D_IDLE: begin
          nop();
          if (start && !start_q) begin
            ptr <= AW'(tx_first); st <= D_FETCH;
          end
        end
        D_FETCH: st <= D_EXEC;
        D_EXEC: begin
          dfi_wrdata      <= ent[127:64];
          dfi_wrdata_mask <= ent[63:56];
          dfi_cs_n        <= ent[55];
          dfi_ras_n       <= ent[54];
          dfi_cas_n       <= ent[53];
          dfi_we_n        <= ent[52];
          dfi_cke         <= ent[51];
          dfi_bank        <= ent[50:49];
          dfi_address     <= ent[48:35];
          dfi_wrdata_en   <= ent[34];
          dfi_rddata_en   <= ent[33];
          wcnt            <= ent[15:0];
          if (ent[15:0] != 0)  st <= D_WAIT;
          else if (last)       st <= D_DONE;
          else                 ptr <= ptr + 1'b1;
        end
        D_WAIT: begin
          nop();
          wcnt <= wcnt - 1'b1;
          if (wcnt == 16'd1) begin
            if (last) st <= D_DONE;
            else begin
              ptr <= ptr + 1'b1; st <= D_EXEC;
            end
          end
        end
        default: begin   // D_DONE
          nop();
          if (!start) st <= D_IDLE;
        end
      endcase
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_ptr <= '0; rx_count <= '0;
    end else if (st == D_IDLE && start && !start_q) begin
      rx_ptr <= AW'(rx_first); rx_count <= '0;
    end else if (dfi_rddata_valid) begin
      rx_ptr <= rx_ptr + 1'b1; rx_count <= rx_count + 1'b1;
    end
endmodule

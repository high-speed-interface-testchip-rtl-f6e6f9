// tc_pattgen: tcPattGen, pseudo random pattern generator and comparator.
// Transmit side: sends all-zero words while the test is not started or the
// deserializer PLL is not locked, then the 105-bit training pattern as three
// words, then the TxLFSR stream. Receive side: a cycle counter starts with
// the first training word. In automatic mode a 3-word shift register of the
// received data is compared with the pattern; a match with the last word at
// cycle c gives latency L = c-2 (cycles from sending to receiving a word). If
// no match is seen by cycle max_lat+2 the latency error flag is set and the
// test ends. In manual mode L is the configured man_lat. From cycle L+3 the
// RxLFSR, seeded like the TxLFSR, produces the expected word and each received
// word is compared with it. Per word: words/bits counters, wrong-bit popcount,
// and on a mismatch the expected and received words are written into two
// error memories (write enable = error) while they have room. The test ends
// ('done') after num_pat compared words, or ('stopped') when the erroneous word
// count reaches stop_err (0 disables). Every 'period' words, and at the end,
// the counts are handed to the BER unit with a one-cycle 'ber_trig'.
// Clearing cfg.start returns both sides to idle and clears the counters at the
// next start. Sequence, training, latency search, max latency, stop-at-error
// and error memories follow the document; counter widths, the pattern values
// and the exact cycle conventions are this design's.
module tc_pattgen
  import tc_pkg::*;
#(
  parameter int unsigned ERR_DEPTH = 512,
  localparam int unsigned EAW = $clog2(ERR_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  pg_cfg_t        cfg,
  input  logic           locked,
  output word_t          tx_data,
  input  word_t          rx_data,
  output pg_stat_t       stat,
  output ber_in_t        ber_cnt,
  output logic           ber_trig,
  output word_t          dbg_exp,
  output word_t          dbg_rec,
  // error memory read ports (to tcReg)
  input  logic           mem_ren,
  input  logic [EAW-1:0] mem_raddr,
  output word_t          mem_exp,
  output word_t          mem_rec
);
  typedef enum logic [1:0] {T_IDLE, T_TRAIN, T_RUN}          tx_st_e;
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_CMP, R_END}    rx_st_e;

  tx_st_e tx_st;
  rx_st_e rx_st;
  logic [1:0]  tr_idx;
  logic [9:0]  cyc;
  word_t       sh0, sh1;                // received words c-2, c-1
  word_t       tx_lfsr_w, rx_lfsr_w, err_vec;
  logic        go, pat_match, cmp, err, last_word, stop_hit, fin;
  logic [7:0]  lat_use;
  logic [$clog2(WORD_W+1)-1:0] nwrong;
  logic [CNT_W-1:0] words, per_words;
  logic [EAW:0]     eptr;

  assign go = cfg.start && locked;

  // ---------------- transmit side ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_st <= T_IDLE; tr_idx <= '0;
    end else if (!go) begin
      tx_st <= T_IDLE; tr_idx <= '0;
    end else begin
      unique case (tx_st)
        T_IDLE:  tx_st <= T_TRAIN;
        T_TRAIN: begin
          tr_idx <= tr_idx + 1'b1;
          if (tr_idx == 2'd2) tx_st <= T_RUN;
        end
        default: ;
      endcase
    end

  tc_lfsr #(.W(WORD_W)) u_txlfsr (
    .clk, .rst_n, .init(tx_st == T_IDLE), .en(tx_st == T_RUN), .word(tx_lfsr_w));

  always_comb begin
    unique case (tx_st)
      T_TRAIN: tx_data = (tr_idx == 2'd0) ? TRAIN0 : (tr_idx == 2'd1) ? TRAIN1 : TRAIN2;
      T_RUN:   tx_data = tx_lfsr_w;
      default: tx_data = '0;
    endcase
  end

  // ---------------- receive side ----------------
  assign pat_match = (sh0 == TRAIN0) && (sh1 == TRAIN1) && (rx_data == TRAIN2);
  assign cmp       = (rx_st == R_CMP);
  assign err_vec   = rx_data ^ rx_lfsr_w;
  assign err       = cmp && (err_vec != '0);

  always_comb begin
    nwrong = '0;
    for (int unsigned i = 0; i < WORD_W; i++) nwrong += err_vec[i];
  end

  assign last_word = cmp && (words + 1 == CNT_W'(cfg.num_pat));
  assign stop_hit  = err && (cfg.stop_err != 0) && (stat.err_words + 1 == CNT_W'(cfg.stop_err));
  assign fin       = last_word || stop_hit;

  assign lat_use = stat.latency;

  tc_lfsr #(.W(WORD_W)) u_rxlfsr (
    .clk, .rst_n, .init(rx_st != R_CMP), .en(cmp), .word(rx_lfsr_w));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_st <= R_IDLE; cyc <= '0; sh0 <= '0; sh1 <= '0;
      stat <= '0; words <= '0; per_words <= '0; eptr <= '0;
      ber_cnt <= '0; ber_trig <= 1'b0; dbg_exp <= '0; dbg_rec <= '0;
    end else begin
      sh0 <= sh1;
      sh1 <= rx_data;
      ber_trig <= 1'b0;
      dbg_rec <= rx_data;
      dbg_exp <= cmp ? rx_lfsr_w : '0;
      if (!go) begin
        rx_st <= R_IDLE;
        stat.running <= 1'b0;
      end else begin
        unique case (rx_st)
          R_IDLE: begin                    // first training word goes out now
            rx_st <= R_WAIT; cyc <= '0;
            stat <= '0; words <= '0; per_words <= '0; eptr <= '0; ber_cnt <= '0;
            stat.running <= 1'b1;
            if (!cfg.auto_lat) stat.latency <= cfg.man_lat;
          end
          R_WAIT: begin
            cyc <= cyc + 1'b1;
            if (cfg.auto_lat) begin
              if (pat_match && cyc >= 10'd2) begin
                stat.latency   <= 8'(cyc - 10'd2);
                stat.lat_found <= 1'b1;
                rx_st          <= R_CMP;
              end else if (cyc >= 10'(cfg.max_lat) + 10'd2) begin
                stat.lat_err <= 1'b1;
                stat.running <= 1'b0;
                rx_st        <= R_END;
              end
            end else if (cyc == 10'(lat_use) + 10'd2) begin
              stat.lat_found <= 1'b1;
              rx_st          <= R_CMP;
            end
          end
          R_CMP: begin
            words          <= words + 1'b1;
            per_words      <= per_words + 1'b1;
            stat.tot_bits  <= stat.tot_bits + WORD_W;
            stat.wrong_bits<= stat.wrong_bits + nwrong;
            ber_cnt.per_bits  <= ber_cnt.per_bits + WORD_W;
            ber_cnt.per_wrong <= ber_cnt.per_wrong + nwrong;
            ber_cnt.tot_bits  <= stat.tot_bits + WORD_W;
            ber_cnt.tot_wrong <= stat.wrong_bits + nwrong;
            if (err) begin
              stat.err_words <= stat.err_words + 1'b1;
              if (eptr != (EAW+1)'(ERR_DEPTH)) eptr <= eptr + 1'b1;
            end
            if ((cfg.period != 0 && per_words + 1 == CNT_W'(cfg.period)) || fin) begin
              ber_trig  <= 1'b1;
              per_words <= '0;
            end
            if (fin) begin
              stat.done    <= last_word && !stop_hit;
              stat.stopped <= stop_hit;
              stat.running <= 1'b0;
              rx_st        <= R_END;
            end
          end
          default: ;
        endcase
        // period counters restart after each hand-over to the BER unit
        if (ber_trig) begin
          ber_cnt.per_bits  <= (rx_st == R_CMP) ? CNT_W'(WORD_W) : '0;
          ber_cnt.per_wrong <= (rx_st == R_CMP) ? CNT_W'(nwrong) : '0;
        end
      end
      stat.err_ptr <= 16'(eptr);
    end

  // ---------------- error memories ----------------
  logic we_err;
  assign we_err = err && (eptr != (EAW+1)'(ERR_DEPTH));

  tc_ram #(.W(WORD_W), .DEPTH(ERR_DEPTH)) u_mem_exp (
    .clk, .we({5{we_err}}), .waddr(eptr[EAW-1:0]), .wdata(rx_lfsr_w),
    .ren_a(mem_ren), .raddr_a(mem_raddr), .rdata_a(mem_exp),
    .ren_b(1'b0), .raddr_b('0), .rdata_b());

  tc_ram #(.W(WORD_W), .DEPTH(ERR_DEPTH)) u_mem_rec (
    .clk, .we({5{we_err}}), .waddr(eptr[EAW-1:0]), .wdata(rx_data),
    .ren_a(mem_ren), .raddr_a(mem_raddr), .rdata_a(mem_rec),
    .ren_b(1'b0), .raddr_b('0), .rdata_b());

  a_train_len: assert property (@(posedge clk) disable iff (!rst_n)
    tx_st == T_TRAIN && tr_idx == 2'd2 && go |=> tx_st == T_RUN);
endmodule

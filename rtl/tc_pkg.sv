// tc_pkg: types and constants shared by the LVDS/DDR testchip.
// Holds the link geometry (5 LVDS channels of 7 bits = 35-bit words), the
// training pattern sent before the pseudo random stream, the byte address map
// of the configuration space reached over OCP, and the configuration/status
// bundles passed between tcReg and the pattern generator. The 5x7 geometry
// and the 3-word (105-bit) training pattern length follow the document; the
// pattern values and the register map are this design's own choice.
package tc_pkg;
  localparam int unsigned CHANNELS = 5;
  localparam int unsigned RATIO    = 7;
  localparam int unsigned WORD_W   = CHANNELS * RATIO;   // 35
  localparam int unsigned CNT_W    = 48;                 // error / bit counters

  typedef logic [WORD_W-1:0] word_t;

  // 105-bit training pattern, sent as three 35-bit words.
  localparam word_t TRAIN0 = 35'h5_5555_5555;
  localparam word_t TRAIN1 = 35'h0_F0F0_F0F3;
  localparam word_t TRAIN2 = 35'h3_3CC3_3CC1;

  // OCP commands and responses (subset used by this design).
  typedef enum logic [2:0] {OCP_IDLE = 3'd0, OCP_WR = 3'd1, OCP_RD = 3'd2} ocp_cmd_e;
  typedef enum logic [1:0] {OCP_NULL = 2'd0, OCP_DVA = 2'd1} ocp_resp_e;

  // Register byte addresses.
  localparam logic [15:0] A_CTRL      = 16'h0000; // b0 start, b1 auto latency
  localparam logic [15:0] A_STATUS    = 16'h0001; // RO b0 locked b1 latency found b2 latency error b3 done b4 stopped b5 running b6 BER valid
  localparam logic [15:0] A_MAXLAT    = 16'h0002;
  localparam logic [15:0] A_MANLAT    = 16'h0003;
  localparam logic [15:0] A_LATENCY   = 16'h0004; // RO, computed latency
  localparam logic [15:0] A_PHASE     = 16'h0005; // load-enable phase 0..6
  localparam logic [15:0] A_DELAY     = 16'h0006; // 0x06..0x0A, per channel
  localparam logic [15:0] A_NUMPAT    = 16'h0010; // 32 bit, little endian
  localparam logic [15:0] A_STOPERR   = 16'h0014; // 32 bit, 0 = never stop
  localparam logic [15:0] A_PERIOD    = 16'h0018; // 32 bit, words per BER period
  localparam logic [15:0] A_ERRWORDS  = 16'h0020; // RO 48 bit
  localparam logic [15:0] A_WRONGBITS = 16'h0028; // RO 48 bit
  localparam logic [15:0] A_TOTBITS   = 16'h0030; // RO 48 bit
  localparam logic [15:0] A_ERRPTR    = 16'h0038; // RO 16 bit, error memory entries
  localparam logic [15:0] A_BERTOT    = 16'h0040; // RO 64 bit double
  localparam logic [15:0] A_BERPER    = 16'h0048; // RO 64 bit double
  localparam logic [15:0] A_DECTOT    = 16'h0050; // RO 40 bit mantissa + 8 bit exponent
  localparam logic [15:0] A_DECPER    = 16'h0058; // RO 40 bit mantissa + 8 bit exponent
  localparam logic [15:0] A_DDRCTRL   = 16'h0060; // b0 start
  localparam logic [15:0] A_DDRSTAT   = 16'h0061; // RO b0 busy b1 done
  localparam logic [15:0] A_DDRTXS    = 16'h0062; // 16 bit first TX entry
  localparam logic [15:0] A_DDRTXE    = 16'h0064; // 16 bit last TX entry
  localparam logic [15:0] A_DDRRXS    = 16'h0066; // 16 bit first RX address
  localparam logic [15:0] A_DDRRXC    = 16'h0068; // RO 16 bit RX words stored
  // Memory windows (byte address = base + word*stride + byte lane).
  localparam logic [15:0] W_ERREXP    = 16'h2000; // stride 8
  localparam logic [15:0] W_ERRREC    = 16'h3000; // stride 8
  localparam logic [15:0] W_DDRRX     = 16'h4000; // stride 8
  localparam logic [15:0] W_DDRTX     = 16'h8000; // stride 16

  // Configuration from tcReg to tcPattGen.
  typedef struct packed {
    logic        start;
    logic        auto_lat;
    logic [7:0]  max_lat;
    logic [7:0]  man_lat;
    logic [31:0] num_pat;
    logic [31:0] stop_err;
    logic [31:0] period;
  } pg_cfg_t;

  // Status from tcPattGen to tcReg.
  typedef struct packed {
    logic             running;
    logic             lat_found;
    logic             lat_err;
    logic             done;
    logic             stopped;
    logic [7:0]       latency;
    logic [CNT_W-1:0] err_words;
    logic [CNT_W-1:0] wrong_bits;
    logic [CNT_W-1:0] tot_bits;
    logic [15:0]      err_ptr;
  } pg_stat_t;

  // Counts handed to the BER unit at the end of a period or of the test.
  typedef struct packed {
    logic [CNT_W-1:0] tot_wrong;
    logic [CNT_W-1:0] tot_bits;
    logic [CNT_W-1:0] per_wrong;
    logic [CNT_W-1:0] per_bits;
  } ber_in_t;

  // Decimal BER for display: value = mant * 10^exp.
  typedef struct packed {
    logic [39:0]       mant;
    logic signed [7:0] exp;
  } dec_t;

  // Unsigned integer to IEEE 754 double, exact for values below 2^53.
  function automatic logic [63:0] u2d(input logic [CNT_W-1:0] n);
    int unsigned msb;
    logic [CNT_W-1:0] sh;
    logic [51:0] frac;
    if (n == '0) return 64'd0;
    msb = 0;
    for (int unsigned i = 0; i < CNT_W; i++) if (n[i]) msb = i;
    sh   = n << (CNT_W - 1 - msb);          // leading one at bit CNT_W-1
    frac = {sh[CNT_W-2:0], {(52-(CNT_W-1)){1'b0}}};
    return {1'b0, 11'(1023 + msb), frac};
  endfunction
endpackage

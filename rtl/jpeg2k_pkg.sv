// jpeg2k_pkg: types, constants and small helper functions shared by the
// encoder blocks.
//
// The encoder codes 128x128 tiles with a two-level 5/3 wavelet transform.
// A tile therefore holds seven subbands. With 64x64 code-blocks every
// subband is exactly one code-block, so a code-block is identified by its
// subband. The tile memory is a single-port SRAM of 8K words of 24 bits;
// one word holds two 11-bit sign-magnitude coefficients of horizontally
// adjacent samples (even column in bits [10:0], odd column in [21:11]).
//
// Memory map of one tile buffer (word addresses, 128x128 tile):
//   HL1 0..2047, LH1 2048..4095, HH1 4096..6143,
//   HL2 6144..6655, LH2 6656..7167, HH2 7168..7679, LL2 7680..8191.
// The level-2 subbands together occupy the place of LL1, and LL2 comes last,
// so it is also the last code-block the block coder visits.
//
// Sizes that follow the paper: 128x128 tile, 64x64 code-block, 5/3 filter,
// 11-bit coefficients (sign + 10 magnitude bit-planes), 28 coding passes,
// 8K x 24 bit SRAM, 13-bit long and 7-bit short link pointers.
// The memory map, the subband order and the bit placement are this design's
// own choices.
package jpeg2k_pkg;

  localparam int unsigned SRAM_AW   = 13;   // 8K words
  localparam int unsigned SRAM_DW   = 24;   // word width
  localparam int unsigned COEF_W    = 11;   // sign + 10 magnitude bits
  localparam int unsigned MAG_W     = 10;   // magnitude bit-planes
  localparam int unsigned NUM_PASS  = 28;   // 1 + 3*(MAG_W-1)
  localparam int unsigned NUM_CB    = 7;    // code-blocks per tile
  localparam int unsigned SHORT_PW  = 7;    // short-mode pointer width
  localparam int unsigned LONG_PW   = 13;   // long-mode pointer width
  localparam int unsigned SRAM_LAT  = 2;    // read latency of external SRAM

  // Code-block / subband index, in the order the block coder visits them.
  typedef enum logic [2:0] {
    SB_HL1 = 3'd0,
    SB_LH1 = 3'd1,
    SB_HH1 = 3'd2,
    SB_HL2 = 3'd3,
    SB_LH2 = 3'd4,
    SB_HH2 = 3'd5,
    SB_LL2 = 3'd6
  } subband_e;

  typedef logic [SRAM_AW-1:0] addr_t;
  typedef logic [SRAM_DW-1:0] word_t;
  typedef logic [COEF_W-1:0]  coef_sm_t;  // {sign, magnitude[9:0]}

  // One request of a client to a tile SRAM.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    word_t wdata;
  } sram_req_t;

  // Adaptive link list word. Bit 23 is the type flag.
  //   short (flag 0): [22:16] forward offset to next word, [15:8] first
  //                   byte, [7:0] second byte
  //   long  (flag 1): [22:10] absolute address of next word, [7:0] byte
  function automatic word_t all_short(input logic [SHORT_PW-1:0] off,
                                      input logic [7:0] b0,
                                      input logic [7:0] b1);
    return {1'b0, off, b0, b1};
  endfunction

  function automatic word_t all_long(input addr_t ptr, input logic [7:0] b0);
    return {1'b1, ptr, 2'b00, b0};
  endfunction

  // Packet-header word of one pass stream: byte length and head address.
  function automatic word_t pph_word(input logic [10:0] len, input addr_t head);
    return {len, head};
  endfunction

  // Signed two's-complement coefficient to 11-bit sign-magnitude, saturating
  // the magnitude at 1023.
  function automatic coef_sm_t to_sm(input logic signed [15:0] v);
    logic [15:0] mag;
    mag = v[15] ? 16'(-v) : 16'(v);
    if (mag > 16'd1023) mag = 16'd1023;
    return {v[15], mag[9:0]};
  endfunction

  // Squared synthesis-basis norm of each subband of the reversible 5/3
  // transform, in units of 1/16 (distortion weight of the RDO).
  function automatic logic [7:0] sb_weight(input logic [2:0] cb);
    case (cb)
      3'd0, 3'd1: return 8'd17;   // HL1, LH1 : 1.08
      3'd2:       return 8'd8;    // HH1      : 0.52
      3'd3, 3'd4: return 8'd44;   // HL2, LH2 : 2.75
      3'd5:       return 8'd16;   // HH2      : 1.0
      default:    return 8'd121;  // LL2      : 7.6
    endcase
  endfunction

  // Word address of the first word of code-block cb in a TxT tile.
  function automatic addr_t cb_base(input logic [2:0] cb, input int unsigned t);
    int unsigned w1, w2;
    w1 = t * t / 8;    // words of one level-1 subband
    w2 = t * t / 32;   // words of one level-2 subband
    if (cb < 3) return addr_t'(int'(cb) * w1);
    else        return addr_t'(3 * w1 + (int'(cb) - 3) * w2);
  endfunction

  // Width (= height) in samples of code-block cb in a TxT tile.
  function automatic int unsigned cb_dim(input logic [2:0] cb, input int unsigned t);
    return (cb < 3) ? t / 2 : t / 4;
  endfunction

endpackage

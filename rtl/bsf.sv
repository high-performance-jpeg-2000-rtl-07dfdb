// bsf: bit stream formation. Turns the coded tile left in a tile SRAM into
// the final codestream.
//
// Parts (as in the paper's BSF block diagram):
//   header table     constant main-header and tile-header pieces chosen by
//                    the state (main header only before the first tile, end
//                    marker after the last one)
//   packet header    reads the 28 PPH words of a code-block and emits each
//   analyzer         pass stream length as a two-byte packet-header field
//   bit stream       reads the adaptive-link-list words of each non-empty
//   analyzer         pass stream, extracts the one or two bytes of a word and
//                    the pointer (7-bit offset or 13-bit address) of the next
//   packet AG        forms the next SRAM address from the analyzers' results
//   sequencer        bsf_sequencer, packs pieces into 24-bit output words
// Because the next address depends on the word just read and the external
// SRAM answers after LAT cycles, one word is analysed every LAT cycles: the
// request for the next word leaves in the cycle the current one arrives.
//
// Code-blocks are visited in memory order (HL1, LH1, HH1, HL2, LH2, HH2,
// LL2); within one, the streams in embedded order: stream 0 is the cleanup
// pass of the most significant plane, then significance, refinement and
// cleanup of each lower plane.
// Codestream layout (this design's own, simplified; not a standard packet
// syntax): [SOC, SIZ(len, width, height, tile size)] on the first tile;
// SOT, tile index, SOD; per code-block 28 two-byte lengths then the bytes of
// the non-empty streams; EOC after the last tile.
module bsf
  import jpeg2k_pkg::*;
#(
  parameter int unsigned T   = 128,
  parameter int unsigned LAT = SRAM_LAT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        first_tile,
  input  logic        last_tile,
  input  logic [15:0] tile_idx,
  input  logic [15:0] img_w,
  input  logic [15:0] img_h,
  output logic        busy,
  output logic        done,
  // tile SRAM read port (exclusive while busy)
  output logic        req,
  output addr_t       addr,
  input  word_t       rdata,
  // codestream
  output logic        oe,
  output logic [23:0] codestream,
  output logic [15:0] n_words      // words analysed in this tile
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_PPH, S_BS, S_EOC, S_FLUSH, S_WAITF} state_e;
  state_e st;

  // ---------------- header table ----------------
  typedef struct packed { logic last; logic [1:0] n; logic [23:0] d; } piece_t;
  function automatic piece_t hdr_piece(input logic main, input logic [3:0] i,
                                       input logic [15:0] t, input logic [15:0] w,
                                       input logic [15:0] h);
    piece_t p;
    p = '{last: 1'b0, n: 2'd2, d: 24'h0};
    if (main) begin
      case (i)
        4'd0: p.d = 24'h00FF4F;          // SOC
        4'd1: p.d = 24'h00FF51;          // SIZ
        4'd2: p.d = 24'h00000A;          // its length
        4'd3: p.d = {8'h0, w};
        4'd4: p.d = {8'h0, h};
        4'd5: p.d = 24'(T);
        4'd6: p.d = 24'h00FF90;          // SOT
        4'd7: p.d = {8'h0, t};
        default: begin p.d = 24'h00FF93; p.last = 1'b1; end  // SOD
      endcase
    end else begin
      case (i)
        4'd0: p.d = 24'h00FF90;
        4'd1: p.d = {8'h0, t};
        default: begin p.d = 24'h00FF93; p.last = 1'b1; end
      endcase
    end
    return p;
  endfunction

  // ---------------- state ----------------
  logic        first_q, last_q;
  logic [15:0] tile_q, w_q, h_q;
  logic [3:0]  hi;
  logic [2:0]  cb;
  logic [4:0]  s;
  logic [1:0]  wc;            // latency counter
  logic        waiting;
  addr_t       ptr;
  logic [10:0] rem;
  logic [10:0] slen [NUM_PASS];
  addr_t       shead [NUM_PASS];

  addr_t pph_at;
  always_comb begin
    addr_t end_a;
    end_a = (cb == 3'(NUM_CB - 1)) ? addr_t'(T * T / 2 - 1) : cb_base(cb + 3'd1, T) - 1'b1;
    pph_at = end_a - addr_t'(NUM_PASS - 1);
  end

  piece_t hp;
  assign hp = hdr_piece(first_q, hi, tile_q, w_q, h_q);

  // piece to the sequencer
  logic        pv;
  logic [1:0]  pn;
  logic [23:0] pd;
  logic        fl, flushed;

  // word arrives this cycle
  logic  arrive;
  assign arrive = waiting && wc == 2'(LAT - 1);

  // bit stream analyzer: bytes used from the arriving word, next address,
  // and whether the current stream ends here (or is empty)
  logic [10:0] used_c;
  addr_t       next_c;
  logic        next_stream;
  always_comb begin
    used_c = (!rdata[23] && rem >= 11'd2) ? 11'd2 : 11'd1;
    next_c = rdata[23] ? rdata[22:10] : ptr + addr_t'(rdata[22:16]);
    next_stream = (!waiting && slen[s] == 0) || (arrive && rem == used_c);
  end

  always_comb begin
    pv = 1'b0; pn = 2'd1; pd = '0;
    req = 1'b0; addr = '0;
    case (st)
      S_HDR: begin pv = 1'b1; pn = hp.n; pd = hp.d; end
      S_PPH: begin
        req = !waiting; addr = pph_at + addr_t'(s);
        if (arrive) begin
          pv = 1'b1; pn = 2'd2; pd = {13'h0, rdata[23:13]};
          // the next PPH word is asked for in the cycle this one arrives
          req = s != 5'(NUM_PASS - 1); addr = pph_at + addr_t'(s) + 1'b1;
        end
      end
      S_BS: begin
        req = !waiting && slen[s] != 0; addr = ptr;
        if (arrive) begin
          // packet AG: next word of the same stream, straight from the pointer
          req  = rem != used_c;
          addr = next_c;
          pv = 1'b1;
          if (!rdata[23] && rem >= 11'd2) begin pn = 2'd2; pd = {8'h0, rdata[15:0]}; end
          else if (!rdata[23])            begin pn = 2'd1; pd = {16'h0, rdata[15:8]}; end
          else                            begin pn = 2'd1; pd = {16'h0, rdata[7:0]}; end
        end
      end
      S_EOC: begin pv = 1'b1; pn = 2'd2; pd = 24'h00FFD9; end
      default: ;
    endcase
  end

  assign fl   = (st == S_FLUSH);
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      first_q <= 1'b0; last_q <= 1'b0; tile_q <= '0; w_q <= '0; h_q <= '0;
      hi <= '0; cb <= '0; s <= '0; wc <= '0; waiting <= 1'b0; ptr <= '0; rem <= '0;
      n_words <= '0;
      for (int i = 0; i < NUM_PASS; i++) begin slen[i] <= '0; shead[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (req) begin waiting <= 1'b1; wc <= '0; end
      else if (waiting) begin
        wc <= wc + 2'd1;
        if (arrive) waiting <= 1'b0;
      end
      if (arrive) n_words <= n_words + 16'd1;
      case (st)
        S_IDLE: if (start) begin
          st <= S_HDR; hi <= '0; cb <= '0; s <= '0; n_words <= '0;
          first_q <= first_tile; last_q <= last_tile;
          tile_q <= tile_idx; w_q <= img_w; h_q <= img_h;
        end
        S_HDR: begin
          hi <= hi + 4'd1;
          if (hp.last) begin st <= S_PPH; s <= '0; end
        end
        S_PPH: if (arrive) begin
          slen[s]  <= rdata[23:13];
          shead[s] <= rdata[12:0];
          if (s == 5'(NUM_PASS - 1)) begin
            st <= S_BS; s <= '0;
            ptr <= (rdata[23:13] != 0 && NUM_PASS == 1) ? rdata[12:0] : shead[0];
            rem <= (NUM_PASS == 1) ? rdata[23:13] : slen[0];
          end else s <= s + 5'd1;
        end
        S_BS: begin
          if (arrive) begin
            rem <= rem - used_c;
            ptr <= next_c;
          end
          if (next_stream) begin
            if (s == 5'(NUM_PASS - 1)) begin
              s <= '0;
              if (cb == 3'(NUM_CB - 1)) st <= last_q ? S_EOC : S_FLUSH;
              else begin cb <= cb + 3'd1; st <= S_PPH; end
            end else begin
              s <= s + 5'd1;
              ptr <= shead[s + 5'd1];
              rem <= slen[s + 5'd1];
            end
          end
        end
        S_EOC:   st <= S_FLUSH;
        S_FLUSH: st <= S_WAITF;
        default: if (flushed) begin st <= S_IDLE; done <= 1'b1; end  // S_WAITF
      endcase
    end
  end

  bsf_sequencer u_seq (
    .clk, .rst_n, .in_valid(pv), .in_nbytes(pn), .in_data(pd), .flush(fl),
    .oe, .codestream, .flushed
  );
endmodule

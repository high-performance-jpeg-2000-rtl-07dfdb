// psw_ag: parallel-to-serial write address generator with adaptive link list
// (ALL) addressing.
//
// The block coder produces 28 independent pass bit streams of one code-block
// at once, up to five bytes per cycle. The bytes are written back into the
// words of the same code-block whose coefficients have already been read
// (and, if those run out, into an overflow area growing downwards), so the
// place of every byte is only known when it appears. Each stream is a linked
// list of 24-bit words; the word type flag selects the layout:
//   short (flag 0): 7-bit forward offset to the stream's next word + 2 bytes
//   long  (flag 1): 13-bit absolute address of the next word     + 1 byte
// A stream keeps its current word address and at most one pending byte.
// When a second byte arrives a new word is allocated for the stream; if it
// lies 1..127 words ahead the current word is written in short mode with
// both bytes, otherwise in long mode with the first byte (the second stays
// pending). At the end of the code-block (flush) every pending byte is
// written as a short word with offset 0, and the packed packet header (PPH)
// is written at the top of the code-block's area: one word per stream,
// {length in bytes [23:13], head address [12:0]}, stream 0 at pph_base.
//
// Space rule: a fresh word is taken from the main area (upwards from base,
// below the words the reader has consumed, up to the PPH once the reader is
// finished); if none is free there, from the overflow area (downwards from
// ovf_top, at most ovf_cnt words: the free tail of an earlier code-block's
// area; ovf_load replaces the region when it is used up and ovf_more says
// another one will come). If neither has a word the byte waits while the
// reader is still running or another region is coming; otherwise the
// stream is truncated instead: the
// byte and all later bytes of that stream are dropped (n_drop counts them)
// and the stream ends with what is already stored.
//
// Interface: start latches the area; in_valid/in_byte/in_sid carry up to
// five bytes per cycle (accepted when in_ready), lane 0 first; flush is
// accepted when the last bytes have been given; done pulses when the PPH is
// in memory. Writes go out through req/addr/wdata, one per grant.
// The word format and its 7/13-bit pointers, the five-byte input, writing
// into consumed coefficient words, overflow into other subbands and the PPH
// at the end of the area follow the paper; the allocation rule, the PPH
// word layout and the terminator (offset 0) are this design's own.
module psw_ag
  import jpeg2k_pkg::*;
#(
  parameter int unsigned LANES = 5,
  parameter int unsigned QD    = 4     // write queue depth
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  addr_t                 base,       // first word of the code-block
  input  addr_t                 pph_base,   // PPH place (area end - 27)
  input  addr_t                 ovf_top,    // first overflow word (grows down)
  input  addr_t                 ovf_cnt,    // overflow words available
  input  logic                  ovf_load,   // new overflow region
  input  logic                  ovf_more,   // a further region will follow
  output logic                  ovf_empty,
  output addr_t                 ovf_next,   // next overflow word
  output addr_t                 ovf_rest,   // overflow words left
  input  addr_t                 free_lim,   // words below are consumed
  input  logic                  all_free,   // reader finished the code-block
  // byte input
  input  logic [LANES-1:0]      in_valid,
  input  logic [LANES-1:0][7:0] in_byte,
  input  logic [LANES-1:0][4:0] in_sid,
  output logic                  in_ready,
  input  logic                  flush,
  output logic                  done,
  // memory side
  output logic                  req,
  output addr_t                 addr,
  output word_t                 wdata,
  input  logic                  gnt,
  // statistics
  output logic [15:0]           n_short,
  output logic [15:0]           n_long,
  output logic [15:0]           n_ovf,
  output logic [15:0]           n_drop,
  output logic [15:0]           n_wait,
  output addr_t                 used_end    // first main word not used
);
  // ---------------- write queue ----------------
  typedef struct packed { addr_t a; word_t d; } wr_t;
  wr_t q [QD];
  logic [$clog2(QD):0] qn;
  logic [$clog2(QD)-1:0] qh, qt;
  logic push;
  wr_t  push_d;
  assign req   = qn != 0;
  assign addr  = q[qh].a;
  assign wdata = q[qh].d;
  wire  pop    = req && gnt;
  wire  q_room = (qn < ($clog2(QD)+1)'(QD)) || pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qn <= '0; qh <= '0; qt <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      if (push) begin q[qt] <= push_d; qt <= qt + 1'b1; end
      if (pop) qh <= qh + 1'b1;
      qn <= qn + ($clog2(QD)+1)'(push) - ($clog2(QD)+1)'(pop);
    end
  end

  // ---------------- stream state ----------------
  logic        started [NUM_PASS];
  logic        has     [NUM_PASS];
  logic [7:0]  pend    [NUM_PASS];
  addr_t       cur     [NUM_PASS];
  addr_t       head    [NUM_PASS];
  logic [10:0] len     [NUM_PASS];

  logic        dropped [NUM_PASS];
  addr_t       alloc_ptr, ovf_ptr, pph_q, ovf_left;
  logic [LANES-1:0]      bmask;      // bytes still to process
  logic [LANES-1:0][7:0] bbyte;
  logic [LANES-1:0][4:0] bsid;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DRAIN} state_e;
  state_e st;
  logic [4:0] fs;        // stream being flushed
  logic       fphase;    // 0: pending byte, 1: PPH word
  logic       flush_q;

  // byte selected this cycle: lowest lane still set
  int unsigned lane;
  always_comb begin
    lane = 0;
    for (int i = LANES - 1; i >= 0; i--) if (bmask[i]) lane = i;
  end

  // allocation of a fresh word
  addr_t lim;
  logic  use_main, space;
  addr_t fresh;
  always_comb begin
    lim      = all_free ? pph_q : free_lim;
    use_main = alloc_ptr < lim;
    space    = use_main || ovf_left != '0;
    fresh    = use_main ? alloc_ptr : ovf_ptr;
  end
  assign used_end  = alloc_ptr;
  assign ovf_empty = ovf_left == '0;
  assign ovf_next  = ovf_ptr;
  assign ovf_rest  = ovf_left;

  logic [7:0] b;
  logic [4:0] s;
  addr_t      gap;
  logic       short_ok;
  always_comb begin
    b = bbyte[lane];
    s = bsid[lane];
    gap = fresh - cur[s];
    short_ok = (fresh > cur[s]) && (gap < addr_t'(1 << SHORT_PW));
  end

  assign in_ready = (st == S_RUN) && bmask == '0;

  // Flush step of stream fs.
  logic flush_write;
  assign flush_write = fphase ? 1'b1 : (started[fs] && has[fs]);

  always_comb begin
    push = 1'b0;
    push_d = '0;
    if (st == S_RUN && bmask != '0 && q_room && started[s] && has[s] && !dropped[s] && space) begin
      push = 1'b1;
      push_d.a = cur[s];
      push_d.d = short_ok ? all_short(SHORT_PW'(gap), pend[s], b) : all_long(fresh, pend[s]);
    end else if (st == S_FLUSH && q_room && flush_write) begin
      push = 1'b1;
      if (fphase) begin
        push_d.a = pph_q + addr_t'(fs);
        push_d.d = pph_word(started[fs] ? len[fs] : 11'd0, head[fs]);
      end else begin
        push_d.a = cur[fs];
        push_d.d = all_short('0, pend[fs], 8'h00);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; flush_q <= 1'b0;
      alloc_ptr <= '0; ovf_ptr <= '0; pph_q <= '0;
      bmask <= '0; bbyte <= '0; bsid <= '0; fs <= '0; fphase <= 1'b0;
      n_short <= '0; n_long <= '0; n_ovf <= '0; n_drop <= '0; n_wait <= '0; ovf_left <= '0;
      for (int i = 0; i < NUM_PASS; i++) begin
        dropped[i] <= 1'b0;
        started[i] <= 1'b0; has[i] <= 1'b0; pend[i] <= '0;
        cur[i] <= '0; head[i] <= '0; len[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (ovf_load) begin ovf_ptr <= ovf_top; ovf_left <= ovf_cnt; end
      case (st)
        S_IDLE: if (start) begin
          st <= S_RUN; flush_q <= 1'b0;
          alloc_ptr <= base; ovf_ptr <= ovf_top; pph_q <= pph_base; ovf_left <= ovf_cnt;
          for (int i = 0; i < NUM_PASS; i++) begin
            dropped[i] <= 1'b0;
            started[i] <= 1'b0; has[i] <= 1'b0; len[i] <= '0;
          end
        end
        S_RUN: begin
          if (flush) flush_q <= 1'b1;
          if (in_ready && in_valid != '0) begin
            bmask <= in_valid; bbyte <= in_byte; bsid <= in_sid;
          end else if (bmask != '0) begin
            // one byte per cycle
            if (dropped[s]) begin
              n_drop <= n_drop + 1'b1;
              bmask[lane] <= 1'b0;
            end else if ((!started[s] || has[s]) && !space) begin
              // no free word: wait for the reader, or truncate the stream
              if (all_free && !ovf_more) begin
                dropped[s] <= 1'b1; n_drop <= n_drop + 1'b1;
                bmask[lane] <= 1'b0;
              end else n_wait <= n_wait + 1'b1;
            end else if (!started[s]) begin
              started[s] <= 1'b1; has[s] <= 1'b1; pend[s] <= b;
              cur[s] <= fresh; head[s] <= fresh; len[s] <= 11'd1;
              if (use_main) alloc_ptr <= alloc_ptr + 1'b1;
              else begin ovf_ptr <= ovf_ptr - 1'b1; ovf_left <= ovf_left - 1'b1; n_ovf <= n_ovf + 1'b1; end
              bmask[lane] <= 1'b0;
            end else if (!has[s]) begin
              has[s] <= 1'b1; pend[s] <= b; len[s] <= len[s] + 1'b1;
              bmask[lane] <= 1'b0;
            end else if (q_room) begin
              cur[s] <= fresh;
              len[s] <= len[s] + 1'b1;
              if (use_main) alloc_ptr <= alloc_ptr + 1'b1;
              else begin ovf_ptr <= ovf_ptr - 1'b1; ovf_left <= ovf_left - 1'b1; n_ovf <= n_ovf + 1'b1; end
              if (short_ok) begin has[s] <= 1'b0; n_short <= n_short + 1'b1; end
              else begin pend[s] <= b; n_long <= n_long + 1'b1; end
              bmask[lane] <= 1'b0;
            end
          end else if (flush_q || flush) begin
            st <= S_FLUSH; fs <= '0; fphase <= 1'b0;
          end
        end
        S_FLUSH: if (q_room || !flush_write) begin
          if (!fphase && flush_write) n_short <= n_short + 1'b1;
          if (fphase) begin
            fphase <= 1'b0;
            if (fs == 5'(NUM_PASS - 1)) st <= S_DRAIN;
            else fs <= fs + 5'd1;
          end else fphase <= 1'b1;
        end
        default: if (qn == 0) begin   // S_DRAIN
          st <= S_IDLE; done <= 1'b1;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> q_room);
endmodule

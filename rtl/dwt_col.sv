// dwt_col: vertical (column) 1-D 5/3 lifting wavelet transform of a stream
// of row-transformed lines.
//
// Input: one row-transformed pair {L, H} per cycle for column pair n of row
// r (rows of M lines, N/2 pairs per line, the order dwt_row produces). Both
// columns of a pair are filtered vertically at once, so every output is a
// 2x2 quad of the four subbands:
//   LL = vertical low of L,  HL = vertical low of H,
//   LH = vertical high of L, HH = vertical high of H.
//
// Line buffers (one entry per column pair, two coefficients per entry):
//   ebuf  row 2m (data buffer),
//   obuf  row 2m+1 (data buffer),
//   hbuf  vertical highpass of row 2m-1 (temporal buffer).
// When even row 2m+2 arrives, H(2m+1) and L(2m) are computed and quad row m
// is emitted; the final odd row M-1 completes the last quad row with the
// mirrored row M-2. Symmetric extension at the top uses H(-1) = H(1).
//
// Timing: one registered stage; a quad appears the cycle after the input
// pair that completes it. Quads are produced during rows 2,4,...,M-2 and M-1.
// The filter and the split into data and temporal buffers follow the paper;
// the paper's 1.5-line data buffer relies on an access scheme it does not
// describe, so this unit keeps whole lines (three buffers of N/2 entries).
module dwt_col #(
  parameter int unsigned N = 128,   // line length in samples (even, >= 4)
  parameter int unsigned M = 128,   // number of lines (even, >= 4)
  parameter int unsigned W = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_l,
  input  logic signed [W-1:0]  in_h,
  output logic                 out_valid,
  output logic [$clog2(M/2)-1:0] out_m,   // quad row
  output logic [$clog2(N/2)-1:0] out_n,   // quad column
  output logic signed [W-1:0]  out_ll,
  output logic signed [W-1:0]  out_hl,
  output logic signed [W-1:0]  out_lh,
  output logic signed [W-1:0]  out_hh,
  output logic                 out_last   // final quad of the tile
);
  localparam int unsigned NP = N / 2;
  localparam int unsigned PW = $clog2(NP);
  localparam int unsigned RW = $clog2(M);

  typedef struct packed {
    logic signed [W-1:0] l;
    logic signed [W-1:0] h;
  } pair_t;

  pair_t ebuf [NP];
  pair_t obuf [NP];
  pair_t hbuf [NP];

  logic [PW-1:0] n;
  logic [RW-1:0] r;

  // 5/3 lifting on one column given rows e (2m), o (2m+1), nx (2m+2), and
  // the previous highpass hp (H(2m-1)).
  function automatic logic signed [W-1:0] hi_f(input logic signed [W-1:0] e,
                                                input logic signed [W-1:0] o,
                                                input logic signed [W-1:0] nx);
    logic signed [W:0] s;
    s = (W+1)'(e) + (W+1)'(nx);
    return o - W'(s >>> 1);
  endfunction
  function automatic logic signed [W-1:0] lo_f(input logic signed [W-1:0] e,
                                                input logic signed [W-1:0] hp,
                                                input logic signed [W-1:0] hc);
    logic signed [W:0] s;
    s = (W+1)'(hp) + (W+1)'(hc) + (W+1)'(2);
    return e + W'(s >>> 2);
  endfunction

  pair_t e_rd, o_rd, h_rd, cur;
  pair_t odd_src, nxt_src, hv, hprev, lv;
  logic  last_row, even_row, emit;
  always_comb begin
    e_rd = ebuf[n];
    o_rd = obuf[n];
    h_rd = hbuf[n];
    cur  = '{l: in_l, h: in_h};
    last_row = (r == RW'(M - 1));
    even_row = !r[0];
    emit = in_valid && ((even_row && r != '0) || last_row);
    // At the last (odd) row the incoming line is the odd one and the row
    // below it mirrors to row M-2.
    odd_src = last_row ? cur  : o_rd;
    nxt_src = last_row ? e_rd : cur;
    hv.l = hi_f(e_rd.l, odd_src.l, nxt_src.l);
    hv.h = hi_f(e_rd.h, odd_src.h, nxt_src.h);
    // The first quad row mirrors H(-1) to H(1).
    hprev = ((last_row && r == RW'(1)) || r == RW'(2)) ? hv : h_rd;
    lv.l = lo_f(e_rd.l, hprev.l, hv.l);
    lv.h = lo_f(e_rd.h, hprev.h, hv.h);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (even_row) ebuf[n] <= cur;
      else if (!last_row) obuf[n] <= cur;
      if (even_row && r != '0) hbuf[n] <= hv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; r <= '0;
      out_valid <= 1'b0; out_m <= '0; out_n <= '0; out_last <= 1'b0;
      out_ll <= '0; out_hl <= '0; out_lh <= '0; out_hh <= '0;
    end else begin
      out_valid <= emit;
      out_last  <= emit && last_row && n == PW'(NP - 1);
      if (emit) begin
        out_ll <= lv.l; out_hl <= lv.h; out_lh <= hv.l; out_hh <= hv.h;
        out_n  <= n;
        out_m  <= last_row ? ($clog2(M/2))'((M - 2) / 2) : ($clog2(M/2))'((r - RW'(2)) >> 1);
      end
      if (in_valid) begin
        if (n == PW'(NP - 1)) begin
          n <= '0;
          r <= (r == RW'(M - 1)) ? '0 : r + RW'(1);
        end else begin
          n <= n + PW'(1);
        end
      end
    end
  end
endmodule

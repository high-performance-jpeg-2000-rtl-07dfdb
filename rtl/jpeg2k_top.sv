// jpeg2k_top: JPEG 2000 tile encoder core with precompression rate-distortion
// optimisation.
//
// Three units form a tile-level pipeline around two off-chip single-port
// tile SRAMs (8K x 24 bit each, read latency LAT):
//   DWT   two-level line-based 5/3 transform, two pixels per cycle, each
//         pixel read once and each coefficient written once (dwt_2level,
//         dwt_packer), observed by the RDO
//   RDO   decides the cut bit-plane of every code-block from the DWT output,
//         before any coding (rdo)
//   EBC   reads the cut coefficients in stripe order (psr_ag), hands them to
//         the block coder engine, and writes the engine's 28 pass bit
//         streams back into the same SRAM with adaptive link-list addressing
//         (psw_ag), the two sharing the SRAM through mem_arbiter; ebc_ctrl
//         walks the seven code-blocks
//   BSF   turns a coded tile into the output codestream (bsf)
// main_control runs the stages (BSF then DWT on one bank, EBC on the other)
// and sram_ag routes each unit to its bank.
//
// The block coder engine itself (context formation and arithmetic coding of
// all bit-planes of a coefficient per cycle) is not part of this RTL: its
// ports are brought out (ebc_*). It must take coefficients through
// ebc_c_valid/ebc_c_ready (stripe scan, cut already applied, ebc_planes
// nonzero planes), deliver up to five bytes per cycle tagged with their pass
// stream (0 = cleanup pass of the top plane, then significance, refinement
// and cleanup of each lower plane) and pulse ebc_cb_coded when the current
// code-block is complete.
//
// Interface: pulse go with tiles_total (0 = endless); pixels arrive as pairs
// in raster order of each tile (pix_valid/pix_ready) into a 16-entry input
// FIFO (io_fifo), which drops pix_ready when full: between tiles, and when
// the DWT's word queues fill up and stop draining it; the codestream
// leaves as 24-bit words with cs_oe. finished pulses when all tiles are out.
// n_skip counts code-blocks the RDO discarded whole (never sent to the
// coder). n_short/n_long/n_ovf/n_wait/n_drop count link words, overflow words,
// cycles the stream writer waited for free words and bytes dropped for lack
// of memory (only when a block's output does not fit at all).
module jpeg2k_top
  import jpeg2k_pkg::*;
#(
  parameter int unsigned T   = 128,
  parameter int unsigned LAT = SRAM_LAT
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                go,
  input  logic [15:0]         tiles_total,
  input  logic [15:0]         lambda,
  input  logic [15:0]         img_w,
  input  logic [15:0]         img_h,
  output logic                finished,
  // pixels
  input  logic                pix_valid,
  output logic                pix_ready,
  input  logic [7:0]          pix_p0,
  input  logic [7:0]          pix_p1,
  // block coder engine
  output logic                ebc_c_valid,
  input  logic                ebc_c_ready,
  output coef_sm_t            ebc_c_data,
  output logic                ebc_c_last,
  output logic [2:0]          ebc_cb,
  output logic [3:0]          ebc_planes,
  input  logic [4:0]          ebc_b_valid,
  input  logic [4:0][7:0]     ebc_b_byte,
  input  logic [4:0][4:0]     ebc_b_sid,
  output logic                ebc_b_ready,
  input  logic                ebc_cb_coded,
  // tile SRAMs
  output sram_req_t           sram [2],
  input  word_t               sram_rdata [2],
  // codestream
  output logic                cs_oe,
  output logic [23:0]         cs_data,
  // statistics
  output logic [15:0]         n_short,
  output logic [15:0]         n_long,
  output logic [15:0]         n_ovf,
  output logic [15:0]         n_drop,
  output logic [15:0]         n_wait,
  output logic [15:0]         n_skip,
  output logic [15:0]         stage_count
);
  // ---------------- control ----------------
  logic        dwt_start, dwt_en, dwt_done, rdo_decide, rdo_decided;
  logic        ebc_start, ebc_done, bsf_start, bsf_en, bsf_done;
  logic [15:0] dwt_tile, ebc_tile, bsf_tile;
  logic        bsf_first, bsf_last, bank_x, x_is_dwt, rdo_bank;

  logic       px_valid, px_ready;   // pixel pairs leaving the input FIFO
  logic [7:0] px_p0, px_p1;

  main_control u_ctrl (
    .clk, .rst_n, .go, .tiles_total, .tile_avail(px_valid),
    .dwt_start, .dwt_en, .dwt_done, .rdo_decide, .rdo_decided, .dwt_tile,
    .ebc_start, .ebc_done, .ebc_tile,
    .bsf_start, .bsf_en, .bsf_done, .bsf_tile, .bsf_first, .bsf_last,
    .bank_x, .x_is_dwt, .rdo_bank, .finished, .stage_count
  );

  // ---------------- pixel input FIFO ----------------
  logic [4:0] px_count_unused;
  io_fifo #(.W(16), .DEPTH(16)) u_pix_fifo (
    .clk, .rst_n, .in_valid(pix_valid), .in_ready(pix_ready), .in_data({pix_p1, pix_p0}),
    .out_valid(px_valid), .out_ready(px_ready), .out_data({px_p1, px_p0}),
    .count(px_count_unused)
  );

  // ---------------- DWT ----------------
  logic [$clog2(T*T/2):0] pix_cnt;
  logic                   pk_afull;
  logic                   pix_open;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt <= '0; pix_open <= 1'b0;
    end else begin
      if (dwt_start) begin pix_open <= 1'b1; pix_cnt <= '0; end
      else if (px_valid && px_ready) begin
        if (pix_cnt == ($clog2(T*T/2)+1)'(T * T / 2 - 1)) pix_open <= 1'b0;
        pix_cnt <= pix_cnt + 1'b1;
      end
    end
  end
  assign px_ready = pix_open && !pk_afull;

  logic                   l1_valid, l2_valid, dwt_last_unused;
  logic [$clog2(T/2)-1:0] l1_m, l1_n;
  logic [$clog2(T/4)-1:0] l2_m, l2_n;
  logic signed [11:0]     l1_hl, l1_lh, l1_hh;
  logic signed [13:0]     l2_ll, l2_hl, l2_lh, l2_hh;

  dwt_2level #(.T(T)) u_dwt (
    .clk, .rst_n, .in_valid(px_valid && px_ready), .in_p0(px_p0), .in_p1(px_p1),
    .l1_valid, .l1_m, .l1_n, .l1_hl, .l1_lh, .l1_hh,
    .l2_valid, .l2_m, .l2_n, .l2_ll, .l2_hl, .l2_lh, .l2_hh, .done(dwt_last_unused)
  );

  logic       dw_valid;
  addr_t      dw_addr;
  word_t      dw_data;
  logic [2:0] dw_cb;
  coef_sm_t   dw_c0, dw_c1;

  dwt_packer #(.T(T)) u_pack (
    .clk, .rst_n, .l1_valid, .l1_m, .l1_n, .l1_hl, .l1_lh, .l1_hh,
    .l2_valid, .l2_m, .l2_n, .l2_ll, .l2_hl, .l2_lh, .l2_hh,
    .wr_valid(dw_valid), .wr_addr(dw_addr), .wr_data(dw_data), .wr_cb(dw_cb),
    .wr_c0(dw_c0), .wr_c1(dw_c1), .done(dwt_done), .almost_full(pk_afull)
  );

  // ---------------- RDO ----------------
  logic [3:0] rdo_cut, rdo_planes;
  logic       rdo_busy;
  rdo u_rdo (
    .clk, .rst_n, .en(dwt_en), .obs_valid(dw_valid), .obs_cb(dw_cb), .obs_c0(dw_c0), .obs_c1(dw_c1),
    .decide(rdo_decide), .acc_bank(dwt_tile[0]), .lambda, .busy(rdo_busy), .decided(rdo_decided),
    .rd_bank(rdo_bank), .rd_cb(ebc_cb), .rd_cut(rdo_cut), .rd_planes(rdo_planes)
  );

  // ---------------- EBC memory interface ----------------
  logic       psr_start, psr_done, psr_busy, psr_req, psr_gnt;
  addr_t      psr_base, psr_addr, free_lim;
  logic [6:0] psr_dim;
  logic [3:0] psr_cut;
  logic       psw_start, psw_flush, psw_done, psw_req, psw_gnt, all_free;
  addr_t      psw_pph, psw_ovf, psw_addr, psw_ovf_cnt, psw_used, psw_ovf_next, psw_ovf_left;
  logic       psw_ovf_load, psw_ovf_more, psw_ovf_empty, cb_skip;

  // code-blocks discarded whole by the RDO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_skip <= '0;
    else if (psw_done && cb_skip) n_skip <= n_skip + 1'b1;
  end
  word_t      psw_wdata, ebc_rdata;
  sram_req_t  ebc_mem;

  ebc_ctrl #(.T(T)) u_ebc_ctrl (
    .clk, .rst_n, .start(ebc_start), .done(ebc_done),
    .cb(ebc_cb), .rdo_cut, .rdo_planes, .planes(ebc_planes),
    .psr_start, .psr_base, .psr_dim, .psr_cut, .psr_done,
    .psw_start, .psw_pph, .psw_ovf, .psw_ovf_cnt, .psw_used, .psw_ovf_load, .psw_ovf_more,
    .psw_ovf_empty, .psw_ovf_next, .psw_ovf_left, .psw_flush, .psw_done, .all_free,
    .cb_coded(ebc_cb_coded), .skip(cb_skip)
  );

  psr_ag #(.LAT(LAT)) u_psr (
    .clk, .rst_n, .start(psr_start), .base(psr_base), .dim(psr_dim), .cut(psr_cut),
    .busy(psr_busy), .done(psr_done),
    .req(psr_req), .addr(psr_addr), .gnt(psr_gnt), .rdata(ebc_rdata), .free_lim,
    .c_valid(ebc_c_valid), .c_ready(ebc_c_ready), .c_data(ebc_c_data), .c_last(ebc_c_last)
  );

  psw_ag u_psw (
    .clk, .rst_n, .start(psw_start), .base(psr_base), .pph_base(psw_pph), .ovf_top(psw_ovf), .ovf_cnt(psw_ovf_cnt), .used_end(psw_used),
    .ovf_load(psw_ovf_load), .ovf_more(psw_ovf_more), .ovf_empty(psw_ovf_empty), .ovf_next(psw_ovf_next), .ovf_rest(psw_ovf_left),
    .free_lim, .all_free,
    .in_valid(ebc_b_valid), .in_byte(ebc_b_byte), .in_sid(ebc_b_sid), .in_ready(ebc_b_ready),
    .flush(psw_flush), .done(psw_done),
    .req(psw_req), .addr(psw_addr), .wdata(psw_wdata), .gnt(psw_gnt),
    .n_short, .n_long, .n_ovf, .n_drop, .n_wait
  );

  mem_arbiter u_arb (
    .clk, .rst_n,
    .r_req(psr_req), .r_addr(psr_addr), .r_gnt(psr_gnt),
    .w_req(psw_req), .w_addr(psw_addr), .w_data(psw_wdata), .w_gnt(psw_gnt),
    .mem(ebc_mem)
  );

  // ---------------- BSF ----------------
  logic  bsf_req, bsf_busy;
  addr_t bsf_addr;
  word_t bsf_rdata;
  logic [15:0] bsf_words_unused;

  bsf #(.T(T), .LAT(LAT)) u_bsf (
    .clk, .rst_n, .start(bsf_start), .first_tile(bsf_first), .last_tile(bsf_last),
    .tile_idx(bsf_tile), .img_w, .img_h, .busy(bsf_busy), .done(bsf_done),
    .req(bsf_req), .addr(bsf_addr), .rdata(bsf_rdata),
    .oe(cs_oe), .codestream(cs_data), .n_words(bsf_words_unused)
  );

  // ---------------- SRAM routing ----------------
  sram_ag u_sag (
    .bank_x, .x_is_dwt,
    .dwt_we(dw_valid), .dwt_addr(dw_addr), .dwt_wdata(dw_data),
    .bsf_req(bsf_req && bsf_en), .bsf_addr, .bsf_rdata,
    .ebc(ebc_mem), .ebc_rdata,
    .sram, .sram_rdata
  );
endmodule

// jpeg2k_harness: end-to-end test bench body for jpeg2k_top, shared by the
// reduced-size and the full-size test.
//
// TILES synthetic tiles (gradients, texture and noise) are streamed in with
// random gaps. Two SRAM models stand in for the tile memories and ebc_model
// for the block coder engine. The harness checks:
//   * every code-block's coefficients, as the coder receives them, equal the
//     reference two-level 5/3 transform in stripe-scan order, cut at one
//     common bit-plane (the cut the RDO chose), with the plane count right;
//   * the output codestream parses as main header, tile headers, per
//     code-block 28 lengths followed by the stream bytes, and end marker,
//     and every stream's bytes equal those the coder produced;
//   * the mechanisms all occur: pixel-input stalls, coder back-pressure,
//     arbiter contention, short and long link words, overflow words, writer
//     waits for free words, RDO cuts, code-blocks discarded whole by the
//     RDO (checked to hold no bit above the cut), and DWT and BSF each running at the
//     same time as the coder (DWT and BSF share one memory and take turns);
//   * no byte was dropped for lack of memory.
module jpeg2k_harness
  import jpeg2k_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int unsigned T     = 64,
  parameter int unsigned TILES = 3
) (
  output int checks,
  output int failures,
  output bit done
);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go = 0, finished, pix_valid = 0, pix_ready;
  logic [15:0] tiles_total = 16'(TILES), lambda, img_w = 16'(T), img_h = 16'(T * TILES);
  logic [7:0] pix_p0 = 0, pix_p1 = 0;
  logic ebc_c_valid, ebc_c_ready, ebc_c_last, ebc_b_ready, ebc_cb_coded, cs_oe;
  coef_sm_t ebc_c_data;
  logic [2:0] ebc_cb;
  logic [3:0] ebc_planes;
  logic [4:0] ebc_b_valid;
  logic [4:0][7:0] ebc_b_byte;
  logic [4:0][4:0] ebc_b_sid;
  sram_req_t sram [2];
  word_t sram_rdata [2];
  logic [23:0] cs_data;
  logic [15:0] n_short, n_long, n_ovf, n_drop, n_wait, n_skip, stage_count;

  initial begin checks = 0; failures = 0; done = 0; end

  // the full-size run uses the top module exactly at its defaults
  if (T == 128) begin : g_dut
    jpeg2k_top dut (.*);
  end else begin : g_dut
    jpeg2k_top #(.T(T)) dut (.*);
  end

  sram_model u_sa (.clk, .r(sram[0]), .rdata(sram_rdata[0]));
  sram_model u_sb (.clk, .r(sram[1]), .rdata(sram_rdata[1]));

  ebc_model u_ebc (
    .clk, .rst_n, .c_valid(ebc_c_valid), .c_ready(ebc_c_ready), .c_data(ebc_c_data),
    .c_last(ebc_c_last), .planes(ebc_planes), .b_valid(ebc_b_valid), .b_byte(ebc_b_byte),
    .b_sid(ebc_b_sid), .b_ready(ebc_b_ready), .cb_coded(ebc_cb_coded)
  );

  // lambda per tile: tile k is decided during stage k
  // (tile 0 lossless, tile 1 mild, tile 2 strong so that blocks are discarded)
  always_comb lambda = (stage_count == 0) ? 16'd0 : (stage_count == 1) ? 16'd40 : 16'd4000;

  // ---------------- reference ----------------
  int pix [TILES][];
  int refc [TILES][NUM_CB][$];      // signed coefficients in stripe order

  function automatic void scan(input int band[], input int dim, inout int q[$]);
    for (int s = 0; s < dim / 4; s++)
      for (int c = 0; c < dim; c++)
        for (int r = 0; r < 4; r++) q.push_back(band[(4 * s + r) * dim + c]);
  endfunction

  initial begin
    for (int t = 0; t < TILES; t++) begin
      int sh[], ll1[], hl1[], lh1[], hh1[], ll2[], hl2[], lh2[], hh2[];
      pix[t] = new[T*T];
      sh = new[T*T];
      for (int y = 0; y < T; y++)
        for (int x = 0; x < T; x++) begin
          int v;
          case (t % 4)
            0: v = (x * 255) / T + int'($urandom_range(0, 3));
            1: v = ((x / 16 + y / 16) % 2) * 160 + (y * 64) / T + int'($urandom_range(0, 7));
            2: v = 128 + ((x - T / 2) * (y - T / 2)) / (T / 4) + int'($urandom_range(0, 15));
            default: v = 90;   // flat: all detail subbands are zero
          endcase
          if (v > 255) v = 255;
          if (v < 0) v = 0;
          pix[t][y*T + x] = v;
          sh[y*T + x] = v - 128;
        end
      dwt2d(sh, T, ll1, hl1, lh1, hh1);
      dwt2d(ll1, T/2, ll2, hl2, lh2, hh2);
      scan(hl1, T/2, refc[t][0]); scan(lh1, T/2, refc[t][1]); scan(hh1, T/2, refc[t][2]);
      scan(hl2, T/4, refc[t][3]); scan(lh2, T/4, refc[t][4]); scan(hh2, T/4, refc[t][5]);
      scan(ll2, T/4, refc[t][6]);
    end
  end

  // ---------------- pixel source ----------------
  int px_t = 0, px_k = 0;
  int n_pix_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_valid && pix_ready) begin
      if (px_k == T*T/2 - 1) begin px_k = 0; px_t++; end else px_k++;
    end
    if (pix_valid && !pix_ready) n_pix_stall++;
    if (px_t < TILES) begin
      pix_valid <= ($urandom_range(0, 9) != 0);
      pix_p0 <= 8'(pix[px_t][2*px_k]);
      pix_p1 <= 8'(pix[px_t][2*px_k + 1]);
    end else pix_valid <= 1'b0;
  end

  // ---------------- coefficient check per code-block ----------------
  int cb_t = 0, cb_i = 0, n_cut = 0;
  byte unsigned expb [TILES][NUM_CB][NUM_PASS][$];
  // one event per code-block: the stream writer finishing it
  int n_skipped = 0;
  bit coded_seen = 0;
  always @(posedge clk) if (rst_n && ebc_cb_coded) coded_seen = 1;
  always @(posedge clk) if (rst_n && g_dut.dut.psw_done) begin
    int cfound, n, orv, pl;
    n = u_ebc.got.size();
    orv = 0;
    foreach (refc[cb_t][cb_i][i]) orv |= (refc[cb_t][cb_i][i] < 0 ? -refc[cb_t][cb_i][i] : refc[cb_t][cb_i][i]);
    checks++;
    if (g_dut.dut.cb_skip) begin
      // discarded whole: the coder saw nothing and the cut is above all bits
      n_skipped++;
      if (coded_seen || n != 0 || (orv >> g_dut.dut.u_ebc_ctrl.psr_cut) != 0) begin
        failures++; $display("tile %0d cb %0d: wrongly skipped", cb_t, cb_i);
      end
    end else if (n != refc[cb_t][cb_i].size()) begin
      failures++; $display("tile %0d cb %0d: %0d coefficients, expected %0d", cb_t, cb_i, n, refc[cb_t][cb_i].size());
    end else begin
      cfound = -1;
      for (int c = 0; c <= 10 && cfound < 0; c++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < n && ok; i++) begin
          int v, m;
          coef_sm_t e;
          v = refc[cb_t][cb_i][i];
          m = (v < 0) ? -v : v;
          if (m > 1023) m = 1023;
          m = (c >= 10) ? 0 : (m & ~((1 << c) - 1));
          e = {(v < 0) && (m != 0), 10'(m)};
          if (u_ebc.got[i] != e) ok = 0;
        end
        if (ok) cfound = c;
      end
      checks++;
      if (cfound < 0) begin
        int shown;
        shown = 0;
        failures++;
        $display("tile %0d cb %0d: coefficients differ from the reference", cb_t, cb_i);
        for (int i = 0; i < n && shown < 4; i++)
          if (u_ebc.got[i][9:0] != 10'(refc[cb_t][cb_i][i] < 0 ? -refc[cb_t][cb_i][i] : refc[cb_t][cb_i][i])) begin
            $display("  index %0d: got %h reference %0d", i, u_ebc.got[i], refc[cb_t][cb_i][i]);
            shown++;
          end
      end
      else if (cfound > 0) n_cut++;
    end
    if (orv > 1023) orv = 1023;
    pl = 0;
    for (int b = 0; b < 10; b++) if ((orv >> b) & 1) pl = b + 1;
    checks++;
    if (int'(ebc_planes) != pl) begin failures++; $display("tile %0d cb %0d: planes %0d exp %0d", cb_t, cb_i, ebc_planes, pl); end
    coded_seen = 0;
    for (int s = 0; s < NUM_PASS; s++) begin
      expb[cb_t][cb_i][s] = u_ebc.rec[s];
      u_ebc.rec[s].delete();
    end
    u_ebc.got.delete();
    if (cb_i == NUM_CB - 1) begin cb_i = 0; cb_t++; end else cb_i++;
  end

  // ---------------- mechanism counters ----------------
  int n_contest = 0, n_ebc_stall = 0, n_overlap = 0, n_overlap_b = 0;
  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.psr_req && g_dut.dut.psw_req) n_contest++;
    if (ebc_c_valid && !ebc_c_ready) n_ebc_stall++;
    if (pix_valid && pix_ready && ebc_c_valid) n_overlap++;
    if (cs_oe && ebc_c_valid) n_overlap_b++;
  end

  // ---------------- codestream ----------------
  byte unsigned cs [$];
  always @(posedge clk) if (rst_n && cs_oe) begin
    cs.push_back(cs_data[23:16]); cs.push_back(cs_data[15:8]); cs.push_back(cs_data[7:0]);
  end

  function automatic int rd16(inout int p);
    int v;
    v = (int'(cs[p]) << 8) | int'(cs[p+1]);
    p += 2;
    return v;
  endfunction

  task automatic expect16(inout int p, input int v, input string what);
    int g;
    g = rd16(p);
    checks++;
    if (g != v) begin failures++; $display("codestream %s: %h expected %h at %0d", what, g, v, p - 2); end
  endtask

  task automatic parse();
    int p;
    p = 0;
    expect16(p, 16'hFF4F, "SOC"); expect16(p, 16'hFF51, "SIZ"); expect16(p, 10, "Lsiz");
    expect16(p, T, "width"); expect16(p, T * TILES, "height"); expect16(p, T, "tile size");
    for (int t = 0; t < TILES; t++) begin
      expect16(p, 16'hFF90, "SOT"); expect16(p, t, "tile index"); expect16(p, 16'hFF93, "SOD");
      for (int b = 0; b < NUM_CB; b++) begin
        int lens [NUM_PASS];
        for (int s = 0; s < NUM_PASS; s++) begin
          lens[s] = rd16(p);
          checks++;
          if (lens[s] != expb[t][b][s].size()) begin
            failures++; $display("tile %0d cb %0d stream %0d: length %0d expected %0d", t, b, s, lens[s], expb[t][b][s].size());
          end
        end
        for (int s = 0; s < NUM_PASS; s++) begin
          int bad;
          bad = 0;
          for (int k = 0; k < lens[s]; k++) begin
            if (k < expb[t][b][s].size() && cs[p] != expb[t][b][s][k]) bad++;
            p++;
          end
          if (lens[s] != 0) begin
            checks++;
            if (bad != 0) begin failures++; $display("tile %0d cb %0d stream %0d: %0d bytes differ", t, b, s, bad); end
          end
        end
      end
      if (t != TILES - 1) p = ((p + 2) / 3) * 3;   // tiles end on a word boundary
    end
    expect16(p, 16'hFFD9, "EOC");
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
    t0 = $time;
    while (!finished) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("%0d tiles of %0dx%0d in %0d cycles", TILES, T, T, ($time - t0) / 10);
    parse();
    $display("mechanisms: pixel stalls %0d, coder stalls %0d, arbiter contests %0d, short %0d, long %0d, overflow %0d, writer waits %0d, dropped bytes %0d, cut blocks %0d, discarded blocks %0d, DWT/EBC overlap %0d, BSF/EBC overlap %0d",
             n_pix_stall, n_ebc_stall, n_contest, n_short, n_long, n_ovf, n_wait, n_drop, n_cut, n_skipped, n_overlap, n_overlap_b);
    checks++; if (n_pix_stall == 0) begin failures++; $display("no pixel stall"); end
    checks++; if (n_ebc_stall == 0) begin failures++; $display("no coder stall"); end
    checks++; if (n_contest == 0)   begin failures++; $display("no arbiter contest"); end
    checks++; if (n_short == 0)     begin failures++; $display("no short word"); end
    checks++; if (n_long == 0)      begin failures++; $display("no long word"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("no overflow word"); end
    checks++; if (n_skipped == 0 || n_skipped != int'(n_skip)) begin failures++; $display("blocks skipped: %0d, counter %0d", n_skipped, n_skip); end
    checks++; if (n_drop != 0)      begin failures++; $display("bytes dropped"); end
    checks++; if (n_cut == 0)       begin failures++; $display("no RDO cut"); end
    checks++; if (n_overlap == 0)   begin failures++; $display("DWT and EBC never overlapped"); end
    checks++; if (n_overlap_b == 0) begin failures++; $display("BSF and EBC never overlapped"); end
    checks++; if (n_wait == 0)      begin failures++; $display("writer never waited"); end
    checks++; if (cb_t != TILES)    begin failures++; $display("%0d tiles coded", cb_t); end
    done = 1;
  end
endmodule

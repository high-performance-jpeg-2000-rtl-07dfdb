// tb_dwt_2level: two random tiles through the two-level DWT. Level-1 highpass
// quads and level-2 quads are compared with a reference two-level 5/3
// transform of the level-shifted pixels; counts of both quad streams and
// the done pulse per tile are checked, as is the throughput (the tile is
// finished a few cycles after its last pixel pair).
module tb_dwt_2level;
  import dwt_ref_pkg::*;
  localparam int T = 16, TILES = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [7:0] in_p0 = 0, in_p1 = 0;
  logic l1_valid, l2_valid, done;
  logic [$clog2(T/2)-1:0] l1_m, l1_n;
  logic [$clog2(T/4)-1:0] l2_m, l2_n;
  logic signed [11:0] l1_hl, l1_lh, l1_hh;
  logic signed [13:0] l2_ll, l2_hl, l2_lh, l2_hh;
  int checks = 0, failures = 0;

  dwt_2level #(.T(T)) dut (.*);

  int pix [TILES][];
  int ll1 [TILES][], hl1 [TILES][], lh1 [TILES][], hh1 [TILES][];
  int ll2 [TILES][], hl2 [TILES][], lh2 [TILES][], hh2 [TILES][];
  int t1 = 0, t2 = 0, n1 = 0, n2 = 0, ndone = 0, cyc = 0, in_end = 0, done_cyc = 0;

  initial begin
    for (int t = 0; t < TILES; t++) begin
      int sh[];
      pix[t] = new[T*T];
      sh = new[T*T];
      foreach (pix[t][k]) begin
        pix[t][k] = (t == 0) ? ((k % 3 == 0) ? 255 : 0) : int'($urandom_range(0, 255));
        sh[k] = pix[t][k] - 128;
      end
      dwt2d(sh, T, ll1[t], hl1[t], lh1[t], hh1[t]);
      dwt2d(ll1[t], T/2, ll2[t], hl2[t], lh2[t], hh2[t]);
    end
  end

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (l1_valid) begin
      int k;
      k = l1_m * T/2 + l1_n;
      checks++;
      if (k != n1 || int'(l1_hl) != hl1[t1][k] || int'(l1_lh) != lh1[t1][k] || int'(l1_hh) != hh1[t1][k]) begin
        failures++;
        $display("L1 tile %0d k %0d", t1, k);
      end
      if (n1 == T*T/4 - 1) begin n1 = 0; t1++; end else n1++;
    end
    if (l2_valid) begin
      int k;
      k = l2_m * T/4 + l2_n;
      checks++;
      if (k != n2 || int'(l2_ll) != ll2[t2][k] || int'(l2_hl) != hl2[t2][k] ||
          int'(l2_lh) != lh2[t2][k] || int'(l2_hh) != hh2[t2][k]) begin
        failures++;
        $display("L2 tile %0d k %0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", t2, k, l2_ll, l2_hl, l2_lh, l2_hh,
                 ll2[t2][k], hl2[t2][k], lh2[t2][k], hh2[t2][k]);
      end
      if (n2 == T*T/16 - 1) begin n2 = 0; t2++; end else n2++;
    end
    if (done) begin ndone++; done_cyc = cyc; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++)
      for (int k = 0; k < T*T/2; k++) begin
        in_valid <= 1; in_p0 <= 8'(pix[t][2*k]); in_p1 <= 8'(pix[t][2*k+1]);
        @(posedge clk);
      end
    in_valid <= 0;
    in_end = cyc;
    repeat (12) @(posedge clk);
    checks++;
    if (t1 != TILES || t2 != TILES || ndone != TILES) begin
      failures++; $display("tiles l1=%0d l2=%0d done=%0d", t1, t2, ndone);
    end
    checks++;
    if (done_cyc - in_end > 8) begin failures++; $display("tail latency %0d", done_cyc - in_end); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dwt_col: feeds dwt_col an image of random {L, H} pairs line by line
// and checks every quad against a vertical 5/3 lifting of each column,
// including the mirrored first and last quad rows, the quad positions and
// the end-of-image flag. Two images are sent back to back.
module tb_dwt_col;
  import dwt_ref_pkg::*;
  localparam int N = 8, M = 8, W = 12, IMGS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [W-1:0] in_l = 0, in_h = 0;
  logic out_valid, out_last;
  logic [$clog2(M/2)-1:0] out_m;
  logic [$clog2(N/2)-1:0] out_n;
  logic signed [W-1:0] out_ll, out_hl, out_lh, out_hh;
  int checks = 0, failures = 0;

  dwt_col #(.N(N), .M(M), .W(W)) dut (.*);

  int dl [IMGS][M][N/2], dh [IMGS][M][N/2];
  int ell [IMGS][M/2][N/2], ehl [IMGS][M/2][N/2], elh [IMGS][M/2][N/2], ehh [IMGS][M/2][N/2];
  int img = 0, nquad = 0;

  initial begin
    for (int i = 0; i < IMGS; i++) begin
      for (int r = 0; r < M; r++)
        for (int c = 0; c < N/2; c++) begin
          dl[i][r][c] = int'($urandom_range(0, 600)) - 300;
          dh[i][r][c] = int'($urandom_range(0, 600)) - 300;
        end
      for (int c = 0; c < N/2; c++) begin
        int v[], lo[], hi[];
        v = new[M];
        for (int r = 0; r < M; r++) v[r] = dl[i][r][c];
        lift1d(v, lo, hi);
        for (int r = 0; r < M/2; r++) begin ell[i][r][c] = lo[r]; elh[i][r][c] = hi[r]; end
        for (int r = 0; r < M; r++) v[r] = dh[i][r][c];
        lift1d(v, lo, hi);
        for (int r = 0; r < M/2; r++) begin ehl[i][r][c] = lo[r]; ehh[i][r][c] = hi[r]; end
      end
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int m, n;
    m = out_m; n = out_n;
    checks++;
    if (int'(out_ll) != ell[img][m][n] || int'(out_hl) != ehl[img][m][n] ||
        int'(out_lh) != elh[img][m][n] || int'(out_hh) != ehh[img][m][n] ||
        (m * N/2 + n) != nquad) begin
      failures++;
      $display("img %0d quad %0d (m=%0d n=%0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d", img, nquad, m, n,
               out_ll, out_hl, out_lh, out_hh, ell[img][m][n], ehl[img][m][n], elh[img][m][n], ehh[img][m][n]);
    end
    checks++;
    if (out_last != (nquad == M/2*N/2 - 1)) begin failures++; $display("out_last wrong at %0d", nquad); end
    if (nquad == M/2*N/2 - 1) begin nquad = 0; img++; end else nquad++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < IMGS; i++)
      for (int r = 0; r < M; r++)
        for (int c = 0; c < N/2; c++) begin
          in_valid <= 1; in_l <= W'(dl[i][r][c]); in_h <= W'(dh[i][r][c]);
          @(posedge clk);
        end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (img != IMGS) begin failures++; $display("only %0d images out", img); end
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

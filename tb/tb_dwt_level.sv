// tb_dwt_level: one-level 2-D DWT of two random images streamed back to back
// (two pixels per cycle, no gaps); every quad is compared with a reference
// row-then-column 5/3 lifting. Also checks that the quad count is complete
// and that the last quad comes within a few cycles of the last input.
module tb_dwt_level;
  import dwt_ref_pkg::*;
  localparam int N = 16, W = 12, IMGS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [W-1:0] in_x0 = 0, in_x1 = 0;
  logic out_valid, out_last;
  logic [$clog2(N/2)-1:0] out_m, out_n;
  logic signed [W-1:0] out_ll, out_hl, out_lh, out_hh;
  int checks = 0, failures = 0;

  dwt_level #(.N(N), .M(N), .W(W)) dut (.*);

  int pix [IMGS][];
  int ll [IMGS][], hl [IMGS][], lh [IMGS][], hh [IMGS][];
  int img = 0, nq = 0, last_in_cyc = 0, last_out_cyc = 0, cyc = 0;

  initial begin
    for (int i = 0; i < IMGS; i++) begin
      pix[i] = new[N*N];
      foreach (pix[i][k]) pix[i][k] = int'($urandom_range(0, 255)) - 128;
      dwt2d(pix[i], N, ll[i], hl[i], lh[i], hh[i]);
    end
  end

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int k;
    k = out_m * N/2 + out_n;
    checks++;
    if (k != nq || int'(out_ll) != ll[img][k] || int'(out_hl) != hl[img][k] ||
        int'(out_lh) != lh[img][k] || int'(out_hh) != hh[img][k]) begin
      failures++;
      $display("img %0d quad %0d/%0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", img, k, nq,
               out_ll, out_hl, out_lh, out_hh, ll[img][k], hl[img][k], lh[img][k], hh[img][k]);
    end
    if (out_last) begin
      last_out_cyc = cyc;
      img++; nq = 0;
    end else nq++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < IMGS; i++)
      for (int k = 0; k < N*N/2; k++) begin
        in_valid <= 1; in_x0 <= W'(pix[i][2*k]); in_x1 <= W'(pix[i][2*k+1]);
        @(posedge clk);
      end
    in_valid <= 0;
    last_in_cyc = cyc;
    repeat (6) @(posedge clk);
    checks++;
    if (img != IMGS) begin failures++; $display("only %0d images", img); end
    checks++;
    if (last_out_cyc - last_in_cyc > 4) begin failures++; $display("latency %0d", last_out_cyc - last_in_cyc); end
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

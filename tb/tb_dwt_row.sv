// tb_dwt_row: drives several rows of random samples through dwt_row,
// back to back, and compares every output pair with the reference lifting.
// Also checks that all N/2 outputs of a row arrive and that the unit keeps
// pace with one input pair per cycle.
module tb_dwt_row;
  import dwt_ref_pkg::*;
  localparam int N = 16, W = 12, ROWS = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [W-1:0] in_x0 = 0, in_x1 = 0;
  logic out_valid;
  logic signed [W-1:0] out_l, out_h;
  logic [$clog2(N/2)-1:0] out_n;
  int checks = 0, failures = 0;

  dwt_row #(.N(N), .W(W)) dut (.*);

  int data [ROWS][N];
  int explo [ROWS][N/2], exphi [ROWS][N/2];
  int orow = 0, ocol = 0;

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      int v[], lo[], hi[];
      v = new[N];
      for (int c = 0; c < N; c++) begin
        data[r][c] = (r == 0) ? ((c % 2) ? 255 : -256) : int'($urandom_range(0, 511)) - 256;
        v[c] = data[r][c];
      end
      lift1d(v, lo, hi);
      for (int c = 0; c < N/2; c++) begin explo[r][c] = lo[c]; exphi[r][c] = hi[c]; end
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_l) != explo[orow][ocol] || int'(out_h) != exphi[orow][ocol] || int'(out_n) != ocol) begin
      failures++;
      $display("row %0d pair %0d: got L=%0d H=%0d n=%0d exp L=%0d H=%0d",
               orow, ocol, out_l, out_h, out_n, explo[orow][ocol], exphi[orow][ocol]);
    end
    if (ocol == N/2 - 1) begin ocol = 0; orow++; end else ocol++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < N/2; k++) begin
        in_valid <= 1; in_x0 <= W'(data[r][2*k]); in_x1 <= W'(data[r][2*k+1]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (orow != ROWS) begin failures++; $display("only %0d rows out", orow); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

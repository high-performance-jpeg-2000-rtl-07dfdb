// tb_psr_ag: reads code-blocks of several sizes from a memory model with a
// two-cycle read latency, under random grants and random back-pressure, and
// checks every emitted coefficient (stripe scan order, RDO cut applied, sign
// cleared on zero), the last flag and the coefficient count. With grants and
// ready always high it checks the rate of one coefficient per cycle.
module tb_psr_ag;
  import jpeg2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, gnt, c_ready;
  addr_t base = 0, addr, free_lim;
  logic [6:0] dim = 0;
  logic [3:0] cut = 0;
  logic busy, done, req, c_valid, c_last;
  word_t rdata;
  coef_sm_t c_data;
  int checks = 0, failures = 0;

  psr_ag dut (.*);

  word_t mem [1024];
  word_t rq [2];
  logic  rv [2];
  logic  free_gnt = 0;   // 1: grant and ready always high
  always @(posedge clk) begin
    rv[1] <= rv[0]; rq[1] <= rq[0];
    rv[0] <= req && gnt; rq[0] <= mem[addr[9:0]];
  end
  assign rdata = rq[1];
  always @(negedge clk) begin
    gnt     <= free_gnt ? 1'b1 : ($urandom_range(0, 3) != 0);
    c_ready <= free_gnt ? 1'b1 : ($urandom_range(0, 4) != 0);
  end

  int seen;
  initial begin
    foreach (mem[i]) mem[i] = {2'b00, 11'($urandom), 11'($urandom)};
    rv[0] = 0; rv[1] = 0; rq[0] = 0; rq[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      int d, t0, t1;
      d = (run == 4) ? 16 : (run % 2) ? 8 : 16;
      free_gnt = (run == 4);
      @(posedge clk);
      start <= 1; base <= addr_t'(run * 37); dim <= 7'(d); cut <= 4'((run * 3) % 11);
      @(posedge clk);
      start <= 0;
      t0 = $time;
      seen = 0;
      while (!done) begin
        @(posedge clk);
        if (c_valid && c_ready) begin
          int s, rem, col, row, k;
          coef_sm_t raw, exp;
          logic [9:0] m;
          word_t w;
          k = seen;
          s = k / (4 * d); rem = k % (4 * d);
          col = rem / 4; row = 4 * s + rem % 4;
          w = mem[run * 37 + row * (d / 2) + col / 2];
          raw = (col % 2) ? w[21:11] : w[10:0];
          m = raw[9:0] & ~((10'd1 << ((run * 3) % 11)) - 10'd1);
          if ((run * 3) % 11 >= 10) m = 0;
          exp = {raw[10] & (m != 0), m};
          checks++;
          if (c_data !== exp || c_last != (k == d*d - 1)) begin
            failures++;
            $display("run %0d k %0d: got %h last %0d exp %h", run, k, c_data, c_last, exp);
          end
          seen++;
        end
      end
      t1 = $time;
      checks++;
      if (seen != d * d) begin failures++; $display("run %0d: %0d coefficients", run, seen); end
      if (free_gnt) begin
        checks++;
        if ((t1 - t0) / 10 > d * d + 8) begin failures++; $display("took %0d cycles for %0d", (t1 - t0) / 10, d * d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rdo: feeds the RDO random code-blocks of different magnitude ranges,
// runs the decision for several quality indices and both result banks, and
// compares cut planes and plane counts with an independent integer model of
// the accumulation and decision rules. Also checks the decision time
// (at most one cycle per code-block plane plus two) and that the
// accumulators restart from zero for the next tile.
module tb_rdo;
  import jpeg2k_pkg::*;
  localparam int R2 = 16, R1 = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, obs_valid = 0, decide = 0, acc_bank = 0, rd_bank = 0;
  logic [2:0] obs_cb = 0, rd_cb = 0;
  coef_sm_t obs_c0 = 0, obs_c1 = 0;
  logic [15:0] lambda = 0;
  logic busy, decided;
  logic [3:0] rd_cut, rd_planes;
  int checks = 0, failures = 0;

  rdo #(.R2(R2), .R1(R1)) dut (.*);

  localparam int NW = 40;   // words per code-block in this test
  int mags [NUM_CB][2*NW];
  int lam_list [4] = '{0, 3, 40, 60000};

  function automatic int wt(int b);
    case (b) 0, 1: return 17; 2: return 8; 3, 4: return 44; 5: return 16; default: return 121; endcase
  endfunction

  function automatic int dref(int u);
    int r;
    r = 2*u + 1;
    return (r - 8)*(r - 8) - (r - ((u >= 4) ? 12 : 4))*(r - ((u >= 4) ? 12 : 4));
  endfunction
  function automatic int dsig(int u);
    int r;
    r = 2*u + 1;
    return (u >= 4) ? r*r - (r - 12)*(r - 12) : 0;
  endfunction

  function automatic void model(input int b, input longint lam, output int cut, output int planes);
    longint n2 [10], n1 [10], d [10];
    int orv;
    orv = 0;
    for (int p = 0; p < 10; p++) begin n2[p] = 0; n1[p] = 0; d[p] = 0; end
    for (int i = 0; i < 2*NW; i++) begin
      int m;
      m = mags[b][i];
      orv |= m;
      for (int p = 0; p < 10; p++) begin
        int u;
        u = ((m * 4) >> p) & 7;
        if ((m >> (p + 1)) != 0) begin n2[p]++; d[p] += dref(u); end
        else if (p < 2) begin n1[p]++; d[p] += dsig(u); end
      end
    end
    planes = 0;
    for (int i = 0; i < 10; i++) if ((orv >> i) & 1) planes = i + 1;
    cut = 10;
    for (int p = 9; p >= 0; p--) begin
      longint lhs, rhs;
      lhs = (d[p] * wt(b)) * (longint'(1) << (2*p));
      rhs = lam * (n2[p] * R2 + n1[p] * R1);
      if ((n2[p] == 0 && n1[p] == 0) || lhs >= rhs) cut = p;
      else break;
    end
  endfunction

  initial begin
    int t0, dec_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int tile = 0; tile < 4; tile++) begin
      for (int b = 0; b < NUM_CB; b++)
        for (int i = 0; i < 2*NW; i++) begin
          int lim;
          lim = (b == 6) ? 1023 : (b == 2 && tile == 1) ? 0 : (32 >> (b % 3)) << (tile % 2);
          mags[b][i] = (i % 11 == 0 && lim > 0) ? lim : int'($urandom_range(0, lim));
        end
      for (int b = 0; b < NUM_CB; b++)
        for (int w = 0; w < NW; w++) begin
          @(posedge clk);
          obs_valid <= 1; obs_cb <= 3'(b);
          obs_c0 <= {1'($urandom_range(0, 1)), 10'(mags[b][2*w])};
          obs_c1 <= {1'($urandom_range(0, 1)), 10'(mags[b][2*w+1])};
          // a word seen while the unit is isolated must not count
        end
      @(posedge clk);
      obs_valid <= 1; en <= 0; obs_c0 <= 11'h3ff; obs_c1 <= 11'h3ff; obs_cb <= 3'd0;
      @(posedge clk);
      obs_valid <= 0; en <= 1;
      decide <= 1; acc_bank <= tile[0]; lambda <= 16'(lam_list[tile]);
      @(posedge clk);
      decide <= 0;
      t0 = $time;
      @(posedge clk);
      while (!decided) @(posedge clk);
      dec_cycles = ($time - t0) / 10;
      checks++;
      if (dec_cycles > NUM_CB * 10 + 2) begin failures++; $display("decision took %0d cycles", dec_cycles); end
      for (int b = 0; b < NUM_CB; b++) begin
        int ec, ep;
        model(b, lam_list[tile], ec, ep);
        rd_bank <= tile[0]; rd_cb <= 3'(b);
        #1;
        checks++;
        if (rd_cut != 4'(ec) || rd_planes != 4'(ep)) begin
          failures++;
          $display("tile %0d cb %0d lambda %0d: cut %0d planes %0d, expected %0d %0d",
                   tile, b, lam_list[tile], rd_cut, rd_planes, ec, ep);
        end
        @(posedge clk);
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

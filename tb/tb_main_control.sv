// tb_main_control: the three pipeline units are modelled with random run
// times. For 1, 2 and 5 tiles the testbench checks that each tile is
// transformed, coded and formed exactly once and in order, that in every
// stage the BSF finishes before the DWT starts on the same bank, that the
// EBC works on the other bank, that the RDO decides after each DWT, that the
// stage count ends at tiles+2 and that idle units get no enable.
module tb_main_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic go = 0, tile_avail = 0;
  logic [15:0] tiles_total = 0;
  logic dwt_start, dwt_en, dwt_done = 0, rdo_decide, rdo_decided = 0;
  logic ebc_start, ebc_done = 0, bsf_start, bsf_en, bsf_done = 0;
  logic [15:0] dwt_tile, ebc_tile, bsf_tile, stage_count;
  logic bsf_first, bsf_last, bank_x, x_is_dwt, rdo_bank, finished;
  int checks = 0, failures = 0;

  main_control dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  int n_dwt, n_ebc, n_bsf, n_dec;
  int next_dwt, next_ebc, next_bsf;
  logic bsf_busy = 0, dwt_busy = 0, ebc_busy = 0;

  // unit models
  always @(posedge clk) begin
    dwt_done <= 0; ebc_done <= 0; bsf_done <= 0; rdo_decided <= 0;
    tile_avail <= $urandom_range(0, 3) == 0;
    if (rst_n && dwt_start) begin
      chk(!bsf_busy, "DWT started while BSF busy");
      chk(int'(dwt_tile) == next_dwt, "DWT tile order");
      chk(bank_x == dwt_tile[0] && x_is_dwt, "DWT bank");
      next_dwt++; n_dwt++;
      dwt_busy = 1;
      fork begin repeat ($urandom_range(3, 30)) @(posedge clk); dwt_done <= 1; dwt_busy = 0; end join_none
    end
    if (rst_n && ebc_start) begin
      chk(int'(ebc_tile) == next_ebc, "EBC tile order");
      chk(!bank_x == ebc_tile[0], "EBC bank");
      chk(rdo_bank == ebc_tile[0], "RDO result bank");
      next_ebc++; n_ebc++;
      ebc_busy = 1;
      fork begin repeat ($urandom_range(3, 60)) @(posedge clk); ebc_done <= 1; ebc_busy = 0; end join_none
    end
    if (rst_n && bsf_start) begin
      chk(int'(bsf_tile) == next_bsf, "BSF tile order");
      chk(bsf_first == (bsf_tile == 0), "first flag");
      chk(bsf_last == (int'(bsf_tile) == int'(tiles_total) - 1), "last flag");
      chk(!dwt_busy, "BSF started while DWT busy");
      next_bsf++; n_bsf++;
      bsf_busy = 1;
      fork begin repeat ($urandom_range(3, 30)) @(posedge clk); bsf_done <= 1; bsf_busy = 0; end join_none
    end
    if (rst_n && rdo_decide) begin
      n_dec++;
      fork begin repeat (5) @(posedge clk); rdo_decided <= 1; end join_none
    end
    if (rst_n) chk(!(bsf_en && dwt_en), "both X units enabled");
  end

  initial begin
    int tl [3] = '{1, 2, 5};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (tl[i]) begin
      n_dwt = 0; n_ebc = 0; n_bsf = 0; n_dec = 0; next_dwt = 0; next_ebc = 0; next_bsf = 0;
      @(negedge clk);
      tiles_total = 16'(tl[i]); go = 1;
      @(negedge clk);
      go = 0;
      while (!finished) @(posedge clk);
      chk(n_dwt == tl[i] && n_ebc == tl[i] && n_bsf == tl[i] && n_dec == tl[i], "unit start counts");
      chk(int'(stage_count) == tl[i] + 2, "stage count");
      repeat (3) @(posedge clk);
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

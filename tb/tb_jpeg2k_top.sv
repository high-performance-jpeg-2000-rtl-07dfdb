// tb_jpeg2k_top: end-to-end test of jpeg2k_top on four reduced 64x64 tiles
// (same architecture, T = 64) so that every mechanism is exercised in a
// short run. The checking itself lives in jpeg2k_harness: DWT coefficients
// against a reference transform, RDO cut consistency, codestream syntax and
// stream bytes, and counters for stalls, contention, short/long/overflow
// link words, cuts and stage overlap (each must occur at least once).
module tb_jpeg2k_top;
  int checks, failures;
  bit done;
  jpeg2k_harness #(.T(64), .TILES(4)) h (.checks, .failures, .done);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge h.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_jpeg2k_full: full-size end-to-end test. jpeg2k_top is instantiated at
// its defaults (128x128 tiles, 8K x 24 tile memories, SRAM latency 2) and
// codes four tiles through all three pipeline stages; jpeg2k_harness checks
// coefficients, RDO cuts, the codestream bytes and that every mechanism
// (stalls, contention, short/long/overflow link words, cuts, stage overlap)
// occurred.
module tb_jpeg2k_full;
  int checks, failures;
  bit done;
  jpeg2k_harness #(.T(128), .TILES(4)) h (.checks, .failures, .done);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge h.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

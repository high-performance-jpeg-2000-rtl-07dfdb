// tb_bsf: builds a coded tile in a memory model the way the write address
// generator lays it out (PPH at the top of each code-block area, streams as
// linked short and long words), runs bit stream formation for a first, a
// middle and a last tile, and compares the packed codestream byte for byte
// with the expected headers, lengths and stream bytes. Also checks that
// stream words are analysed at one word per two cycles.
module tb_bsf;
  import jpeg2k_pkg::*;
  localparam int T = 64, LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, first_tile = 0, last_tile = 0, busy, done, req, oe;
  logic [15:0] tile_idx = 0, img_w = 16'd640, img_h = 16'd480, n_words;
  addr_t addr;
  word_t rdata;
  logic [23:0] codestream;
  int checks = 0, failures = 0;

  bsf #(.T(T)) dut (.*);

  word_t mem [T*T/2];
  word_t d1, d2;
  always @(posedge clk) begin d1 <= mem[addr]; d2 <= d1; end
  assign rdata = d2;

  byte unsigned exp_q [$], got_q [$];
  always @(posedge clk) if (rst_n && oe) begin
    got_q.push_back(codestream[23:16]); got_q.push_back(codestream[15:8]); got_q.push_back(codestream[7:0]);
  end

  task automatic push16(input int v);
    exp_q.push_back(8'(v >> 8)); exp_q.push_back(8'(v));
  endtask

  int total_words;
  // Lay out one tile and the expected packet bytes.
  task automatic build_tile();
    total_words = 0;
    foreach (mem[i]) mem[i] = '0;
    for (int cb = 0; cb < NUM_CB; cb++) begin
      int base, top, pph, a;
      int lens [NUM_PASS];
      byte unsigned bytes [NUM_PASS][$];
      base = cb_base(3'(cb), T);
      top  = (cb == NUM_CB - 1) ? T*T/2 - 1 : cb_base(3'(cb + 1), T) - 1;
      pph  = top - NUM_PASS + 1;
      a = base;
      for (int s = 0; s < NUM_PASS; s++) begin
        int n;
        // at most one word per byte: keep the streams below the PPH
        n = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 3);
        lens[s] = n;
        for (int k = 0; k < n; k++) bytes[s].push_back(8'($urandom));
      end
      for (int s = 0; s < NUM_PASS; s++) begin
        int k, head;
        head = a; k = 0;
        while (k < lens[s]) begin
          if ($urandom_range(0, 2) == 0 || lens[s] - k == 1) begin
            // long word with one byte, next word placed right after
            mem[a] = all_long(addr_t'(a + 1), bytes[s][k]);
            k++; a++;
          end else begin
            mem[a] = all_short(7'd1, bytes[s][k], bytes[s][k+1]);
            k += 2; a++;
          end
          total_words++;
        end
        mem[pph + s] = pph_word(11'(lens[s]), addr_t'(head));
      end
      for (int s = 0; s < NUM_PASS; s++) push16(lens[s]);
      for (int s = 0; s < NUM_PASS; s++) foreach (bytes[s][k]) exp_q.push_back(bytes[s][k]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int t0, t1;
      exp_q.delete(); got_q.delete();
      if (t == 0) begin push16(16'hFF4F); push16(16'hFF51); push16(10); push16(640); push16(480); push16(T); end
      push16(16'hFF90); push16(t); push16(16'hFF93);
      build_tile();
      if (t == 2) push16(16'hFFD9);
      while (exp_q.size() % 3 != 0) exp_q.push_back(8'h00);
      @(negedge clk);
      start = 1; first_tile = (t == 0); last_tile = (t == 2); tile_idx = 16'(t);
      @(negedge clk);
      start = 0;
      t0 = $time;
      while (!done) @(posedge clk);
      t1 = $time;
      @(posedge clk);
      checks++;
      if (got_q.size() != exp_q.size()) begin
        failures++; $display("tile %0d: %0d bytes, expected %0d", t, got_q.size(), exp_q.size());
      end
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin
          failures++;
          if (failures < 10) $display("tile %0d byte %0d: %h exp %h", t, i, got_q[i], exp_q[i]);
        end
      end
      checks++;
      if (int'(n_words) != total_words + NUM_CB * NUM_PASS) begin
        failures++; $display("words analysed %0d exp %0d", n_words, total_words + NUM_CB * NUM_PASS);
      end
      checks++;
      // two cycles per word, plus headers, stream switches and the flush
      if ((t1 - t0) / 10 > 2 * (total_words + NUM_CB * NUM_PASS) + NUM_CB * NUM_PASS + 40) begin
        failures++; $display("tile %0d took %0d cycles for %0d words", t, (t1 - t0) / 10, n_words);
      end
      $display("tile %0d: %0d words in %0d cycles", t, n_words, (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_psw_ag: sends random bytes of 28 pass streams (up to five per cycle)
// while a modelled reader frees the code-block area, flushes, then decodes
// memory independently: reads each stream's PPH word, follows the short and
// long links and compares the bytes with what was sent. Checks that no write
// lands on a word the reader has not freed, and that short words, long words,
// overflow (two regions, the second loaded when the first is used up),
// waiting for the reader and truncation were all seen. Run 0 has no overflow
// area, so bytes wait for the reader; run 1 holds the reader back to force
// overflow; run 2 sends more than fits, so streams are truncated and the
// stored bytes must be a prefix of what was sent.
module tb_psw_ag;
  import jpeg2k_pkg::*;
  localparam int LANES = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, all_free = 0, flush = 0, in_ready, done, req, gnt;
  logic ovf_load = 0, ovf_more = 0, ovf_empty;
  addr_t base = 0, pph_base = 0, ovf_top = 0, ovf_cnt = 0, free_lim = 0, addr;
  addr_t ovf_next, ovf_rest, used_end;
  word_t wdata;
  logic [LANES-1:0] in_valid = 0;
  logic [LANES-1:0][7:0] in_byte = 0;
  logic [LANES-1:0][4:0] in_sid = 0;
  logic [15:0] n_short, n_long, n_ovf, n_drop, n_wait;
  int checks = 0, failures = 0;

  psw_ag dut (.*);

  word_t mem [8192];
  byte unsigned sent [NUM_PASS][$];
  int AREA = 2048;
  always @(negedge clk) gnt <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && req && gnt) begin
    mem[addr] <= wdata;
    checks++;
    if (!(addr < free_lim || (all_free && addr >= pph_base && addr < pph_base + NUM_PASS) ||
          (addr >= 8191 - 39) || (addr > 7000 - 1000 && addr <= 7000))) begin
      failures++;
      $display("write to unfreed word %0d (free_lim %0d)", addr, free_lim);
    end
  end

  // overflow regions of run 1: 40 words from 8191 down, then 1000 from 7000
  always @(posedge clk) begin
    ovf_load <= 1'b0;
    if (ovf_more && ovf_empty && !ovf_load && !start) begin
      ovf_top <= addr_t'(7000); ovf_cnt <= addr_t'(1000); ovf_load <= 1'b1; ovf_more <= 1'b0;
    end
  end

  task automatic run_block(input int b0, input int area, input int nbytes, input int hold, input int ovf);
    int sent_n, drop0;
    sent_n = 0;
    AREA = area;
    drop0 = n_drop;
    foreach (sent[i]) sent[i].delete();
    @(posedge clk);
    start <= 1; base <= addr_t'(b0); pph_base <= addr_t'(b0 + AREA - NUM_PASS);
    ovf_top <= addr_t'(8191); ovf_cnt <= addr_t'(ovf ? 40 : 0); ovf_more <= ovf != 0;
    free_lim <= addr_t'(b0); all_free <= 0;
    @(posedge clk);
    start <= 0;
    while (sent_n < nbytes) begin
      @(negedge clk);
      // modelled reader: frees one word per ~1.5 bytes, unless held back
      if (!(hold && sent_n < nbytes / 2) && free_lim < b0 + AREA - NUM_PASS)
        free_lim <= free_lim + addr_t'($urandom_range(0, 2));
      else if (free_lim >= addr_t'(b0 + AREA - NUM_PASS)) all_free <= 1;   // reader finished
      if (in_ready && $urandom_range(0, 2) != 0) begin
        logic [LANES-1:0] v;
        v = '0;
        for (int l = 0; l < LANES; l++) begin
          // streams 0..3 and 20.. are busy, the rest sparse
          int s;
          s = ($urandom_range(0, 3) == 0) ? $urandom_range(0, NUM_PASS - 1) : $urandom_range(0, 5);
          if (sent_n < nbytes && $urandom_range(0, 1)) begin
            v[l] = 1;
            in_byte[l] <= 8'($urandom);
            in_sid[l] <= 5'(s);
          end
        end
        in_valid <= v;
        @(posedge clk);
        for (int l = 0; l < LANES; l++) if (v[l]) begin sent[in_sid[l]].push_back(in_byte[l]); sent_n++; end
        @(negedge clk);
        in_valid <= '0;
      end
    end
    all_free <= 1; free_lim <= addr_t'(b0 + AREA - NUM_PASS);
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    // decode: the stored bytes must be the sent ones (a prefix when
    // streams were truncated)
    begin
      int stored;
      stored = 0;
      for (int s = 0; s < NUM_PASS; s++) begin
        word_t p;
        int n, a;
        p = mem[b0 + AREA - NUM_PASS + s];
        n = p[23:13]; a = p[12:0];
        stored += n;
        checks++;
        if (n > sent[s].size() || (n < sent[s].size() && n_drop == 16'(drop0))) begin
          failures++; $display("stream %0d length %0d, sent %0d", s, n, sent[s].size());
        end else begin
          int k;
          k = 0;
          while (k < n) begin
            word_t w;
            w = mem[a];
            if (!w[23]) begin
              if (w[15:8] != sent[s][k]) begin failures++; $display("s%0d byte %0d", s, k); end
              k++;
              if (k < n) begin
                if (w[7:0] != sent[s][k]) begin failures++; $display("s%0d byte %0d", s, k); end
                k++;
              end
              a = a + w[22:16];
            end else begin
              if (w[7:0] != sent[s][k]) begin failures++; $display("s%0d byte %0d (long)", s, k); end
              k++;
              a = w[22:10];
            end
          end
          checks++;
        end
      end
      checks++;
      if (stored + int'(n_drop) - drop0 != sent_n) begin
        failures++; $display("stored %0d + dropped %0d != sent %0d", stored, int'(n_drop) - drop0, sent_n);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(0, 2048, 1500, 0, 0);
    checks++;
    if (n_wait == 0) begin failures++; $display("run 0 never waited"); end
    run_block(2048, 2048, 1500, 1, 1);
    checks++;
    if (n_ovf <= 40 || ovf_load) begin failures++; $display("second overflow region not used (%0d)", n_ovf); end
    run_block(4096, 256, 1500, 0, 0);
    checks++;
    if (n_short == 0 || n_long == 0 || n_ovf == 0 || n_drop == 0) begin
      failures++; $display("mechanisms: short %0d long %0d ovf %0d drop %0d", n_short, n_long, n_ovf, n_drop);
    end
    $display("short %0d long %0d overflow %0d waits %0d dropped %0d", n_short, n_long, n_ovf, n_wait, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

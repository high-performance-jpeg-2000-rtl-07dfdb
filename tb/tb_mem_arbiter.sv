// tb_mem_arbiter: random request patterns on both sides; checks that a grant
// only goes to a requester, never to both, that a lone requester is always
// granted, that contested cycles alternate, and that the SRAM port carries
// the granted client's address, data and direction.
module tb_mem_arbiter;
  import jpeg2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r_req = 0, w_req = 0, r_gnt, w_gnt;
  addr_t r_addr = 0, w_addr = 0;
  word_t w_data = 0;
  sram_req_t mem;
  int checks = 0, failures = 0;
  int last_contest = -1;   // 0 reader, 1 writer
  int contests = 0;

  mem_arbiter dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      r_req = $urandom_range(0, 1); w_req = $urandom_range(0, 1);
      r_addr = addr_t'($urandom); w_addr = addr_t'($urandom); w_data = word_t'($urandom);
      #1;
      chk(!(r_gnt && w_gnt), "both granted");
      chk((r_gnt -> r_req) && (w_gnt -> w_req), "grant without request");
      chk((r_req || w_req) == (r_gnt || w_gnt), "idle while requested");
      if (r_req && w_req) begin
        if (last_contest >= 0) chk(int'(w_gnt) != last_contest, "no alternation");
        last_contest = w_gnt;
        contests++;
      end
      chk(mem.req == (r_gnt || w_gnt) && mem.we == w_gnt &&
          mem.addr == (w_gnt ? w_addr : r_addr) && (!w_gnt || mem.wdata == w_data), "port mux");
    end
    chk(contests > 50, "too few contested cycles");
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

// tb_io_fifo: self-checking test of the pixel input FIFO at its default size.
//
// What: pushes random words with random gaps on both sides and compares
// every word that leaves with a reference queue; also checks that in_ready
// drops exactly when the FIFO is full, out_valid exactly when it is empty,
// and that count matches the reference.
// How: 4000 cycles in three phases (writer faster, balanced, reader faster)
// so the FIFO is driven both to full and to empty.
// Interface: none (top-level testbench); prints TB_RESULT at the end.
// Timing: inputs change on the falling edge, checks on the rising edge; a
// watchdog stops the run after 20000 cycles.
// Paper vs own: the paper only names the FIFO; the test is this design's own.
module tb_io_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  logic [4:0]  count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [15:0] q[$];

  io_fifo dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int pin, pout;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      pin  = cyc < 1300 ? 80 : (cyc < 2600 ? 50 : 20);
      pout = cyc < 1300 ? 30 : (cyc < 2600 ? 50 : 85);
      @(negedge clk);
      in_valid  = ($urandom_range(99) < pin);
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(99) < pout);
      @(posedge clk);
      chk(count == 5'(q.size()), "count");
      chk(in_ready == (q.size() < 16), "in_ready");
      chk(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == 16) n_full++;
      if (q.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        chk(out_data == q[0], "data order");
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    chk(n_full > 50, "FIFO reached full");
    chk(n_empty > 50, "FIFO reached empty");
    $display("full cycles %0d, empty cycles %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

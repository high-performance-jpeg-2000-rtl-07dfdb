// mem_arbiter: shares one single-port tile SRAM between the read address
// generator (coefficients in) and the write address generator (bit streams
// out) of the block coder.
//
// At most one client is granted per cycle. When both request, the grant
// alternates (round robin), so neither side can be starved: the reader keeps
// freeing words the writer needs and the writer keeps draining the queue
// that would otherwise stall the coder, which is how the two are kept out of
// a deadlock. The grant is combinational; the granted request is presented
// on the SRAM port in the same cycle.
// That an arbiter grants one of the two and prevents deadlock is from the
// paper; the round-robin rule is this design's choice.
module mem_arbiter
  import jpeg2k_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      r_req,
  input  addr_t     r_addr,
  output logic      r_gnt,
  input  logic      w_req,
  input  addr_t     w_addr,
  input  word_t     w_data,
  output logic      w_gnt,
  output sram_req_t mem
);
  logic last_w;   // the writer had the last contested grant

  always_comb begin
    r_gnt = 1'b0;
    w_gnt = 1'b0;
    if (r_req && w_req) begin
      if (last_w) r_gnt = 1'b1; else w_gnt = 1'b1;
    end else begin
      r_gnt = r_req;
      w_gnt = w_req;
    end
    mem.req   = r_gnt || w_gnt;
    mem.we    = w_gnt;
    mem.addr  = w_gnt ? w_addr : r_addr;
    mem.wdata = w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_w <= 1'b0;
    else if (r_req && w_req) last_w <= w_gnt;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(r_gnt && w_gnt));
endmodule

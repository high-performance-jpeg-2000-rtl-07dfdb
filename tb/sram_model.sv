// sram_model: behavioural model of one off-chip single-port synchronous SRAM
// of 8K x 24 bit. A request (req, we, addr, wdata) is taken at a clock
// edge; read data appear LAT cycles after the request cycle and stay until
// the next read returns. Contents start at zero.
module sram_model
  import jpeg2k_pkg::*;
#(
  parameter int unsigned LAT = SRAM_LAT
) (
  input  logic      clk,
  input  sram_req_t r,
  output word_t     rdata
);
  word_t mem [1 << SRAM_AW];
  word_t pipe [LAT];
  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (pipe[i]) pipe[i] = '0;
  end
  always @(posedge clk) begin
    if (r.req && r.we) mem[r.addr] <= r.wdata;
    pipe[0] <= mem[r.addr];
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[LAT-1];
endmodule

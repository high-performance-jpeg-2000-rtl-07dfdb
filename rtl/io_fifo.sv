// io_fifo: the input FIFO in front of the encoder's pixel port.
//
// What: a synchronous first-in first-out buffer of DEPTH entries of W bits
// with a valid/ready handshake on both sides. In the encoder top it holds
// pixel pairs, so the image source may keep sending while the pipeline is
// between tiles or the transform's word queues push back.
// How: a register array with read and write pointers one bit wider than
// the index (full when they differ only in that bit). Data leave straight
// from the array, so out_data is valid in the same cycle as out_valid.
// Interface: in_valid/in_ready/in_data (write side), out_valid/out_ready/
// out_data (read side), count (entries held).
// Timing: one write and one read per cycle; a word written in cycle n can be
// read in cycle n+1. in_ready depends only on state (no path from out_ready),
// so a write into a full FIFO is refused even if a read happens that cycle.
// Paper vs own: the FIFO at the pixel input is named in the paper's system
// block diagram; its depth, width and handshake are this design's choice.
module io_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign count     = wp - rp;
  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
endmodule

// bsf_sequencer: packs the pieces of the codestream (headers, packet
// headers and bit stream bytes, 1 to 3 bytes each) into 24-bit output words.
//
// A piece is in_data[8*in_nbytes-1:0], its first byte the most significant.
// Bytes are queued in order; whenever three are available they leave as one
// word, the first byte in bits [23:16], with oe high. A piece is accepted
// every cycle (at most two bytes wait, so five fit). flush (one pulse, no
// piece with it) emits the
// remaining one or two bytes padded with zero bytes, and pulses flushed.
// The 24-bit output with an output enable and the 2-bit piece width follow
// the paper's BSF block diagram; the zero padding is this design's choice.
module bsf_sequencer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  in_nbytes,   // 1..3
  input  logic [23:0] in_data,
  input  logic        flush,
  output logic        oe,
  output logic [23:0] codestream,
  output logic        flushed
);
  logic [39:0] q;      // queued bytes, oldest in [39:32]
  logic [2:0]  qn;     // number queued (0..2 between cycles)
  logic        fpend;  // flush requested while a full word was leaving
  logic        fl;
  assign fl = flush || fpend;

  logic [39:0] nq, piece;
  logic [2:0]  nn;
  always_comb begin
    nq = q;
    nn = qn;
    piece = '0;
    if (in_valid) begin
      // align the piece right behind the queued bytes
      piece = {in_data, 16'h0} << (8 * (3 - int'(in_nbytes)));
      nq = q | (piece >> (8 * qn));
      nn = qn + 3'(in_nbytes);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; qn <= '0; oe <= 1'b0; codestream <= '0; flushed <= 1'b0; fpend <= 1'b0;
    end else begin
      oe <= 1'b0;
      flushed <= 1'b0;
      if (nn >= 3'd3) begin
        oe <= 1'b1;
        codestream <= nq[39:16];
        q  <= nq << 24;
        qn <= nn - 3'd3;
        fpend <= fl;
      end else if (fl && nn != 0) begin
        oe <= 1'b1;
        codestream <= nq[39:16];
        q  <= '0;
        qn <= '0;
        flushed <= 1'b1;
        fpend <= 1'b0;
      end else begin
        q  <= nq;
        qn <= nn;
        if (fl) flushed <= 1'b1;
        fpend <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_nbytes != 0);
  assert property (@(posedge clk) disable iff (!rst_n) flush |-> !in_valid);
endmodule

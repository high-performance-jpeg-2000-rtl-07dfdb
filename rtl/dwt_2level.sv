// dwt_2level: two-level 2-D 5/3 DWT of a tile, built from two cascaded
// one-level line-based units as in the paper's DWT block diagram.
//
// Pixels (unsigned, PIX_W bits) enter two per cycle in raster order and are
// level-shifted by 2^(PIX_W-1). Level 1 works on the TxT tile with W1-bit
// coefficients; its LL output is paired horizontally (two LL values of
// neighbouring columns) and fed to level 2 (T/2 x T/2, W2-bit coefficients).
// The tile is read once and every coefficient is produced once, which is the
// one-read/one-write memory access the line-based scheme is chosen for.
//
// Outputs:
//   l1_*  one quad of level-1 highpass bands {HL1, LH1, HH1} at (m, n)
//   l2_*  one quad of level-2 bands {LL2, HL2, LH2, HH2} at (m, n)
// Both are signed two's-complement. done pulses with the last level-2 quad.
// The default widths (12 and 14 bits) are those of the paper's buffers
// (24 and 28 bits hold two coefficients); level shifting is this design's
// choice (the paper does not mention it).
module dwt_2level #(
  parameter int unsigned T     = 128,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned W1    = 12,
  parameter int unsigned W2    = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [PIX_W-1:0]       in_p0,
  input  logic [PIX_W-1:0]       in_p1,
  output logic                   l1_valid,
  output logic [$clog2(T/2)-1:0] l1_m,
  output logic [$clog2(T/2)-1:0] l1_n,
  output logic signed [W1-1:0]   l1_hl,
  output logic signed [W1-1:0]   l1_lh,
  output logic signed [W1-1:0]   l1_hh,
  output logic                   l2_valid,
  output logic [$clog2(T/4)-1:0] l2_m,
  output logic [$clog2(T/4)-1:0] l2_n,
  output logic signed [W2-1:0]   l2_ll,
  output logic signed [W2-1:0]   l2_hl,
  output logic signed [W2-1:0]   l2_lh,
  output logic signed [W2-1:0]   l2_hh,
  output logic                   done
);
  logic signed [W1-1:0] x0, x1;
  always_comb begin
    x0 = W1'($signed({1'b0, in_p0})) - W1'(1 << (PIX_W - 1));
    x1 = W1'($signed({1'b0, in_p1})) - W1'(1 << (PIX_W - 1));
  end

  logic signed [W1-1:0] ll1;
  logic                 l1_last_unused;

  dwt_level #(.N(T), .M(T), .W(W1)) u_l1 (
    .clk, .rst_n, .in_valid, .in_x0(x0), .in_x1(x1),
    .out_valid(l1_valid), .out_m(l1_m), .out_n(l1_n),
    .out_ll(ll1), .out_hl(l1_hl), .out_lh(l1_lh), .out_hh(l1_hh),
    .out_last(l1_last_unused)
  );

  // Pair LL1 values of columns 2k and 2k+1 into one level-2 input pair.
  logic signed [W1-1:0] ll_even;
  logic                 p_valid;
  logic signed [W2-1:0] p_x0, p_x1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ll_even <= '0; p_valid <= 1'b0; p_x0 <= '0; p_x1 <= '0;
    end else begin
      p_valid <= 1'b0;
      if (l1_valid) begin
        if (!l1_n[0]) ll_even <= ll1;
        else begin
          p_valid <= 1'b1;
          p_x0 <= W2'(ll_even);
          p_x1 <= W2'(ll1);
        end
      end
    end
  end

  dwt_level #(.N(T/2), .M(T/2), .W(W2)) u_l2 (
    .clk, .rst_n, .in_valid(p_valid), .in_x0(p_x0), .in_x1(p_x1),
    .out_valid(l2_valid), .out_m(l2_m), .out_n(l2_n),
    .out_ll(l2_ll), .out_hl(l2_hl), .out_lh(l2_lh), .out_hh(l2_hh),
    .out_last(done)
  );
endmodule

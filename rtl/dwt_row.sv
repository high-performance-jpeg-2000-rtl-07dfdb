// dwt_row: horizontal (row) 1-D 5/3 reversible lifting wavelet transform.
//
// A row of N samples arrives as N/2 pairs {x(2n), x(2n+1)}, one pair per
// cycle when in_valid is high; rows follow each other without a gap. For each
// pair the unit produces one lowpass/highpass pair
//   H(2n+1) = x(2n+1) - floor((x(2n) + x(2n+2)) / 2)
//   L(2n)   = x(2n)   + floor((H(2n-1) + H(2n+1) + 2) / 4)
// with symmetric extension at both row ends (x(N) = x(N-2), H(-1) = H(1)).
// The filter equations and the two-samples-per-cycle rate follow the paper;
// the pipeline arrangement is this design's own.
//
// Timing: the output of pair n appears one cycle after pair n+1 was taken,
// because H(2n+1) needs x(2n+2). The last pair of a row is completed from the
// mirrored sample and emitted on the following cycle, which is always free
// (the first pair of the next row produces no output), so the unit never
// stalls and needs no flush other than one idle cycle after the final row.
// out_n gives the column-pair index of the output pair.
module dwt_row #(
  parameter int unsigned N = 128,   // row length in samples, even, >= 4
  parameter int unsigned W = 12     // signed sample/coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_x0,     // x(2n)
  input  logic signed [W-1:0]  in_x1,     // x(2n+1)
  output logic                 out_valid,
  output logic signed [W-1:0]  out_l,     // L(2n)
  output logic signed [W-1:0]  out_h,     // H(2n+1)
  output logic [$clog2(N/2)-1:0] out_n
);
  localparam int unsigned NP = N / 2;
  localparam int unsigned PW = $clog2(NP);

  logic [PW-1:0]        cnt;          // pair index of the incoming pair
  logic signed [W-1:0]  px0, px1;     // previous pair
  logic signed [W-1:0]  ph;           // H(2n-1) of the pair before
  logic                 pend;         // last pair of a row waiting
  logic signed [W-1:0]  pend_l, pend_h;

  // Lifting on the previous pair, using the incoming x(2n+2).
  logic signed [W:0] sum_x, sum_h;
  logic signed [W-1:0] h_prev, l_prev, h_last, l_last, h_left;
  always_comb begin
    sum_x  = (W+1)'(px0) + (W+1)'(in_x0);
    h_prev = px1 - W'(sum_x >>> 1);
    h_left = (cnt == PW'(1)) ? h_prev : ph;        // H(-1) = H(1)
    sum_h  = (W+1)'(h_left) + (W+1)'(h_prev) + (W+1)'(2);
    l_prev = px0 + W'(sum_h >>> 2);
    // Last pair of the row: x(N) mirrors to x(N-2).
    h_last = in_x1 - in_x0;
    l_last = in_x0 + W'(((W+1)'(h_prev) + (W+1)'(h_last) + (W+1)'(2)) >>> 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; px0 <= '0; px1 <= '0; ph <= '0;
      pend <= 1'b0; pend_l <= '0; pend_h <= '0;
      out_valid <= 1'b0; out_l <= '0; out_h <= '0; out_n <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pend) begin
        out_valid <= 1'b1;
        out_l <= pend_l; out_h <= pend_h; out_n <= PW'(NP - 1);
        pend <= 1'b0;
      end
      if (in_valid) begin
        px0 <= in_x0; px1 <= in_x1;
        if (cnt != '0) begin
          out_valid <= 1'b1;
          out_l <= l_prev; out_h <= h_prev; out_n <= cnt - PW'(1);
          ph <= h_prev;
        end
        if (cnt == PW'(NP - 1)) begin
          pend <= 1'b1; pend_l <= l_last; pend_h <= h_last;
          cnt <= '0;
        end else begin
          cnt <= cnt + PW'(1);
        end
      end
    end
  end

  // A pending last pair is only ever emitted while the first pair of the
  // next row is taken, which itself emits nothing.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pend |-> !(in_valid && cnt != '0));
endmodule

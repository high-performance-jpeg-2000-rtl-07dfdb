// dwt_level: one level of the line-based 2-D 5/3 wavelet transform.
//
// A row 1-D DWT (dwt_row) feeds a column 1-D DWT (dwt_col) whose line
// buffers play the role of the data buffer and temporal buffer. The input is
// an NxM image scanned row by row, two samples per cycle; the output is one
// 2x2 quad {LL, HL, LH, HH} per output position (m, n), produced at the same
// average rate as the input (one quad per two input pairs).
//
// Timing: a quad appears two cycles after the input pair that completes it.
// After the last input pair of an image the unit needs two idle cycles to
// emit its final quad. This arrangement (row unit before column unit, two
// samples per cycle) follows the paper's DWT block diagram.
module dwt_level #(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned W = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_x0,
  input  logic signed [W-1:0]  in_x1,
  output logic                 out_valid,
  output logic [$clog2(M/2)-1:0] out_m,
  output logic [$clog2(N/2)-1:0] out_n,
  output logic signed [W-1:0]  out_ll,
  output logic signed [W-1:0]  out_hl,
  output logic signed [W-1:0]  out_lh,
  output logic signed [W-1:0]  out_hh,
  output logic                 out_last
);
  logic                 r_valid;
  logic signed [W-1:0]  r_l, r_h;
  logic [$clog2(N/2)-1:0] r_n;

  dwt_row #(.N(N), .W(W)) u_row (
    .clk, .rst_n, .in_valid, .in_x0, .in_x1,
    .out_valid(r_valid), .out_l(r_l), .out_h(r_h), .out_n(r_n)
  );

  dwt_col #(.N(N), .M(M), .W(W)) u_col (
    .clk, .rst_n, .in_valid(r_valid), .in_l(r_l), .in_h(r_h),
    .out_valid, .out_m, .out_n, .out_ll, .out_hl, .out_lh, .out_hh, .out_last
  );

endmodule

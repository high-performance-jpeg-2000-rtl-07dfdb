// rdo: precompression rate-distortion optimisation.
//
// The unit watches the coefficient words the DWT writes to the tile memory
// (two sign-magnitude coefficients of one code-block per word) and, before
// any block coding, decides per code-block the lowest magnitude bit-plane
// that is worth coding. The coefficients the block coder later reads are cut
// below that plane, so the coder neither spends cycles on passes that would
// be discarded nor needs memory for rate-distortion data.
//
// Accumulation stage (per coefficient, all ten bit-planes in parallel):
//   * bit p belongs to the refinement pass (Pass 2) when the magnitude has a
//     one above p. Its count and its distortion reduction are accumulated.
//   * otherwise, in the two lowest planes only, the bit is taken to belong to
//     the significance propagation pass (Pass 1); the cleanup pass is
//     treated as negligible there. Count and distortion are accumulated.
//   The distortion reduction is looked up in a table indexed by the three
//   bits p..p-2 of the magnitude (bits below plane 0 read as zero), in units
//   of 4^(p-3); see DREF/DSIG below for how the tables are derived.
// Decision stage (after the tile, one plane per cycle, <= 70 cycles):
//   for each code-block, walk the planes from the MSB down; plane p is kept
//   while  (dD_p * w_cb) << 2p  >=  lambda * (n2_p * R2 + n1_p * R1),
//   i.e. while its distortion-rate slope reaches the quality index lambda.
//   w_cb is the subband weight and R2, R1 the estimated bits per Pass-2 and
//   Pass-1 bit (constant multiplications). Planes holding no Pass-1/2 bit are
//   kept. The first plane that fails ends the search.
// The results (cut plane and number of nonzero bit-planes per code-block)
// are kept in two banks so that the block coder can use one tile's results
// while the next tile is accumulated; acc_bank selects the bank written.
//
// The two stages, the Pass-2 randomness and the lowest-two-plane Pass-1
// assumption, table lookup and constant multiplications follow the paper.
// The table contents, weights, rate constants, the per-plane granularity of
// the decision and the lambda scale are this design's own choices.
module rdo
  import jpeg2k_pkg::*;
#(
  parameter int unsigned R2 = 16,   // est. bits per Pass-2 bit, 1/16 units
  parameter int unsigned R1 = 40    // est. bits per Pass-1 bit, 1/16 units
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,          // operand isolation: accumulate only when set
  // observation of the DWT output words
  input  logic            obs_valid,
  input  logic [2:0]      obs_cb,
  input  coef_sm_t        obs_c0,
  input  coef_sm_t        obs_c1,
  // decision
  input  logic            decide,      // pulse: tile accumulated, decide now
  input  logic            acc_bank,    // bank that receives this decision
  input  logic [15:0]     lambda,      // quality index
  output logic            busy,
  output logic            decided,     // pulse when the decision is stored
  // results for the block coder
  input  logic            rd_bank,
  input  logic [2:0]      rd_cb,
  output logic [3:0]      rd_cut,      // bits below this plane are dropped
  output logic [3:0]      rd_planes    // number of nonzero magnitude planes
);
  localparam int unsigned NP = MAG_W;

  // Distortion reduction of one refinement bit, residual top bits u=0..7.
  // Before the bit the residual r in [0, 2^(p+1)) is reconstructed at 2^p,
  // after it at 2^p +/- 2^(p-1); with r taken at the centre of its
  // 2^(p-2)-wide bin (in units 2^(p-3): r = 2u+1), the gain is
  // (r-8)^2 - (r-M')^2 with M' = 12 or 4.
  localparam int DREF [8] = '{40, 24, 8, -8, -8, 8, 24, 40};
  // Newly significant bit (bit p set): reconstructed at 0 before and at
  // 1.5*2^p after: r^2 - (r-12)^2 for r = 9, 11, 13, 15.
  localparam int DSIG [4] = '{72, 120, 168, 216};

  logic [12:0]         cnt2 [NUM_CB][NP];
  logic signed [23:0]  dd2  [NUM_CB][NP];
  logic [12:0]         cnt1 [NUM_CB][2];
  logic signed [23:0]  dd1  [NUM_CB][2];
  logic [MAG_W-1:0]    orm  [NUM_CB];   // OR of all magnitudes

  logic [3:0] cut_r    [2][NUM_CB];
  logic [3:0] planes_r [2][NUM_CB];

  // Contribution of one magnitude to plane p.
  typedef struct packed {
    logic              n2;
    logic signed [8:0] d2;
    logic              n1;
    logic signed [8:0] d1;
  } contrib_t;

  function automatic contrib_t contrib(input logic [MAG_W-1:0] mag, input int p);
    contrib_t c;
    logic [MAG_W+1:0] ext;
    logic [2:0] u;
    logic above;
    ext   = {mag, 2'b00};
    u     = 3'(ext >> p);            // bits p, p-1, p-2 of the magnitude
    above = (mag >> (p + 1)) != 0;
    c = '0;
    if (above) begin
      c.n2 = 1'b1;
      c.d2 = 9'(DREF[u]);
    end else if (p < 2) begin
      c.n1 = 1'b1;
      c.d1 = u[2] ? 9'(DSIG[u[1:0]]) : 9'sd0;
    end
    return c;
  endfunction

  // ---------------- accumulation stage ----------------
  contrib_t ca [NP];
  contrib_t cc [NP];
  always_comb
    for (int p = 0; p < NP; p++) begin
      ca[p] = contrib(obs_c0[MAG_W-1:0], p);
      cc[p] = contrib(obs_c1[MAG_W-1:0], p);
    end

  logic clear;   // set by the decision stage when it has read a tile
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_CB; b++) begin
        orm[b] <= '0;
        for (int p = 0; p < NP; p++) begin cnt2[b][p] <= '0; dd2[b][p] <= '0; end
        for (int p = 0; p < 2; p++)  begin cnt1[b][p] <= '0; dd1[b][p] <= '0; end
      end
    end else if (clear) begin
      for (int b = 0; b < NUM_CB; b++) begin
        orm[b] <= '0;
        for (int p = 0; p < NP; p++) begin cnt2[b][p] <= '0; dd2[b][p] <= '0; end
        for (int p = 0; p < 2; p++)  begin cnt1[b][p] <= '0; dd1[b][p] <= '0; end
      end
    end else if (en && obs_valid && !busy) begin
      orm[obs_cb] <= orm[obs_cb] | obs_c0[MAG_W-1:0] | obs_c1[MAG_W-1:0];
      for (int p = 0; p < NP; p++) begin
        cnt2[obs_cb][p] <= cnt2[obs_cb][p] + 13'(ca[p].n2) + 13'(cc[p].n2);
        dd2[obs_cb][p]  <= dd2[obs_cb][p] + 24'(ca[p].d2) + 24'(cc[p].d2);
        if (p < 2) begin
          cnt1[obs_cb][p] <= cnt1[obs_cb][p] + 13'(ca[p].n1) + 13'(cc[p].n1);
          dd1[obs_cb][p]  <= dd1[obs_cb][p] + 24'(ca[p].d1) + 24'(cc[p].d1);
        end
      end
    end
  end

  // ---------------- decision stage ----------------
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} dstate_e;
  dstate_e       st;
  logic [2:0]    cb;
  logic [3:0]    p;
  logic [3:0]    cut;
  logic          bank_q;
  logic [15:0]   lambda_q;

  // Slope test of plane p of code-block cb.
  logic signed [63:0] dnorm, rate, lhs, rhs;
  logic [12:0]        n2, n1;
  logic               keep;
  always_comb begin
    n2 = cnt2[cb][p];
    n1 = (p < 4'd2) ? cnt1[cb][p[0]] : 13'd0;
    dnorm = 64'(dd2[cb][p]) + ((p < 4'd2) ? 64'(dd1[cb][p[0]]) : 64'sd0);
    lhs   = (dnorm * 64'(sb_weight(cb))) <<< (2 * p);
    rate  = 64'(n2) * 64'(R2) + 64'(n1) * 64'(R1);
    rhs   = 64'(lambda_q) * rate;
    keep  = (n2 == 0 && n1 == 0) || (lhs >= rhs);
  end

  // Number of nonzero magnitude planes of a code-block.
  function automatic logic [3:0] msb_planes(input logic [MAG_W-1:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < MAG_W; i++) if (v[i]) r = 4'(i + 1);
    return r;
  endfunction

  assign busy = (st != D_IDLE);
  assign clear = (st == D_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; cb <= '0; p <= '0; cut <= '0; bank_q <= 1'b0; lambda_q <= '0;
      decided <= 1'b0;
      for (int k = 0; k < 2; k++)
        for (int b = 0; b < NUM_CB; b++) begin cut_r[k][b] <= '0; planes_r[k][b] <= '0; end
    end else begin
      decided <= 1'b0;
      case (st)
        D_IDLE: if (decide) begin
          st <= D_RUN; cb <= '0; p <= 4'(NP - 1); cut <= 4'(NP);
          bank_q <= acc_bank; lambda_q <= lambda;
        end
        D_RUN: begin
          if (!keep || p == 0) begin
            cut_r[bank_q][cb]    <= keep ? 4'd0 : cut;
            planes_r[bank_q][cb] <= msb_planes(orm[cb]);
            if (cb == 3'(NUM_CB - 1)) st <= D_DONE;
            else begin cb <= cb + 3'd1; p <= 4'(NP - 1); cut <= 4'(NP); end
          end else begin
            cut <= p;
            p   <= p - 4'd1;
          end
        end
        default: begin   // D_DONE: accumulators cleared this cycle
          st <= D_IDLE;
          decided <= 1'b1;
        end
      endcase
    end
  end

  assign rd_cut    = cut_r[rd_bank][rd_cb];
  assign rd_planes = planes_r[rd_bank][rd_cb];

  assert property (@(posedge clk) disable iff (!rst_n) decide |-> !busy);
endmodule

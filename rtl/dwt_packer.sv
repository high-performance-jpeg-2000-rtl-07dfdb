// dwt_packer: DWT side of the SRAM address generation.
//
// Takes the quads of the two-level DWT, converts every coefficient to 11-bit
// sign-magnitude, pairs the values of horizontally neighbouring positions of
// each subband into one 24-bit word and gives each word its tile-memory
// address (see jpeg2k_pkg for the memory map):
//   addr = base(subband) + row * (width/2) + column/2.
// A quad pair yields up to seven words at once (three level-1, four
// level-2), while the memory takes one word per cycle, so every subband has
// a small queue; the lowest-numbered non-empty queue is written first. On
// average the DWT makes one word per cycle, but the words come in bursts
// (three level-1 words every two cycles on odd rows, plus the level-2 words),
// so the queues fill up; almost_full (registered) goes high when any queue
// holds QD-MARGIN words or more and the top stops taking pixels until it
// drops. MARGIN covers the quads still inside the DWT pipeline.
//
// Each written word is also shown to the RDO (wr_cb, wr_c0, wr_c1). done
// pulses with the last of the T*T/2 words of a tile.
// Two coefficients per word and one memory write per cycle follow the paper;
// the pairing, the queues and the memory map are this design's own.
module dwt_packer
  import jpeg2k_pkg::*;
#(
  parameter int unsigned T  = 128,
  parameter int unsigned QD = (T / 4 < 8) ? 8 : T / 4,
  parameter int unsigned W1 = 12,
  parameter int unsigned W2 = 14,
  parameter int unsigned MARGIN = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   l1_valid,
  input  logic [$clog2(T/2)-1:0] l1_m,
  input  logic [$clog2(T/2)-1:0] l1_n,
  input  logic signed [W1-1:0]   l1_hl,
  input  logic signed [W1-1:0]   l1_lh,
  input  logic signed [W1-1:0]   l1_hh,
  input  logic                   l2_valid,
  input  logic [$clog2(T/4)-1:0] l2_m,
  input  logic [$clog2(T/4)-1:0] l2_n,
  input  logic signed [W2-1:0]   l2_ll,
  input  logic signed [W2-1:0]   l2_hl,
  input  logic signed [W2-1:0]   l2_lh,
  input  logic signed [W2-1:0]   l2_hh,
  output logic                   wr_valid,
  output addr_t                  wr_addr,
  output word_t                  wr_data,
  output logic [2:0]             wr_cb,
  output coef_sm_t               wr_c0,
  output coef_sm_t               wr_c1,
  output logic                   done,
  output logic                   almost_full
);
  typedef struct packed { addr_t a; word_t d; } ent_t;
  localparam int unsigned QW = $clog2(QD);

  ent_t         q  [NUM_CB][QD];
  logic [QW:0]  qn [NUM_CB];
  logic [QW-1:0] qh [NUM_CB];
  logic [QW-1:0] qt [NUM_CB];

  coef_sm_t e1 [3];        // even-column level-1 values
  coef_sm_t e2 [4];        // even-column level-2 values

  logic [NUM_CB-1:0] push;
  ent_t              pd [NUM_CB];

  function automatic coef_sm_t sm1(input logic signed [W1-1:0] v);
    return to_sm(16'(v));
  endfunction
  function automatic coef_sm_t sm2(input logic signed [W2-1:0] v);
    return to_sm(16'(v));
  endfunction

  always_comb begin
    coef_sm_t v1 [3];
    coef_sm_t v2 [4];
    addr_t off1, off2;
    v1[0] = sm1(l1_hl); v1[1] = sm1(l1_lh); v1[2] = sm1(l1_hh);
    v2[0] = sm2(l2_hl); v2[1] = sm2(l2_lh); v2[2] = sm2(l2_hh); v2[3] = sm2(l2_ll);
    off1 = addr_t'(l1_m) * addr_t'(T / 4) + (addr_t'(l1_n) >> 1);
    off2 = addr_t'(l2_m) * addr_t'(T / 8) + (addr_t'(l2_n) >> 1);
    push = '0;
    for (int b = 0; b < NUM_CB; b++) pd[b] = '0;
    for (int b = 0; b < 3; b++) begin
      push[b] = l1_valid && l1_n[0];
      pd[b].a = cb_base(3'(b), T) + off1;
      pd[b].d = {2'b00, v1[b], e1[b]};
    end
    for (int b = 0; b < 4; b++) begin
      push[3 + b] = l2_valid && l2_n[0];
      pd[3 + b].a = cb_base(3'(3 + b), T) + off2;
      pd[3 + b].d = {2'b00, v2[b], e2[b]};
    end
  end

  // drain: lowest non-empty queue
  logic [2:0] sel;
  logic       any;
  logic [NUM_CB-1:0] pop;
  always_comb begin
    sel = '0; any = 1'b0;
    for (int b = NUM_CB - 1; b >= 0; b--) if (qn[b] != 0) begin sel = 3'(b); any = 1'b1; end
    for (int b = 0; b < NUM_CB; b++) pop[b] = any && sel == 3'(b);
  end

  logic [$clog2(T*T/2):0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_CB; b++) begin
        qn[b] <= '0; qh[b] <= '0; qt[b] <= '0;
        for (int i = 0; i < QD; i++) q[b][i] <= '0;
      end
      for (int b = 0; b < 3; b++) e1[b] <= '0;
      for (int b = 0; b < 4; b++) e2[b] <= '0;
      wr_valid <= 1'b0; wr_addr <= '0; wr_data <= '0; wr_cb <= '0;
      cnt <= '0; done <= 1'b0; almost_full <= 1'b0;
    end else begin
      almost_full <= 1'b0;
      for (int b = 0; b < NUM_CB; b++)
        if (qn[b] >= (QW+1)'(QD - MARGIN)) almost_full <= 1'b1;
      done <= 1'b0;
      if (l1_valid && !l1_n[0]) begin
        e1[0] <= sm1(l1_hl); e1[1] <= sm1(l1_lh); e1[2] <= sm1(l1_hh);
      end
      if (l2_valid && !l2_n[0]) begin
        e2[0] <= sm2(l2_hl); e2[1] <= sm2(l2_lh); e2[2] <= sm2(l2_hh); e2[3] <= sm2(l2_ll);
      end
      for (int b = 0; b < NUM_CB; b++) begin
        if (push[b]) begin q[b][qt[b]] <= pd[b]; qt[b] <= qt[b] + 1'b1; end
        if (pop[b]) qh[b] <= qh[b] + 1'b1;
        qn[b] <= qn[b] + (QW+1)'(push[b]) - (QW+1)'(pop[b]);
      end
      wr_valid <= any;
      if (any) begin
        wr_addr <= q[sel][qh[sel]].a;
        wr_data <= q[sel][qh[sel]].d;
        wr_cb   <= sel;
        if (cnt == ($clog2(T*T/2)+1)'(T * T / 2 - 1)) begin cnt <= '0; done <= 1'b1; end
        else cnt <= cnt + 1'b1;
      end
    end
  end

  assign wr_c0 = wr_data[10:0];
  assign wr_c1 = wr_data[21:11];

  for (genvar b = 0; b < NUM_CB; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) push[b] |-> qn[b] < (QW+1)'(QD));
  end
endmodule

// psr_ag: parallel-to-serial read address generator of the block coder.
//
// The tile memory holds two coefficients per 24-bit word (horizontal
// neighbours, even column in bits [10:0]). The block coder wants one
// coefficient per cycle in the stripe scan of the code-block: stripes four
// rows high, scanned column by column, each column top to bottom. This unit
// reads, for one column pair of a stripe, the four words of rows 4s..4s+3,
// then emits the eight coefficients: the even column's four, then the odd
// column's four. Two such four-word groups are double-buffered so reading
// the next pair overlaps emitting the current one; it needs four memory
// grants per eight coefficients, and sustains one coefficient per cycle.
//
// Each emitted coefficient is cut at the plane chosen by the RDO: magnitude
// bits below `cut` are cleared (and the sign of a coefficient that becomes
// zero). free_lim tells the write side which words have been consumed: all
// words of the code-block below it may be overwritten.
//
// Interface: start with base/dim/cut; memory requests req/addr, granted
// by gnt; the read word arrives SRAM_LAT cycles after the grant; coefficient
// stream c_valid/c_ready/c_data/c_last; done pulses after the last one.
// Packing two coefficients per word and cutting at the RDO's plane follow
// the paper; the scan of a column pair and the buffering are this design's.
module psr_ag
  import jpeg2k_pkg::*;
#(
  parameter int unsigned LAT = SRAM_LAT   // read latency, >= 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  addr_t      base,
  input  logic [6:0] dim,          // code-block width = height, multiple of 4
  input  logic [3:0] cut,
  output logic       busy,
  output logic       done,
  // memory side
  output logic       req,
  output addr_t      addr,
  input  logic       gnt,
  input  word_t      rdata,
  output addr_t      free_lim,
  // coefficient side
  output logic       c_valid,
  input  logic       c_ready,
  output coef_sm_t   c_data,
  output logic       c_last
);
  typedef enum logic [1:0] {G_EMPTY, G_LOADING, G_FULL} gstate_e;

  logic [5:0]  npair;                // column pairs per stripe - 1
  logic [3:0]  nstripe;              // stripes - 1
  logic [3:0]  cut_q;
  addr_t       base_q;
  logic [5:0]  half;                 // words per row

  // reader position
  logic [3:0]  rs;                   // stripe
  logic [5:0]  rc;                   // column pair
  logic [1:0]  rk;                   // row within stripe
  logic        rdone;                // every word requested
  logic        wg;                   // group being loaded
  gstate_e     gst [2];
  word_t       buf_w [2][4];
  logic        glast [2];            // group holds the final column pair

  // emitter position
  logic        eg;
  logic [2:0]  ej;
  logic        run;

  // read pipeline: {valid, group, row}
  logic [LAT-1:0] pv;
  logic [LAT-1:0] pg;
  logic [1:0]     pk [LAT];

  assign half = dim[6:1];
  assign busy = run;
  assign req  = run && !rdone &&
                ((gst[wg] == G_EMPTY && rk == 2'd0) || (gst[wg] == G_LOADING && rk != 2'd0));
  always_comb addr = base_q + (addr_t'({rs, 2'b00}) + addr_t'(rk)) * addr_t'(half) + addr_t'(rc);
  always_comb free_lim = base_q + addr_t'({rs, 2'b00}) * addr_t'(half);

  // emitted coefficient
  word_t    ew;
  coef_sm_t raw;
  logic [9:0] mmask;
  always_comb begin
    ew  = buf_w[eg][ej[1:0]];
    raw = ej[2] ? ew[21:11] : ew[10:0];
    mmask = ~((10'd1 << cut_q) - 10'd1);
    c_data = {raw[10] & ((raw[9:0] & mmask) != 0), raw[9:0] & mmask};
    if (cut_q >= 4'd10) c_data = '0;
  end
  assign c_valid = run && gst[eg] == G_FULL;
  assign c_last  = c_valid && glast[eg] && ej == 3'd7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0;
      npair <= '0; nstripe <= '0; cut_q <= '0; base_q <= '0;
      rs <= '0; rc <= '0; rk <= '0; rdone <= 1'b0; wg <= 1'b0;
      eg <= 1'b0; ej <= '0;
      pv <= '0; pg <= '0;
      for (int g = 0; g < 2; g++) begin
        gst[g] <= G_EMPTY; glast[g] <= 1'b0;
        for (int k = 0; k < 4; k++) buf_w[g][k] <= '0;
      end
      for (int i = 0; i < LAT; i++) pk[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        base_q <= base; cut_q <= cut;
        npair <= 6'(dim[6:1] - 6'd1);
        nstripe <= 4'(dim[6:2] - 5'd1);
        rs <= '0; rc <= '0; rk <= '0; rdone <= 1'b0; wg <= 1'b0;
        eg <= 1'b0; ej <= '0;
        gst[0] <= G_EMPTY; gst[1] <= G_EMPTY;
      end
      // issue
      pv <= {pv[LAT-2:0], 1'b0};
      pg <= {pg[LAT-2:0], wg};
      pk[0] <= rk;
      for (int i = 1; i < LAT; i++) pk[i] <= pk[i-1];
      if (req && gnt) begin
        pv[0] <= 1'b1;
        if (rk == 2'd0) begin
          gst[wg] <= G_LOADING;
          glast[wg] <= (rs == nstripe) && (rc == npair);
        end
        rk <= rk + 2'd1;
        if (rk == 2'd3) begin
          wg <= ~wg;
          if (rc == npair) begin
            rc <= '0;
            if (rs == nstripe) rdone <= 1'b1;
            else rs <= rs + 4'd1;
          end else rc <= rc + 6'd1;
        end
      end
      // return
      if (pv[LAT-1]) begin
        buf_w[pg[LAT-1]][pk[LAT-1]] <= rdata;
        if (pk[LAT-1] == 2'd3) gst[pg[LAT-1]] <= G_FULL;
      end
      // emit
      if (c_valid && c_ready) begin
        ej <= ej + 3'd1;
        if (ej == 3'd7) begin
          gst[eg] <= G_EMPTY;
          eg <= ~eg;
          if (glast[eg]) begin run <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && run));
endmodule

// ebc_ctrl: sequences the block-coder stage over the seven code-blocks of a
// tile.
//
// For each code-block (HL1, LH1, HH1, HL2, LH2, HH2, LL2) it fetches the
// RDO's cut plane and plane count, starts the read address generator on the
// block's coefficients and the write address generator on the same area,
// waits until the coder reports the block finished (cb_coded), lets the
// write side flush its pending bytes and PPH, and moves on. A block whose
// cut lies at or above its number of non-zero planes is discarded whole:
// neither the reader nor the coder sees it, and only its header (all
// lengths zero) is written; skip tells the coder side. done pulses
// after the last code-block. The areas follow jpeg2k_pkg's memory map: the
// PPH sits in the top 28 words of the block's area, and overflow words are
// taken from the free tails of the earlier blocks' areas: first the previous
// block's (downwards from just below its PPH to the end of its main stream
// words, psw_used at its done), then, when that is used up, the one before,
// and so on; what overflow words a block takes from a tail is remembered
// for the next blocks. The first block has no overflow area.
// Coding the LL band last and placing overflow in already coded subbands
// follow the paper; the exact overflow start is this design's choice.
module ebc_ctrl
  import jpeg2k_pkg::*;
#(
  parameter int unsigned T = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       done,
  // RDO results
  output logic [2:0] cb,
  input  logic [3:0] rdo_cut,
  input  logic [3:0] rdo_planes,
  output logic [3:0] planes,        // of the block being coded
  // read side
  output logic       psr_start,
  output addr_t      psr_base,
  output logic [6:0] psr_dim,
  output logic [3:0] psr_cut,
  input  logic       psr_done,
  // write side
  output logic       psw_start,
  output addr_t      psw_pph,
  output addr_t      psw_ovf,
  output addr_t      psw_ovf_cnt,
  output logic       psw_ovf_load,
  output logic       psw_ovf_more,
  input  logic       psw_ovf_empty,
  input  addr_t      psw_ovf_left,
  input  addr_t      psw_ovf_next,
  input  addr_t      psw_used,
  output logic       psw_flush,
  input  logic       psw_done,
  output logic       all_free,
  // coder
  input  logic       cb_coded,
  output logic       skip
);
  typedef enum logic [2:0] {C_IDLE, C_SETUP, C_RUN, C_FLUSH, C_NEXT} state_e;
  state_e st;
  logic   rd_fin, coded;
  addr_t  used [NUM_CB];   // end of each coded block's main words
  addr_t  rtop [NUM_CB];   // highest free tail word of each coded block
  addr_t  rleft [NUM_CB];  // free tail words of each coded block
  logic [2:0] rj;          // block whose tail is the current region
  logic       rj_ok;

  function automatic addr_t tail_cnt(input addr_t top, input addr_t lo);
    return (top >= lo) ? top - lo + 1'b1 : '0;
  endfunction

  function automatic addr_t area_end(input logic [2:0] c);
    return (c == 3'(NUM_CB - 1)) ? addr_t'(T * T / 2 - 1) : cb_base(c + 3'd1, T) - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; cb <= '0; done <= 1'b0; planes <= '0;
      psr_start <= 1'b0; psr_base <= '0; psr_dim <= '0; psr_cut <= '0;
      psw_start <= 1'b0; psw_pph <= '0; psw_ovf <= '0; psw_flush <= 1'b0;
      rd_fin <= 1'b0; coded <= 1'b0; skip <= 1'b0; psw_ovf_cnt <= '0; psw_ovf_load <= 1'b0;
      rj <= '0; rj_ok <= 1'b0;
      for (int i = 0; i < NUM_CB; i++) begin used[i] <= '0; rtop[i] <= '0; rleft[i] <= '0; end
    end else begin
      done <= 1'b0; psr_start <= 1'b0; psw_start <= 1'b0; psw_flush <= 1'b0;
      psw_ovf_load <= 1'b0;
      // region used up: remember it and move to the next older tail
      if ((st == C_RUN || st == C_FLUSH) && !psw_start && !psw_ovf_load && psw_ovf_empty && rj_ok) begin
        rtop[rj] <= psw_ovf_next; rleft[rj] <= '0;
        if (rj == 0) rj_ok <= 1'b0;
        else begin
          rj <= rj - 3'd1;
          psw_ovf      <= rtop[rj - 3'd1];
          psw_ovf_cnt  <= rleft[rj - 3'd1];
          psw_ovf_load <= 1'b1;
        end
      end
      case (st)
        C_IDLE: if (start) begin st <= C_SETUP; cb <= '0; end
        C_SETUP: begin
          // a block cut below all its non-zero planes is skipped: nothing
          // is read or coded, only its (empty) header is written
          skip <= rdo_cut >= rdo_planes;
          psr_start <= rdo_cut < rdo_planes; psw_start <= 1'b1;
          psr_base <= cb_base(cb, T);
          psr_dim  <= 7'(cb_dim(cb, T));
          psr_cut  <= rdo_cut;
          planes   <= rdo_planes;
          psw_pph  <= area_end(cb) - addr_t'(NUM_PASS - 1);
          // first overflow region: tail of the previous block
          rj <= cb - 3'd1; rj_ok <= cb != 0;
          psw_ovf     <= (cb == 0) ? '0 : rtop[cb - 3'd1];
          psw_ovf_cnt <= (cb == 0) ? '0 : rleft[cb - 3'd1];
          rd_fin <= rdo_cut >= rdo_planes; coded <= rdo_cut >= rdo_planes;
          st <= C_RUN;
        end
        C_RUN: begin
          if (psr_done) rd_fin <= 1'b1;
          if (cb_coded) coded <= 1'b1;
          if ((rd_fin || psr_done) && (coded || cb_coded)) begin
            psw_flush <= 1'b1; st <= C_FLUSH;
          end
        end
        C_FLUSH: if (psw_done) begin
          st <= C_NEXT;
          used[cb] <= psw_used;
          rtop[cb] <= area_end(cb) - addr_t'(NUM_PASS);
          rleft[cb] <= tail_cnt(area_end(cb) - addr_t'(NUM_PASS), psw_used);
          if (rj_ok) begin rtop[rj] <= psw_ovf_next; rleft[rj] <= psw_ovf_left; end
        end
        default: begin   // C_NEXT
          if (cb == 3'(NUM_CB - 1)) begin st <= C_IDLE; done <= 1'b1; end
          else begin cb <= cb + 3'd1; st <= C_SETUP; end
        end
      endcase
    end
  end

  assign all_free     = (st == C_FLUSH) || rd_fin;
  assign psw_ovf_more = rj_ok && rj != 0;
endmodule

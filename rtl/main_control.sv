// main_control: hardwired controller of the tile-level pipeline, made of
// three finite state machines.
//
// The DWT, the block coder (EBC) and bit stream formation (BSF) work on
// three different tiles at once; two tile SRAMs carry the tiles between
// them. In pipeline stage k, SRAM bank (k mod 2) is first read by the BSF
// (tile k-2, whose bit streams it holds) and then written by the DWT
// (tile k), while the EBC codes tile k-1 in the other bank, reading its
// coefficients and writing the bit streams back into the same bank. A
// stage ends when every started unit has finished; then the banks swap.
//   stage FSM   counts stages, swaps banks, decides which units run
//   X FSM       runs BSF then DWT on bank X (they share that bank)
//   Y FSM       runs EBC on bank Y
// The RDO decides at the end of the DWT of a tile and its result is used by
// the EBC in the next stage (rdo_bank tells which result set).
// Units that have nothing to do in a stage get no start and their enables
// stay low (operand isolation).
//
// Interface: tiles_total is the number of tiles to code (0 = run forever);
// tile_avail says a tile of pixels can be streamed in. *_start pulse, *_done
// pulse from the units. bank_x is the bank of the BSF/DWT side.
// The three-stage tile pipeline, the shared SRAM of BSF and DWT, the order
// BSF-then-DWT and the operand isolation follow the paper; how the
// controller is split into its three FSMs is this design's reading.
module main_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,            // pulse: begin coding
  input  logic [15:0] tiles_total,
  input  logic        tile_avail,
  // DWT + RDO
  output logic        dwt_start,
  output logic        dwt_en,
  input  logic        dwt_done,      // all words of the tile written
  output logic        rdo_decide,
  input  logic        rdo_decided,
  output logic [15:0] dwt_tile,
  // EBC
  output logic        ebc_start,
  input  logic        ebc_done,
  output logic [15:0] ebc_tile,
  // BSF
  output logic        bsf_start,
  output logic        bsf_en,
  input  logic        bsf_done,
  output logic [15:0] bsf_tile,
  output logic        bsf_first,
  output logic        bsf_last,
  // banks
  output logic        bank_x,
  output logic        x_is_dwt,      // bank X is owned by the DWT (else BSF)
  output logic        rdo_bank,      // RDO result bank the EBC uses
  output logic        finished,
  output logic [15:0] stage_count
);
  typedef enum logic [1:0] {ST_IDLE, ST_LAUNCH, ST_WAIT, ST_END} stage_e;
  typedef enum logic [2:0] {X_IDLE, X_BSF, X_WAIT_TILE, X_DWT, X_RDO, X_DONE} xstate_e;
  typedef enum logic [1:0] {Y_IDLE, Y_EBC, Y_DONE} ystate_e;

  stage_e  st;
  xstate_e xs;
  ystate_e ys;

  logic [15:0] k;                 // stage number
  logic [15:0] total_q;
  logic        inf;
  logic        run_bsf, run_dwt, run_ebc;

  // tile k exists if k < total (or forever)
  function automatic logic exists(input logic [15:0] t, input logic [15:0] tot, input logic inf_m);
    return inf_m || t < tot;
  endfunction

  assign stage_count = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; xs <= X_IDLE; ys <= Y_IDLE;
      k <= '0; total_q <= '0; inf <= 1'b0;
      run_bsf <= 1'b0; run_dwt <= 1'b0; run_ebc <= 1'b0;
      dwt_start <= 1'b0; ebc_start <= 1'b0; bsf_start <= 1'b0; rdo_decide <= 1'b0;
      dwt_en <= 1'b0; bsf_en <= 1'b0; x_is_dwt <= 1'b0;
      bank_x <= 1'b0; rdo_bank <= 1'b0;
      dwt_tile <= '0; ebc_tile <= '0; bsf_tile <= '0; bsf_first <= 1'b0; bsf_last <= 1'b0;
      finished <= 1'b0;
    end else begin
      dwt_start <= 1'b0; ebc_start <= 1'b0; bsf_start <= 1'b0; rdo_decide <= 1'b0;

      // ---------------- stage FSM ----------------
      case (st)
        ST_IDLE: if (go) begin
          st <= ST_LAUNCH; k <= '0; total_q <= tiles_total; inf <= (tiles_total == 0);
          finished <= 1'b0;
        end
        ST_LAUNCH: begin
          // stage k: DWT tile k, EBC tile k-1, BSF tile k-2
          run_dwt <= exists(k, total_q, inf);
          run_ebc <= k >= 16'd1 && exists(k - 16'd1, total_q, inf);
          run_bsf <= k >= 16'd2 && exists(k - 16'd2, total_q, inf);
          bank_x  <= k[0];
          rdo_bank <= ~k[0];        // results of tile k-1 were stored under its parity
          dwt_tile <= k; ebc_tile <= k - 16'd1; bsf_tile <= k - 16'd2;
          bsf_first <= (k == 16'd2);
          bsf_last  <= !inf && (k - 16'd2 == total_q - 16'd1);
          if (!inf && k >= total_q + 16'd2) begin
            st <= ST_IDLE; finished <= 1'b1;
          end else begin
            st <= ST_WAIT;
            xs <= X_IDLE; ys <= Y_IDLE;
          end
        end
        ST_WAIT: if (xs == X_DONE && ys == Y_DONE) st <= ST_END;
        default: begin   // ST_END
          k <= k + 16'd1;
          st <= ST_LAUNCH;
        end
      endcase

      // ---------------- X FSM: BSF then DWT on bank X ----------------
      if (st == ST_WAIT) begin
        case (xs)
          X_IDLE: begin
            if (run_bsf) begin
              xs <= X_BSF; bsf_start <= 1'b1; bsf_en <= 1'b1; x_is_dwt <= 1'b0;
            end else xs <= X_WAIT_TILE;
          end
          X_BSF: if (bsf_done) begin xs <= X_WAIT_TILE; bsf_en <= 1'b0; end
          X_WAIT_TILE: begin
            if (!run_dwt) xs <= X_DONE;
            else if (tile_avail) begin
              xs <= X_DWT; dwt_start <= 1'b1; dwt_en <= 1'b1; x_is_dwt <= 1'b1;
            end
          end
          X_DWT: if (dwt_done) begin xs <= X_RDO; rdo_decide <= 1'b1; end
          X_RDO: if (rdo_decided) begin xs <= X_DONE; dwt_en <= 1'b0; end
          default: ;
        endcase
        // ---------------- Y FSM: EBC on bank Y ----------------
        case (ys)
          Y_IDLE: if (run_ebc) begin ys <= Y_EBC; ebc_start <= 1'b1; end
                  else ys <= Y_DONE;
          Y_EBC: if (ebc_done) ys <= Y_DONE;
          default: ;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) dwt_done |-> xs == X_DWT);
  assert property (@(posedge clk) disable iff (!rst_n) bsf_done |-> xs == X_BSF);
endmodule

// sram_ag: SRAM address generator / port router of the two off-chip tile
// SRAMs.
//
// Each pipeline stage gives one bank (bank X) to the BSF and then the DWT,
// and the other bank (Y) to the block coder's arbiter. This unit routes the
// requests of those clients, whose addresses are already tile-memory word
// addresses, to the physical bank, and returns read data to the reader of
// each bank. Bank X is driven by the DWT's writes while x_is_dwt is set and
// by the BSF's reads otherwise; an idle client drives no request.
// Routing the addresses of DWT, EBC and BSF to the real SRAMs is the role
// the paper gives this block; the routing rule follows the paper's schedule.
module sram_ag
  import jpeg2k_pkg::*;
(
  input  logic      bank_x,        // bank used by BSF/DWT this stage
  input  logic      x_is_dwt,
  // DWT write client
  input  logic      dwt_we,
  input  addr_t     dwt_addr,
  input  word_t     dwt_wdata,
  // BSF read client
  input  logic      bsf_req,
  input  addr_t     bsf_addr,
  output word_t     bsf_rdata,
  // block coder (after its arbiter)
  input  sram_req_t ebc,
  output word_t     ebc_rdata,
  // the two SRAMs
  output sram_req_t sram [2],
  input  word_t     sram_rdata [2]
);
  sram_req_t xreq;
  always_comb begin
    if (x_is_dwt) xreq = '{req: dwt_we, we: 1'b1, addr: dwt_addr, wdata: dwt_wdata};
    else          xreq = '{req: bsf_req, we: 1'b0, addr: bsf_addr, wdata: '0};
    sram[0] = bank_x ? ebc : xreq;
    sram[1] = bank_x ? xreq : ebc;
    bsf_rdata = sram_rdata[bank_x];
    ebc_rdata = sram_rdata[!bank_x];
  end
endmodule

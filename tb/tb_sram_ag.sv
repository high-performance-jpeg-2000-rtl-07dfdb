// tb_sram_ag: random client requests in every bank assignment; checks that
// each SRAM gets exactly the request of its owner (DWT write, BSF read or
// block coder) and that read data return to the right reader.
module tb_sram_ag;
  import jpeg2k_pkg::*;
  logic bank_x, x_is_dwt, dwt_we, bsf_req;
  addr_t dwt_addr, bsf_addr;
  word_t dwt_wdata, bsf_rdata, ebc_rdata;
  sram_req_t ebc;
  sram_req_t sram [2];
  word_t sram_rdata [2];
  int checks = 0, failures = 0;

  sram_ag dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      sram_req_t ex;
      bank_x = 1'($urandom); x_is_dwt = 1'($urandom);
      dwt_we = 1'($urandom); bsf_req = 1'($urandom);
      dwt_addr = addr_t'($urandom); bsf_addr = addr_t'($urandom); dwt_wdata = word_t'($urandom);
      ebc = '{req: 1'($urandom), we: 1'($urandom), addr: addr_t'($urandom), wdata: word_t'($urandom)};
      sram_rdata[0] = word_t'($urandom); sram_rdata[1] = word_t'($urandom);
      #1;
      ex = x_is_dwt ? '{req: dwt_we, we: 1'b1, addr: dwt_addr, wdata: dwt_wdata}
                    : '{req: bsf_req, we: 1'b0, addr: bsf_addr, wdata: '0};
      checks++;
      if (sram[bank_x] != ex || sram[!bank_x] != ebc) begin failures++; $display("route %0d", i); end
      checks++;
      if (bsf_rdata != sram_rdata[bank_x] || ebc_rdata != sram_rdata[!bank_x]) begin
        failures++; $display("read data %0d", i);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

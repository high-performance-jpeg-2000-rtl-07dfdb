// ebc_model: behavioural stand-in for the block coder engine, for
// system-level simulation only. It accepts one coefficient per cycle (with
// random back-pressure if STALL is set) and codes it without any context
// modelling: for every magnitude plane p the bit goes to the refinement
// stream when the coefficient is already significant above p and to the
// cleanup stream otherwise (with the sign after the first 1; of the zero bits
// of insignificant coefficients only one in eight is sent, a crude stand-in
// for the real coder's compression, so the model is not decodable). Stream
// ids follow the embedded order
// (0: cleanup of plane P-1; 1+3(P-2-p)+{0,1,2}: significance, refinement,
// cleanup of plane p). Bits are packed MSB first into bytes; full bytes leave
// through the five-lane byte port; at the block's last coefficient partial
// bytes are padded and sent, then cb_coded pulses. Every byte is also
// recorded for the testbench to compare with the codestream.
module ebc_model
  import jpeg2k_pkg::*;
#(
  parameter bit STALL = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                c_valid,
  output logic                c_ready,
  input  coef_sm_t            c_data,
  input  logic                c_last,
  input  logic [3:0]          planes,
  output logic [4:0]          b_valid,
  output logic [4:0][7:0]     b_byte,
  output logic [4:0][4:0]     b_sid,
  input  logic                b_ready,
  output logic                cb_coded
);
  byte unsigned out_q [$];       // pending bytes
  byte unsigned sid_q [$];
  byte unsigned rec [NUM_PASS][$];   // bytes of the current block, per stream
  logic [7:0]  acc [NUM_PASS];
  int          nb  [NUM_PASS];
  int          zc  [NUM_PASS];
  int          coef_cnt;
  int          stalls;
  logic        flushing;
  coef_sm_t    got [$];          // coefficients of the current block

  function automatic int sid_of(input int p, input int pl, input int pass);
    if (p == pl - 1) return 0;
    return 1 + 3 * (pl - 2 - p) + pass;   // pass 0 sig, 1 ref, 2 cleanup
  endfunction

  task automatic put_bit(input int s, input logic b);
    acc[s] = {acc[s][6:0], b};
    nb[s]++;
    if (nb[s] == 8) begin out_q.push_back(acc[s]); sid_q.push_back(8'(s)); rec[s].push_back(acc[s]); nb[s] = 0; acc[s] = 0; end
  endtask

  initial begin
    foreach (acc[i]) begin acc[i] = 0; nb[i] = 0; zc[i] = 0; end
    coef_cnt = 0; stalls = 0; flushing = 0;
    c_ready = 0; b_valid = '0; b_byte = '0; b_sid = '0; cb_coded = 0;
  end

  always @(posedge clk) begin
    logic justdone;
    justdone = 1'b0;
    cb_coded <= 1'b0;
    // byte port: lanes taken when ready
    if (b_valid != '0 && b_ready) b_valid <= '0;
    if ((b_valid == '0 || b_ready) && out_q.size() != 0) begin
      logic [4:0] v;
      int n;
      v = '0;
      n = (out_q.size() < 5) ? out_q.size() : $urandom_range(1, 5);
      for (int l = 0; l < n && l < 5; l++) begin
        v[l] = 1'b1; b_byte[l] <= out_q.pop_front(); b_sid[l] <= 5'(sid_q.pop_front());
      end
      b_valid <= v;
    end
    if (flushing && out_q.size() == 0 && (b_valid == '0 || b_ready)) begin
      flushing = 0;
      justdone = 1'b1;
      cb_coded <= 1'b1;
    end
    if (rst_n && c_valid && c_ready) begin
      int pl, m;
      pl = planes;
      m = c_data[9:0];
      got.push_back(c_data);
      for (int p = pl - 1; p >= 0; p--) begin
        logic sig;
        sig = (m >> (p + 1)) != 0;
        if (sig || ((m >> p) & 1)) put_bit(sid_of(p, pl, sig ? 1 : 2), 1'((m >> p) & 1));
        else begin
          // zero bit of an insignificant coefficient: one bit per eight,
          // a crude stand-in for the context coder's compression
          zc[sid_of(p, pl, 2)]++;
          if (zc[sid_of(p, pl, 2)] == 8) begin zc[sid_of(p, pl, 2)] = 0; put_bit(sid_of(p, pl, 2), 1'b0); end
        end
        if (!sig && ((m >> p) & 1)) put_bit(sid_of(p, pl, 2), c_data[10]);
      end
      coef_cnt++;
      if (c_last) begin
        for (int s = 0; s < NUM_PASS; s++)
          if (nb[s] != 0) begin
            logic [7:0] bb;
            bb = acc[s] << (8 - nb[s]);
            out_q.push_back(bb); sid_q.push_back(8'(s)); rec[s].push_back(bb);
            nb[s] = 0; acc[s] = 0;
          end
        foreach (zc[i]) zc[i] = 0;
        flushing = 1;
      end
    end
    c_ready <= (STALL ? ($urandom_range(0, 7) != 0) : 1'b1) && !flushing && !justdone;
    if (STALL && c_valid && !c_ready) stalls++;
  end
endmodule

// fe_model: behavioural model of one front-end transceiver (not synthesizable).
//
// Stands in for an lpGBT (IS_SCA = 0) or a GBT-SCA (IS_SCA = 1) at the far end
// of one 80 Mb/s slow-control stream. It deframes HDLC from the 2-bit/clock
// input, checks the request (parity or CRC-16/X.25 FCS, computed here bit by
// bit and independently of the RTL), applies it to a small register file and,
// DELAY cycles after the closing flag, sends the reply frame. The line idles
// at all ones (not flags), to exercise the receiver's hunting.
//   lpGBT: 256 byte registers at reg_addr[7:0]; writes store nbytes bytes,
//          replies carry the registers' contents after the access.
//   GBT-SCA: one 32-bit register per SCA channel; odd commands write it,
//          even commands read; replies always carry 4 data bytes.
// mute drops requests (no reply); corrupt flips one bit of the next reply's
// check byte. n_req counts good requests, n_bad requests with a bad check.
module fe_model #(
  parameter bit IS_SCA = 1'b0,
  parameter int DELAY  = 8
) (
  input  logic       clk,
  input  logic [1:0] rx,
  output logic [1:0] tx,
  input  logic       mute,
  input  logic       corrupt,
  output int         n_req,
  output int         n_bad
);
  // receive state
  int        ones = 7;
  bit        in_frame = 0;
  bit [7:0]  sh;
  int        nb = 0;
  byte unsigned fr[$];
  bit        txq[$];
  int        wait_cnt = -1;
  bit        txpend[$];
  byte unsigned lp_regs [256];
  logic [31:0]  sca_regs [256];
  bit        corrupt_next = 0;

  initial begin
    n_req = 0;
    n_bad = 0;
    tx    = 2'b11;
    for (int i = 0; i < 256; i++) begin
      lp_regs[i]  = 8'(i * 7 + 3);
      sca_regs[i] = 32'hA5000000 | 32'(i);
    end
  end

  function automatic bit [15:0] crc_bits(byte unsigned b[$]);
    bit [15:0] c = 16'hFFFF;
    foreach (b[k])
      for (int i = 0; i < 8; i++) begin
        bit fb = c[0] ^ b[k][i];
        c = c >> 1;
        if (fb) c = c ^ 16'h8408;
      end
    return c;
  endfunction

  task automatic send_frame(byte unsigned b[$]);
    int o = 0;
    bit [7:0] flag = 8'h7E;
    for (int i = 0; i < 8; i++) txpend.push_back(flag[i]);
    foreach (b[k])
      for (int i = 0; i < 8; i++) begin
        txpend.push_back(b[k][i]);
        o = b[k][i] ? o + 1 : 0;
        if (o == 5) begin
          txpend.push_back(1'b0);
          o = 0;
        end
      end
    for (int i = 0; i < 8; i++) txpend.push_back(flag[i]);
  endtask

  task automatic handle(byte unsigned f[$]);
    byte unsigned r[$];
    bit ok;
    if (!IS_SCA) begin
      byte unsigned par = 0;
      int n, addr;
      bit rd;
      for (int i = 2; i < f.size(); i++) par ^= f[i];
      rd   = f.size() > 1 ? f[1][0] : 1'b0;
      n    = f.size() > 3 ? int'(f[3]) : 0;
      ok   = (f.size() >= 8) && par == 0 && n >= 1 && n <= 4 &&
             f.size() == (rd ? 8 : 8 + n);
      if (!ok) begin n_bad++; return; end
      addr = int'(f[5]);
      if (!rd) for (int i = 0; i < n; i++) lp_regs[(addr + i) % 256] = f[7+i];
      for (int i = 0; i < 7; i++) r.push_back(f[i]);
      for (int i = 0; i < n; i++) r.push_back(lp_regs[(addr + i) % 256]);
      par = 0;
      for (int i = 2; i < r.size(); i++) par ^= r[i];
      r.push_back(corrupt_next ? par ^ 8'h10 : par);
    end else begin
      bit [15:0] c;
      int len, ch;
      logic [31:0] d;
      c   = crc_bits(f);
      len = f.size() > 4 ? int'(f[4]) : 0;
      ok  = (f.size() >= 8) && c == 16'hF0B8 && len <= 4 && f.size() == 8 + len;
      if (!ok) begin n_bad++; return; end
      ch = int'(f[3]);
      if (f[5][0]) begin
        d = '0;
        for (int i = 0; i < len; i++) d[8*i +: 8] = f[6+i];
        sca_regs[ch] = d;
      end
      r.push_back(f[0]); r.push_back(f[1]); r.push_back(f[2]); r.push_back(f[3]);
      r.push_back(8'h00); r.push_back(8'd4);
      for (int i = 0; i < 4; i++) r.push_back(sca_regs[ch][8*i +: 8]);
      c = ~crc_bits(r);
      if (corrupt_next) c[3] = ~c[3];
      r.push_back(c[7:0]); r.push_back(c[15:8]);
    end
    n_req++;
    corrupt_next = 0;
    if (!mute) begin
      send_frame(r);
      wait_cnt = DELAY;
    end
  endtask

  task automatic rx_bit(bit b);
    if (b) begin
      if (ones >= 6) begin ones = 7; in_frame = 0; end
      else if (ones == 5) ones = 6;
      else begin
        ones++;
        if (in_frame) begin sh = {b, sh[7:1]}; nb++; end
      end
    end else begin
      if (ones == 5) ones = 0;
      else if (ones == 6) begin
        if (in_frame && fr.size() > 0 && nb == 6) handle(fr);
        else if (in_frame && fr.size() > 0) n_bad++;
        fr.delete();
        in_frame = 1; nb = 0; ones = 0;
      end else begin
        ones = 0;
        if (in_frame) begin sh = {b, sh[7:1]}; nb++; end
      end
    end
    if (in_frame && nb == 8) begin
      fr.push_back(sh);
      nb = 0;
    end
  endtask

  always @(posedge clk) begin
    bit b0, b1;
    if (corrupt) corrupt_next = 1;
    rx_bit(rx[0]);
    rx_bit(rx[1]);
    if (wait_cnt > 0) wait_cnt--;
    else if (wait_cnt == 0) begin
      while (txpend.size() > 0) txq.push_back(txpend.pop_front());
      wait_cnt = -1;
    end
    b0 = txq.size() > 0 ? txq.pop_front() : 1'b1;
    b1 = txq.size() > 0 ? txq.pop_front() : 1'b1;
    tx <= {b1, b0};
  end

endmodule

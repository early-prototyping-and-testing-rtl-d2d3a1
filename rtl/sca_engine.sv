// sca_engine: GBT-SCA HDLC protocol engine.
//
// Converts one 128-bit software request (sc_pkg::sca_req_t) into a GBT-SCA
// HDLC frame, sends it on the 80 Mb/s stream through hdlc_tx, then collects the
// SCA's reply through hdlc_rx and converts it into a 128-bit reply word
// (sc_pkg::sca_rsp_t).
//
// Request frame, bytes in line order (between flags):
//   address, control, trid, sca_chan, length, command, data (length bytes,
//   0..4, data[7:0] first), FCS[7:0], FCS[15:8]
// Reply frame:
//   address, control, trid, sca_chan, error, length, data (length bytes), FCS
// The FCS is CRC-16/X.25 over all bytes before it (sc_pkg::crc16_byte, then
// complemented). A reply with a wrong FCS or length, or one that ends off a
// byte boundary, is returned with status ST_BADFRM. The HDLC control byte
// (sequence numbers) is supplied by software and passed through untouched.
//
// Handshake: req_valid/req_ready (ready only when idle); rsp_valid pulses for
// one cycle with the reply. cancel drops a pending request.
//
// That the GBT-SCA is reached over HDLC, and the engine's role, are the
// document's; the field order and the CRC are this design's reading of the
// GBT-SCA frame, which the document cites but does not spell out.
module sca_engine
  import sc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [127:0] req,
  output logic         rsp_valid,
  output logic [127:0] rsp,
  input  logic         cancel,
  output logic [1:0]   tx_o,
  input  logic [1:0]   rx_i
);

  typedef enum logic [1:0] {E_IDLE, E_SEND, E_WAIT} est_e;
  est_e st;

  logic [5:0] chan_q;  // channel of the pending request
  logic [7:0] fbuf [MAX_FRAME];
  logic [4:0] flen, fidx;
  logic [7:0] rbuf [MAX_FRAME];
  logic [4:0] rlen;

  // hdlc links
  logic       t_valid, t_ready, t_last;
  logic [7:0] t_data;
  logic       r_valid, r_eof, r_eok, urun;
  logic [7:0] r_data;

  hdlc_tx u_tx (.clk, .rst, .s_valid(t_valid), .s_ready(t_ready), .s_data(t_data),
                .s_last(t_last), .tx_o, .underrun(urun));
  hdlc_rx u_rx (.clk, .rst, .rx_i, .m_valid(r_valid), .m_data(r_data),
                .eof(r_eof), .eof_ok(r_eok));

  assign req_ready = (st == E_IDLE);
  assign t_valid   = (st == E_SEND);
  assign t_data    = fbuf[fidx[3:0]];
  assign t_last    = (fidx == flen - 5'd1);

  // Build the request frame from the request word.
  function automatic void build(input sca_req_t q, output logic [7:0] f [MAX_FRAME],
                                output logic [4:0] n);
    logic [15:0] crc;
    logic [2:0]  len;
    for (int i = 0; i < MAX_FRAME; i++) f[i] = 8'h00;
    len  = (q.length > 8'd4) ? 3'd4 : q.length[2:0];
    f[0] = q.address;
    f[1] = q.control;
    f[2] = q.trid;
    f[3] = q.sca_chan;
    f[4] = {5'd0, len};
    f[5] = q.command;
    for (int i = 0; i < 4; i++)
      if (i < int'(len)) f[6+i] = q.data[8*i +: 8];
    n   = 5'd6 + {2'd0, len};
    crc = 16'hFFFF;
    for (int i = 0; i < MAX_FRAME - 2; i++)
      if (i < int'(n)) crc = crc16_byte(crc, f[i]);
    crc = ~crc;
    f[n[3:0]]        = crc[7:0];
    f[n[3:0] + 4'd1] = crc[15:8];
    n = n + 5'd2;
  endfunction

  // Decode a reply frame.
  function automatic sca_rsp_t decode(input logic [7:0] f [MAX_FRAME], input logic [4:0] n,
                                      input logic aligned, input logic [5:0] chan);
    sca_rsp_t    p;
    logic [15:0] crc;
    logic [7:0]  len;
    p          = '0;
    p.channel  = chan;
    p.address  = f[0];
    p.control  = f[1];
    p.trid     = f[2];
    p.sca_chan = f[3];
    p.error    = f[4];
    len        = f[5];
    p.length   = len;
    for (int i = 0; i < 4; i++)
      if (i < int'(len)) p.data[8*i +: 8] = f[6+i];
    // CRC over data and FCS leaves the X.25 residue 0xF0B8 when intact
    crc = 16'hFFFF;
    for (int i = 0; i < MAX_FRAME; i++)
      if (i < int'(n)) crc = crc16_byte(crc, f[i]);
    if (!aligned || len > 8'd4 || n != 5'd8 + len[4:0] || crc != 16'hF0B8)
      p.status = ST_BADFRM;
    else
      p.status = ST_OK;
    return p;
  endfunction

  logic [7:0] f_new [MAX_FRAME];
  logic [4:0] n_new;
  sca_rsp_t rsp_dec;

  always_comb begin
    build(sca_req_t'(req), f_new, n_new);
    // r_valid and r_eof never coincide, so rbuf/rlen hold the whole frame
    rsp_dec = decode(rbuf, rlen, r_eok, chan_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= E_IDLE;
      fidx      <= '0;
      flen      <= '0;
      rlen      <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      chan_q    <= '0;
      for (int i = 0; i < MAX_FRAME; i++) begin
        fbuf[i] <= '0;
        rbuf[i] <= '0;
      end
    end else begin
      rsp_valid <= 1'b0;
      if (r_valid && rlen < 5'(MAX_FRAME)) begin
        rbuf[rlen[3:0]] <= r_data;
        rlen       <= rlen + 5'd1;
      end
      if (r_eof) rlen <= '0;
      unique case (st)
        E_IDLE: if (req_valid) begin
          chan_q <= req[127:122];
          fbuf <= f_new;
          flen <= n_new;
          fidx <= '0;
          rlen <= '0;
          st   <= E_SEND;
        end
        E_SEND: if (t_ready) begin
          fidx <= fidx + 5'd1;
          if (t_last) st <= E_WAIT;
        end
        E_WAIT: if (r_eof) begin
          rsp       <= rsp_dec;
          rsp_valid <= 1'b1;
          st        <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
      if (cancel) st <= E_IDLE;
    end
  end

endmodule

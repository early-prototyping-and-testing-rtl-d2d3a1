// lpgbt_engine: lpGBT internal-control (IC) protocol engine.
//
// Converts one 128-bit software request (sc_pkg::lpgbt_req_t) into an IC frame,
// sends it on the 80 Mb/s stream through hdlc_tx, then collects the lpGBT's
// reply frame through hdlc_rx and converts it into a 128-bit reply word
// (sc_pkg::lpgbt_rsp_t).
//
// Request frame, bytes in line order:
//   0x00, {chip_addr, rd}, command, nbytes, 0x00, reg_addr[7:0], reg_addr[15:8],
//   write data (nbytes bytes, writes only), parity
// Reply frame: the same header, then nbytes data bytes (the register contents
// after the access), then parity. Parity is the XOR of every byte from
// `command` up to the last data byte. A reply whose length or parity is wrong,
// or that ends off a byte boundary, is returned with status ST_BADFRM.
//
// Handshake: req_valid/req_ready (ready only when idle); rsp_valid pulses for
// one cycle with the reply. cancel (from the transactor's timeout) drops a
// pending request and ignores any reply that arrives later.
//
// The engine's role (software data to lpGBT transactions and back) is the
// document's; the frame layout above is this design's reading of the lpGBT IC
// format, which the document cites but does not spell out.
module lpgbt_engine
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
  function automatic void build(input lpgbt_req_t q, output logic [7:0] f [MAX_FRAME],
                                output logic [4:0] n);
    logic [7:0] par;
    logic [2:0] nb;
    for (int i = 0; i < MAX_FRAME; i++) f[i] = 8'h00;
    nb   = (q.nbytes == 3'd0) ? 3'd1 : (q.nbytes > 3'd4 ? 3'd4 : q.nbytes);
    f[0] = 8'h00;
    f[1] = {q.chip_addr, q.rd};
    f[2] = q.command;
    f[3] = {5'd0, nb};
    f[4] = 8'h00;
    f[5] = q.reg_addr[7:0];
    f[6] = q.reg_addr[15:8];
    n    = 5'd7;
    if (!q.rd) begin
      for (int i = 0; i < 4; i++)
        if (i < int'(nb)) f[7+i] = q.data[8*i +: 8];
      n = 5'd7 + {2'd0, nb};
    end
    par = 8'h00;
    for (int i = 2; i < MAX_FRAME - 1; i++)
      if (i < int'(n)) par = par ^ f[i];
    f[n[3:0]] = par;
    n    = n + 5'd1;
  endfunction

  // Decode a reply frame.
  function automatic lpgbt_rsp_t decode(input logic [7:0] f [MAX_FRAME], input logic [4:0] n,
                                        input logic aligned, input logic [5:0] chan);
    lpgbt_rsp_t p;
    logic [7:0] par;
    logic [2:0] nb;
    p           = '0;
    p.channel   = chan;
    p.chip_addr = f[1][7:1];
    p.rd        = f[1][0];
    p.command   = f[2];
    nb          = f[3][2:0];
    p.nbytes    = nb;
    p.reg_addr  = {f[6], f[5]};
    for (int i = 0; i < 4; i++)
      if (i < int'(nb)) p.data[8*i +: 8] = f[7+i];
    par = 8'h00;
    for (int i = 2; i < MAX_FRAME; i++)
      if (i < int'(n)) par = par ^ f[i];   // includes the parity byte: 0 if good
    if (!aligned || nb == 3'd0 || nb > 3'd4 || f[3][7:3] != 5'd0 ||
        n != 5'd8 + {2'd0, nb} || par != 8'h00)
      p.status = ST_BADFRM;
    else
      p.status = ST_OK;
    return p;
  endfunction

  logic [7:0] f_new [MAX_FRAME];
  logic [4:0] n_new;
  lpgbt_rsp_t rsp_dec;

  always_comb begin
    build(lpgbt_req_t'(req), f_new, n_new);
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

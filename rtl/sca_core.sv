// sca_core: one GBT-SCA slow-control core.
//
// A transactor (sc_transactor), a GBT-SCA HDLC engine (sca_engine) and a 1:MUX
// channel multiplexer (sc_chan_mux) in a chain: the transactor takes words
// from this core's send buffer, the engine turns each into an HDLC frame on the
// 80 Mb/s stream, the multiplexer puts the stream on the GBT-SCA the word names,
// and the reply travels back the same way into the receive buffer. The two
// buffers live in sc_mem_ctrl; this core sees their core-side ports.
//
// Streams are 2 bits per clock at 40 MHz, ch_tx[i][0] first in time. A
// transaction costs the frame times on the line in both directions, the
// front-end's reply delay, two multiplexer register stages each way and five
// transactor cycles.
//
// The structure and the multiplexing factor of 40 are the document's.
module sca_core #(
  parameter int unsigned MUX   = 40,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          clear,
  input  logic [AW:0]   count,
  input  logic [31:0]   timeout,
  output logic          busy,
  output logic          done,
  output logic [31:0]   n_done,
  output logic [31:0]   n_timeout,
  output logic [31:0]   n_error,
  output logic          sb_en,
  output logic [AW-1:0] sb_addr,
  input  logic [127:0]  sb_rdata,
  output logic          rb_we,
  output logic [AW-1:0] rb_addr,
  output logic [127:0]  rb_wdata,
  output logic [1:0]    ch_tx [MUX],
  input  logic [1:0]    ch_rx [MUX]
);

  logic         req_valid, req_ready, rsp_valid, cancel;
  logic [127:0] req, rsp;
  logic [5:0]   chan;
  logic [1:0]   eng_tx, eng_rx;

  sc_transactor #(.DEPTH(DEPTH)) u_trn (
    .clk, .rst, .start, .clear, .count, .timeout, .busy, .done, .n_done, .n_timeout,
    .n_error, .sb_en, .sb_addr, .sb_rdata, .rb_we, .rb_addr, .rb_wdata,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp, .cancel, .chan);

  sca_engine u_eng (
    .clk, .rst, .req_valid, .req_ready, .req, .rsp_valid, .rsp, .cancel,
    .tx_o(eng_tx), .rx_i(eng_rx));

  sc_chan_mux #(.N(MUX), .SW(6)) u_mux (
    .clk, .rst, .sel(chan), .eng_tx, .eng_rx, .ch_tx, .ch_rx);

endmodule

// sc_chan_mux: 1:N channel multiplexer of a slow-control core.
//
// A core has one protocol engine but serves N front-end transceivers (16 for
// an lpGBT core, 40 for a GBT-SCA core). The transactor names the channel of
// the transaction in progress on sel; this block routes the engine's 2-bit
// (80 Mb/s) output to that channel and returns that channel's input stream to
// the engine. Unselected outputs hold the idle level 2'b11 (an all-ones line,
// which an HDLC receiver ignores), and a sel of N or more selects nothing.
// Both directions are registered: one cycle of latency each way.
//
// The multiplexing factors are the architecture's; the idle level and the
// registering are this design's choices.
module sc_chan_mux #(
  parameter int unsigned N  = 16,
  parameter int unsigned SW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] sel,
  input  logic [1:0]    eng_tx,
  output logic [1:0]    eng_rx,
  output logic [1:0]    ch_tx [N],
  input  logic [1:0]    ch_rx [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      eng_rx <= 2'b11;
      for (int i = 0; i < N; i++) ch_tx[i] <= 2'b11;
    end else begin
      eng_rx <= 2'b11;
      for (int i = 0; i < N; i++) begin
        ch_tx[i] <= (int'(sel) == i) ? eng_tx : 2'b11;
        if (int'(sel) == i) eng_rx <= ch_rx[i];
      end
    end
  end

endmodule

// hdlc_tx: HDLC framer for one 80 Mb/s slow-control stream.
//
// The stream leaves the FPGA fabric as a 2-bit word per 40 MHz clock, so this
// framer produces two line bits per cycle: tx_o[0] is the earlier bit, tx_o[1]
// the later. Between frames the line carries back-to-back flags (0x7E). A frame
// starts after one complete flag sent while its first byte was already
// waiting, so a receiver that has just been switched onto this stream (the
// channel multiplexer changes channel right before a request) still sees a
// whole opening flag. Bytes go out LSB first, a 0 is inserted after every five consecutive 1s, and the frame is
// closed by one flag after the byte marked s_last. Check bytes (parity or FCS)
// are not computed here; the engines append them as ordinary bytes.
//
// Interface: byte stream s_valid/s_ready/s_data/s_last with a one-byte holding
// register, so s_ready is high whenever the holding register is empty. A
// frame's bytes must follow each other without gaps; s_valid low after a byte
// that is not last ends the frame early and raises underrun for one cycle.
// Latency: tx_o is registered; the first bit of a frame leaves 4 to 8 cycles
// (one to two flags) after its first byte is accepted.
//
// HDLC framing and bit stuffing follow the protocol named for the GBT-SCA link;
// the 2-bit/40 MHz form is the document's; the bit order within the 2-bit word
// and the idle-flag choice are this design's.
module hdlc_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       s_valid,
  output logic       s_ready,
  input  logic [7:0] s_data,
  input  logic       s_last,
  output logic [1:0] tx_o,
  output logic       underrun
);
  import sc_pkg::*;

  typedef enum logic {PH_FLAG, PH_DATA} phase_e;

  typedef struct packed {
    phase_e     phase;
    logic [2:0] bitidx;   // bit of the current flag or byte
    logic [2:0] ones;     // consecutive 1s sent inside a frame
    logic       closing;  // last byte sent, flag comes next
    logic       armed;    // a byte was waiting when this flag started
    logic [7:0] cur;      // byte being sent
    logic       cur_last;
    logic       nxt_v;    // holding register
    logic [7:0] nxt;
    logic       nxt_last;
    logic       urun;
  } st_t;

  st_t st_q, st_d;
  logic [1:0] bits_d;

  // Produce one line bit and advance the state.
  function automatic st_t step(input st_t s, output logic b);
    st_t n;
    n = s;
    b = 1'b1;
    if (n.phase == PH_DATA && n.ones == 3'd5) begin
      b      = 1'b0;            // stuffed zero
      n.ones = 3'd0;
    end else begin
      if (n.phase == PH_DATA && n.closing) begin
        n.phase   = PH_FLAG;
        n.bitidx  = 3'd0;
        n.closing = 1'b0;
      end
      if (n.phase == PH_FLAG) begin
        b = HDLC_FLAG[n.bitidx];
        if (n.bitidx == 3'd0) n.armed = n.nxt_v;
        if (n.bitidx == 3'd7) begin
          n.bitidx = 3'd0;
          n.ones   = 3'd0;
          if (n.nxt_v && n.armed) begin
            n.phase    = PH_DATA;
            n.cur      = n.nxt;
            n.cur_last = n.nxt_last;
            n.nxt_v    = 1'b0;
          end
        end else begin
          n.bitidx = n.bitidx + 3'd1;
        end
      end else begin
        b      = n.cur[n.bitidx];
        n.ones = b ? n.ones + 3'd1 : 3'd0;
        if (n.bitidx == 3'd7) begin
          n.bitidx = 3'd0;
          if (n.cur_last) begin
            n.closing = 1'b1;
          end else if (n.nxt_v) begin
            n.cur      = n.nxt;
            n.cur_last = n.nxt_last;
            n.nxt_v    = 1'b0;
          end else begin
            n.closing = 1'b1;   // no byte ready: end the frame here
            n.urun    = 1'b1;
          end
        end else begin
          n.bitidx = n.bitidx + 3'd1;
        end
      end
    end
    return n;
  endfunction

  assign s_ready = !st_q.nxt_v;

  always_comb begin
    st_t s;
    logic b0, b1;
    s      = st_q;
    s.urun = 1'b0;
    s      = step(s, b0);
    s      = step(s, b1);
    bits_d = {b1, b0};
    if (s_valid && !st_q.nxt_v) begin
      s.nxt_v    = 1'b1;
      s.nxt      = s_data;
      s.nxt_last = s_last;
    end
    st_d = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q     <= '0;
      tx_o     <= 2'b11;
      underrun <= 1'b0;
    end else begin
      st_q     <= st_d;
      tx_o     <= bits_d;
      underrun <= st_d.urun;
    end
  end

endmodule

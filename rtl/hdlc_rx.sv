// hdlc_rx: HDLC deframer for one 80 Mb/s slow-control return stream.
//
// Takes two line bits per 40 MHz clock (rx_i[0] earlier) and recovers the
// bytes of each frame. It hunts for a flag (0x7E); between two flags it removes
// the 0 that follows five consecutive 1s and assembles bytes LSB first. Seven
// or more 1s (an idle or aborted line) drop the frame in progress.
//
// Bytes are emitted as soon as they are complete (m_valid, m_data). When the
// closing flag arrives after at least one byte, eof pulses with eof_ok high if
// the frame ended on a byte boundary. The flag's own leading 0 and five 1s
// enter the byte assembler before the flag is recognised; for an aligned frame
// that leaves exactly six bits pending, which is how alignment is checked and
// why no flag bit ever reaches m_data. Check bytes are passed on as data; the
// engines verify them.
//
// Timing: outputs are registered, one cycle after the bits that complete them.
// At most one byte and one eof per cycle. Framing follows HDLC; everything
// else is this design's choice.
module hdlc_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] rx_i,
  output logic       m_valid,
  output logic [7:0] m_data,
  output logic       eof,
  output logic       eof_ok
);

  typedef struct packed {
    logic       in_frame;
    logic [2:0] ones;     // consecutive 1s, saturating at 7
    logic [2:0] bitcnt;   // bits of the byte being assembled
    logic [7:0] sh;
    logic       any;      // at least one byte in this frame
    // per-cycle outputs
    logic       bv;
    logic [7:0] bd;
    logic       ev;
    logic       eok;
  } st_t;

  st_t st_q, st_d;

  function automatic st_t add_bit(input st_t s, input logic b);
    st_t n;
    n = s;
    if (n.in_frame) begin
      n.sh = {b, n.sh[7:1]};
      if (n.bitcnt == 3'd7) begin
        n.bitcnt = 3'd0;
        n.bv     = 1'b1;
        n.bd     = {b, s.sh[7:1]};
        n.any    = 1'b1;
      end else begin
        n.bitcnt = n.bitcnt + 3'd1;
      end
    end
    return n;
  endfunction

  function automatic st_t step(input st_t s, input logic b);
    st_t n;
    n = s;
    if (b) begin
      if (n.ones >= 3'd6) begin
        n.ones     = 3'd7;          // abort / idle
        n.in_frame = 1'b0;
      end else if (n.ones == 3'd5) begin
        n.ones = 3'd6;              // flag candidate, not data
      end else begin
        n.ones = n.ones + 3'd1;
        n     = add_bit(n, 1'b1);
      end
    end else begin
      if (n.ones == 3'd5) begin
        n.ones = 3'd0;              // stuffed zero
      end else if (n.ones == 3'd6) begin
        if (n.in_frame && n.any) begin
          n.ev  = 1'b1;
          n.eok = (n.bitcnt == 3'd6);
        end
        n.ones     = 3'd0;
        n.in_frame = 1'b1;          // a flag opens the next frame
        n.bitcnt   = 3'd0;
        n.any      = 1'b0;
      end else begin
        n.ones = 3'd0;
        n      = add_bit(n, 1'b0);
      end
    end
    return n;
  endfunction

  always_comb begin
    st_t s;
    s     = st_q;
    s.bv  = 1'b0;
    s.ev  = 1'b0;
    s.eok = 1'b0;
    s     = step(s, rx_i[0]);
    s     = step(s, rx_i[1]);
    st_d  = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q      <= '0;
      st_q.ones <= 3'd7;
    end else begin
      st_q <= st_d;
    end
  end

  assign m_valid = st_q.bv;
  assign m_data  = st_q.bd;
  assign eof     = st_q.ev;
  assign eof_ok  = st_q.eok;

endmodule

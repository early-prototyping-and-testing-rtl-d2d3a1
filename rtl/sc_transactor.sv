// sc_transactor: the control state machine of one slow-control core.
//
// Software loads COUNT transaction words into the send buffer and pulses
// start. The transactor then runs them strictly one after another: it reads
// word i from the send buffer, selects its channel on the multiplexer, hands
// it to the protocol engine and waits for the engine's reply. The reply is
// written to word i of the receive buffer, and only then is word i+1 read.
// If no reply arrives within `timeout` cycles after the request was accepted,
// the engine is cancelled and the request word itself, with its status field
// (bits 121:120) set to ST_TIMEOUT, is written as the reply. done rises after
// the last word and stays high until the next start; the counters count
// completed, timed-out and bad-check transactions since the last clear.
//
// States: IDLE -> RD (read send buffer) -> LAT (capture word) -> ISSUE
// (req_valid until req_ready) -> WAIT (reply or timeout) -> WR (write receive
// buffer) -> RD or IDLE. Per transaction this adds 5 cycles to the engine's
// time on the line.
//
// One transaction at a time and the timeout exception are the document's; the
// start/count control, the in-place reply slot and the timeout word are this
// design's choices.
module sc_transactor #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // control and status
  input  logic          start,
  input  logic          clear,
  input  logic [AW:0]   count,
  input  logic [31:0]   timeout,
  output logic          busy,
  output logic          done,
  output logic [31:0]   n_done,
  output logic [31:0]   n_timeout,
  output logic [31:0]   n_error,
  // send buffer (read) and receive buffer (write)
  output logic          sb_en,
  output logic [AW-1:0] sb_addr,
  input  logic [127:0]  sb_rdata,
  output logic          rb_we,
  output logic [AW-1:0] rb_addr,
  output logic [127:0]  rb_wdata,
  // engine
  output logic          req_valid,
  input  logic          req_ready,
  output logic [127:0]  req,
  input  logic          rsp_valid,
  input  logic [127:0]  rsp,
  output logic          cancel,
  output logic [5:0]    chan
);
  import sc_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_RD, T_LAT, T_ISSUE, T_WAIT, T_WR} tst_e;
  tst_e st;

  logic [AW:0]  idx, cnt_q;
  logic [31:0]  timer;
  logic [127:0] reply;

  assign busy      = (st != T_IDLE);
  assign sb_en     = (st == T_RD);
  assign sb_addr   = idx[AW-1:0];
  assign rb_we     = (st == T_WR);
  assign rb_addr   = idx[AW-1:0];
  assign rb_wdata  = reply;
  assign req_valid = (st == T_ISSUE);
  assign chan      = req[127:122];

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= T_IDLE;
      idx       <= '0;
      cnt_q     <= '0;
      timer     <= '0;
      reply     <= '0;
      req       <= '0;
      done      <= 1'b0;
      cancel    <= 1'b0;
      n_done    <= '0;
      n_timeout <= '0;
      n_error   <= '0;
    end else begin
      cancel <= 1'b0;
      if (clear) begin
        n_done    <= '0;
        n_timeout <= '0;
        n_error   <= '0;
      end
      unique case (st)
        T_IDLE: if (start && count != '0) begin
          idx   <= '0;
          cnt_q <= (count > (AW+1)'(DEPTH)) ? (AW+1)'(DEPTH) : count;
          done  <= 1'b0;
          st    <= T_RD;
        end
        T_RD:  st <= T_LAT;
        T_LAT: begin
          req <= sb_rdata;
          st  <= T_ISSUE;
        end
        T_ISSUE: if (req_ready) begin
          timer <= '0;
          st    <= T_WAIT;
        end
        T_WAIT: begin
          if (rsp_valid) begin
            reply <= rsp;
            if (rsp[121:120] == ST_BADFRM) n_error <= n_error + 32'd1;
            st <= T_WR;
          end else if (timer >= timeout) begin
            reply          <= req;
            reply[121:120] <= ST_TIMEOUT;
            cancel         <= 1'b1;
            n_timeout      <= n_timeout + 32'd1;
            st             <= T_WR;
          end else begin
            timer <= timer + 32'd1;
          end
        end
        T_WR: begin
          n_done <= n_done + 32'd1;
          idx    <= idx + 1'b1;
          if (idx + 1'b1 == cnt_q) begin
            done <= 1'b1;
            st   <= T_IDLE;
          end else begin
            st <= T_RD;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // Only one transaction may be outstanding: no new request while waiting.
  a_one_outstanding: assert property (@(posedge clk) disable iff (rst)
    (st == T_WAIT) |-> !req_valid);

endmodule

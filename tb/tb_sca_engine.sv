// tb_sca_engine: sca_engine against the behavioural GBT-SCA (fe_model).
//
// Writes random 32-bit values to random SCA channel registers (odd command),
// reads them back (even command) and compares with a mirror kept here; the
// HDLC address/control/transaction-ID bytes must be echoed. Also checks that a
// reply with a corrupted FCS is flagged ST_BADFRM, that a muted front-end gives
// no reply and the engine recovers after cancel, and that a 4-byte write takes
// fewer than 174 cycles (230 000 transactions/s at 40 MHz).
`timescale 1ns/1ps
module tb_sca_engine;
  import sc_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic req_valid = 0, req_ready, rsp_valid, cancel = 0;
  logic [127:0] req = '0, rsp;
  logic [1:0] tx, rx;
  logic mute = 0, corrupt = 0;
  int n_req, n_bad;
  int checks = 0, failures = 0;
  logic [31:0] mirror [256];

  sca_engine dut (.clk, .rst, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
                  .cancel, .tx_o(tx), .rx_i(rx));
  fe_model #(.IS_SCA(1), .DELAY(6)) fe (.clk, .rx(tx), .tx(rx), .mute, .corrupt,
                                        .n_req, .n_bad);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xact(sca_req_t q, output sca_rsp_t p, output int cyc, output bit got);
    int t = 0;
    @(negedge clk);
    req = q; req_valid = 1;
    while (!req_ready) begin @(negedge clk); t++; end
    @(negedge clk); req_valid = 0;
    got = 0;
    while (t < 2000) begin
      if (rsp_valid) begin got = 1; p = sca_rsp_t'(rsp); break; end
      @(negedge clk); t++;
    end
    cyc = t;
  endtask

  initial begin
    sca_req_t q;
    sca_rsp_t p;
    int cyc, ch;
    bit got;
    for (int i = 0; i < 256; i++) mirror[i] = 32'hA5000000 | 32'(i);
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    for (int it = 0; it < 40; it++) begin
      ch = $urandom % 256;
      q = '0; q.channel = 6'(it % 40); q.address = 8'h00; q.control = 8'(it * 2);
      q.trid = 8'(it + 1); q.sca_chan = 8'(ch); q.length = 8'd4; q.command = 8'h11;
      q.data = $urandom;
      xact(q, p, cyc, got);
      mirror[ch] = q.data;
      check(got && p.status == ST_OK && p.trid == q.trid && p.control == q.control &&
            p.sca_chan == q.sca_chan && p.channel == q.channel && p.error == 8'h00,
            "write reply header");
      check(p.length == 8'd4 && p.data == mirror[ch], "write reply data");
      q.command = 8'h10; q.length = 8'd0; q.data = '0;
      ch = $urandom % 256; q.sca_chan = 8'(ch);
      xact(q, p, cyc, got);
      check(got && p.status == ST_OK && p.data == mirror[ch], "read data");
    end
    q = '0; q.trid = 8'd9; q.sca_chan = 8'd2; q.length = 8'd4; q.command = 8'h11;
    q.data = 32'hDEADBEEF;
    xact(q, p, cyc, got);
    mirror[2] = q.data;
    $display("4-byte write: %0d cycles", cyc);
    check(got && cyc < 174, "GBT-SCA transaction within 174 cycles");
    corrupt = 1; @(negedge clk); corrupt = 0;
    q.command = 8'h10; q.length = 0;
    xact(q, p, cyc, got);
    check(got && p.status == ST_BADFRM, "corrupted FCS flagged");
    mute = 1;
    xact(q, p, cyc, got);
    check(!got, "muted front-end gives no reply");
    cancel = 1; @(negedge clk); cancel = 0; mute = 0;
    check(req_ready, "ready after cancel");
    xact(q, p, cyc, got);
    check(got && p.status == ST_OK && p.data == 32'hDEADBEEF, "works after cancel");
    check(n_bad == 0, "front-end saw no bad request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sca_core: one GBT-SCA core driving 40 behavioural GBT-SCAs.
//
// The send buffer (a model here) holds 300 transactions over all 40 channels:
// writes of random values to random SCA channel registers, each followed by a
// read-back, plus a few aimed at channel 45, which does not exist and must
// time out. After done, every reply is checked against per-device register
// mirrors (including the echoed HDLC address, control and transaction ID),
// together with the counters, the number of requests each front-end
// received, and the sustained rate: above 230 000
// transactions/s at 40 MHz, i.e. under 174 cycles per transaction.
`timescale 1ns/1ps
module tb_sca_core;
  import sc_pkg::*;
  localparam int MUX = 40, D = 1024, N = 300;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, clear = 0, busy, done;
  logic [10:0] count = 0;
  logic [31:0] timeout = 32'd400, n_done, n_timeout, n_error;
  logic sb_en, rb_we;
  logic [9:0] sb_addr, rb_addr;
  logic [127:0] sb_rdata, rb_wdata;
  logic [127:0] sbuf [N], rbuf [N];
  logic [1:0] ch_tx [MUX], ch_rx [MUX];
  int n_req [MUX], n_bad [MUX];

  sca_core #(.MUX(MUX), .DEPTH(D)) dut (.clk, .rst, .start, .clear, .count, .timeout,
    .busy, .done, .n_done, .n_timeout, .n_error, .sb_en, .sb_addr, .sb_rdata, .rb_we,
    .rb_addr, .rb_wdata, .ch_tx, .ch_rx);

  for (genvar i = 0; i < MUX; i++) begin : g_fe
    fe_model #(.IS_SCA(1), .DELAY(8)) fe (.clk, .rx(ch_tx[i]), .tx(ch_rx[i]), .mute(1'b0),
      .corrupt(1'b0), .n_req(n_req[i]), .n_bad(n_bad[i]));
  end

  always @(posedge clk) begin
    if (sb_en) sb_rdata <= sbuf[sb_addr];
    if (rb_we) rbuf[rb_addr] <= rb_wdata;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] mirror [MUX][256];
    sca_req_t q, pq;
    sca_rsp_t p;
    int t0, cyc, ntmo, ch, sc;
    for (int c = 0; c < MUX; c++) for (int i = 0; i < 256; i++) mirror[c][i] = 32'hA5000000 | 32'(i);
    ntmo = 0;
    for (int i = 0; i < N; i++) begin
      q = '0;
      q.channel  = (i % 97 == 50) ? 6'd45 : 6'($urandom % MUX);
      q.address  = 8'h00;
      q.control  = 8'($urandom);
      q.trid     = 8'(i);
      q.sca_chan = 8'($urandom);
      q.command  = 8'h11;
      q.length   = 8'd4;
      q.data     = $urandom;
      if (i % 2 == 1) begin       // read back what the previous entry wrote
        pq         = sca_req_t'(sbuf[i-1]);
        q.channel  = pq.channel;
        q.sca_chan = pq.sca_chan;
        q.command  = 8'h10;
        q.length   = 8'd0;
        q.data     = '0;
      end
      sbuf[i] = q;
      if (q.channel >= MUX) ntmo++;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    count = 11'(N); start = 1;
    @(negedge clk); start = 0;
    t0 = $time / 25;
    while (!done) @(negedge clk);
    cyc = $time / 25 - t0;
    for (int i = 0; i < N; i++) begin
      q = sca_req_t'(sbuf[i]);
      p = sca_rsp_t'(rbuf[i]);
      if (q.channel >= MUX) begin
        check(p.status == ST_TIMEOUT && p.channel == q.channel, "timeout reply");
        continue;
      end
      ch = int'(q.channel); sc = int'(q.sca_chan);
      if (q.command[0]) mirror[ch][sc] = q.data;
      check(p.status == ST_OK && p.channel == q.channel && p.trid == q.trid &&
            p.control == q.control && p.sca_chan == q.sca_chan && p.error == 8'h00,
            $sformatf("reply %0d header", i));
      check(p.length == 8'd4 && p.data == mirror[ch][sc], $sformatf("reply %0d data", i));
    end
    check(n_done == N && n_timeout == 32'(ntmo) && n_error == 0, "counters");
    $display("%0d transactions in %0d cycles, %0d timeouts", N, cyc, ntmo);
    check((cyc - ntmo * 410) / (N - ntmo) < 174, "rate above 230k transactions/s");
    for (int c = 0; c < MUX; c++) check(n_bad[c] == 0, "front-end saw no bad frame");
    for (int c = 0; c < MUX; c++) begin
      int e;
      e = 0;
      for (int i = 0; i < N; i++) if (int'(sbuf[i][127:122]) == c) e++;
      check(n_req[c] == e, $sformatf("channel %0d received %0d requests, expected %0d", c, n_req[c], e));
    end
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

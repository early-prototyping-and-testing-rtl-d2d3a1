// tb_lpgbt_core: one lpGBT core driving 16 behavioural lpGBTs.
//
// The send buffer (a model here) holds 300 random write and read-back
// transactions spread over all 16 channels, plus a few aimed at channel 20,
// which does not exist and must time out. After start, the test waits for done
// and checks every reply word against per-channel register mirrors, the
// counters, the number of requests each front-end received (so a request
// sent to the wrong channel is caught), and the sustained rate: with 16
// lpGBTs answering after 8 cycles, the core must exceed 230 000
// transactions/s at 40 MHz, i.e. stay under 174 cycles per transaction
// (timeouts excluded).
`timescale 1ns/1ps
module tb_lpgbt_core;
  import sc_pkg::*;
  localparam int MUX = 16, D = 1024, N = 300;
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

  lpgbt_core #(.MUX(MUX), .DEPTH(D)) dut (.clk, .rst, .start, .clear, .count, .timeout,
    .busy, .done, .n_done, .n_timeout, .n_error, .sb_en, .sb_addr, .sb_rdata, .rb_we,
    .rb_addr, .rb_wdata, .ch_tx, .ch_rx);

  for (genvar i = 0; i < MUX; i++) begin : g_fe
    fe_model #(.IS_SCA(0), .DELAY(8)) fe (.clk, .rx(ch_tx[i]), .tx(ch_rx[i]), .mute(1'b0),
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
    byte unsigned mirror [MUX][256];
    lpgbt_req_t q, pq;
    lpgbt_rsp_t p;
    int t0, cyc, ntmo, ch, a, n;
    for (int c = 0; c < MUX; c++) for (int i = 0; i < 256; i++) mirror[c][i] = 8'(i * 7 + 3);
    ntmo = 0;
    for (int i = 0; i < N; i++) begin
      q = '0;
      q.channel   = (i % 97 == 50) ? 6'd20 : 6'($urandom % MUX);
      q.chip_addr = 7'h70;
      q.rd        = (i % 2 == 1);
      q.nbytes    = 3'(1 + $urandom % 4);
      q.reg_addr  = 16'($urandom % 250);
      q.data      = $urandom;
      if (i % 2 == 1) begin       // read back what the previous entry wrote
        pq         = lpgbt_req_t'(sbuf[i-1]);
        q.channel  = pq.channel;
        q.reg_addr = pq.reg_addr;
        q.nbytes   = pq.nbytes;
        q.data     = '0;
      end
      sbuf[i] = q;
      if (q.channel == 6'd20) ntmo++;
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
      q = lpgbt_req_t'(sbuf[i]);
      p = lpgbt_rsp_t'(rbuf[i]);
      if (q.channel >= MUX) begin
        check(p.status == ST_TIMEOUT && p.channel == q.channel, "timeout reply");
        continue;
      end
      ch = int'(q.channel); a = int'(q.reg_addr); n = int'(q.nbytes);
      if (!q.rd) for (int k = 0; k < n; k++) mirror[ch][a+k] = q.data[8*k +: 8];
      check(p.status == ST_OK && p.channel == q.channel && p.rd == q.rd &&
            p.reg_addr == q.reg_addr && p.nbytes == q.nbytes, $sformatf("reply %0d header", i));
      for (int k = 0; k < n; k++)
        check(p.data[8*k +: 8] == mirror[ch][a+k], $sformatf("reply %0d data", i));
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

// tb_lpgbt_engine: lpgbt_engine against the behavioural lpGBT (fe_model).
//
// Writes 1..4 registers at random addresses, reads them back, and compares
// the reply words with a register mirror kept here. Also checks: a reply with
// a corrupted parity byte comes back as ST_BADFRM; a request the front-end
// ignores gives no reply and the engine accepts a new request after cancel;
// a 1-byte write-read pair finishes within 174 cycles per transaction
// (230 000 transactions/s at 40 MHz).
`timescale 1ns/1ps
module tb_lpgbt_engine;
  import sc_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic req_valid = 0, req_ready, rsp_valid, cancel = 0;
  logic [127:0] req = '0, rsp;
  logic [1:0] tx, rx;
  logic mute = 0, corrupt = 0;
  int n_req, n_bad;
  int checks = 0, failures = 0;
  byte unsigned mirror [256];

  lpgbt_engine dut (.clk, .rst, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
                    .cancel, .tx_o(tx), .rx_i(rx));
  fe_model #(.IS_SCA(0), .DELAY(6)) fe (.clk, .rx(tx), .tx(rx), .mute, .corrupt,
                                        .n_req, .n_bad);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xact(lpgbt_req_t q, output lpgbt_rsp_t p, output int cyc, output bit got);
    int t = 0;
    @(negedge clk);
    req = q; req_valid = 1;
    while (!req_ready) begin @(negedge clk); t++; end
    @(negedge clk); req_valid = 0;
    got = 0;
    while (t < 2000) begin
      if (rsp_valid) begin got = 1; p = lpgbt_rsp_t'(rsp); break; end
      @(negedge clk); t++;
    end
    cyc = t;
  endtask

  initial begin
    lpgbt_req_t q;
    lpgbt_rsp_t p;
    int cyc, n, a;
    bit got;
    for (int i = 0; i < 256; i++) mirror[i] = 8'(i * 7 + 3);
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    for (int it = 0; it < 40; it++) begin
      n = 1 + ($urandom % 4);
      a = $urandom % 250;
      q = '0; q.channel = 6'(it % 16); q.chip_addr = 7'h70; q.command = 8'h00;
      q.reg_addr = 16'(a); q.nbytes = 3'(n); q.rd = 0; q.data = $urandom;
      xact(q, p, cyc, got);
      check(got, "write reply");
      for (int i = 0; i < n; i++) mirror[a+i] = q.data[8*i +: 8];
      check(p.status == ST_OK && p.chip_addr == 7'h70 && p.reg_addr == 16'(a) &&
            p.nbytes == 3'(n) && p.channel == q.channel, "write reply header");
      for (int i = 0; i < n; i++) check(p.data[8*i +: 8] == mirror[a+i], "write echo data");
      q.rd = 1; q.data = '0;
      q.reg_addr = 16'(($urandom % 250));
      a = int'(q.reg_addr);
      xact(q, p, cyc, got);
      check(got && p.status == ST_OK && p.rd, "read reply");
      for (int i = 0; i < n; i++) check(p.data[8*i +: 8] == mirror[a+i], "read data");
    end
    // rate: 1-byte write
    q = '0; q.chip_addr = 7'h70; q.nbytes = 1; q.reg_addr = 16'd3; q.data = 32'h5A;
    xact(q, p, cyc, got);
    mirror[3] = 8'h5A;
    $display("1-byte write: %0d cycles", cyc);
    check(got && cyc < 174, "lpGBT transaction within 174 cycles");
    // corrupted reply
    corrupt = 1; @(negedge clk); corrupt = 0;
    q.rd = 1;
    xact(q, p, cyc, got);
    check(got && p.status == ST_BADFRM, "corrupted parity flagged");
    // no reply, then cancel
    mute = 1;
    xact(q, p, cyc, got);
    check(!got, "muted front-end gives no reply");
    cancel = 1; @(negedge clk); cancel = 0; mute = 0;
    check(req_ready, "ready after cancel");
    xact(q, p, cyc, got);
    check(got && p.status == ST_OK && p.data[7:0] == 8'h5A, "works after cancel");
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

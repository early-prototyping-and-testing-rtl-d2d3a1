// tb_sc_transactor: sc_transactor with buffer models and a scripted engine.
//
// The send buffer (depth 64 here) holds random words; the engine stand-in
// accepts a request after a random delay and answers after another random
// delay with the request XOR a fixed pattern, except for channel 63 (never
// answers: timeout) and channel 62 (answers with status ST_BADFRM). Checks:
// every reply lands at its own index with the expected contents, the timeout
// word is the request with status ST_TIMEOUT, cancel fires on each timeout and
// only then, a timeout takes `timeout` cycles, no request is issued while one
// is outstanding, the counters and done are right, and a second run with a
// smaller count stops at that count.
`timescale 1ns/1ps
module tb_sc_transactor;
  import sc_pkg::*;
  localparam int D = 64;
  localparam logic [127:0] PAT = 128'h0123_4567_89AB_CDEF_0011_2233_4455_6677;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, clear = 0, busy, done;
  logic [6:0] count = 0;
  logic [31:0] timeout = 32'd50, n_done, n_timeout, n_error;
  logic sb_en, rb_we, req_valid, req_ready = 0, rsp_valid = 0, cancel;
  logic [5:0] sb_addr, rb_addr, chan;
  logic [127:0] sb_rdata, rb_wdata, req, rsp = 0;
  logic [127:0] sbuf [D], rbuf [D];

  sc_transactor #(.DEPTH(D)) dut (.clk, .rst, .start, .clear, .count, .timeout, .busy,
    .done, .n_done, .n_timeout, .n_error, .sb_en, .sb_addr, .sb_rdata, .rb_we, .rb_addr,
    .rb_wdata, .req_valid, .req_ready, .req, .rsp_valid, .rsp, .cancel, .chan);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (sb_en) sb_rdata <= sbuf[sb_addr];
    if (rb_we) rbuf[rb_addr] <= rb_wdata;
  end

  // engine stand-in
  int n_cancel = 0, outstanding = 0, tmo_start = 0, tmo_len = -1;
  initial begin
    forever begin
      @(negedge clk);
      if (cancel) begin n_cancel++; outstanding = 0; end
      if (req_valid && outstanding == 0) begin
        logic [127:0] q;
        repeat ($urandom % 4) @(negedge clk);
        req_ready = 1; q = req;
        check(chan == q[127:122], "chan follows request");
        @(negedge clk); req_ready = 0;
        outstanding = 1;
        tmo_start = $time / 10;
        if (q[127:122] != 6'd63) begin
          repeat (1 + $urandom % 20) @(negedge clk);
          rsp = q ^ PAT;
          rsp[121:120] = (q[127:122] == 6'd62) ? ST_BADFRM : ST_OK;
          rsp_valid = 1;
          @(negedge clk); rsp_valid = 0;
          outstanding = 0;
        end
      end else if (req_valid && outstanding != 0) begin
        check(0, "request while one is outstanding");
      end
    end
  end

  always @(posedge clk) if (cancel) tmo_len = $time / 10 - tmo_start;

  task automatic run(int n, output int exp_t, output int exp_e);
    exp_t = 0; exp_e = 0;
    @(negedge clk); count = 7'(n); start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      logic [127:0] e;
      if (sbuf[i][127:122] == 6'd63) begin
        e = sbuf[i]; e[121:120] = ST_TIMEOUT; exp_t++;
      end else begin
        e = sbuf[i] ^ PAT;
        e[121:120] = (sbuf[i][127:122] == 6'd62) ? ST_BADFRM : ST_OK;
        if (sbuf[i][127:122] == 6'd62) exp_e++;
      end
      check(rbuf[i] == e, $sformatf("reply %0d", i));
    end
  endtask

  initial begin
    int et, ee, et2, ee2;
    for (int i = 0; i < D; i++) begin
      sbuf[i] = {$urandom, $urandom, $urandom, $urandom};
      sbuf[i][127:122] = (i % 13 == 5) ? 6'd63 : (i % 11 == 3) ? 6'd62 : 6'(i % 40);
      rbuf[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    run(D, et, ee);
    check(n_done == 32'(D), "n_done after full buffer");
    check(n_timeout == 32'(et) && et > 0, "n_timeout");
    check(n_error == 32'(ee) && ee > 0, "n_error");
    check(n_cancel == et, "one cancel per timeout");
    check(tmo_len >= 50 && tmo_len <= 53, $sformatf("timeout length %0d", tmo_len));
    repeat (3) @(negedge clk);
    check(!busy && done, "idle and done");
    for (int i = 0; i < D; i++) rbuf[i] = '0;
    run(10, et2, ee2);
    check(n_done == 32'(D + 10), "n_done accumulates");
    check(rbuf[10] == '0 && rbuf[D-1] == '0, "second run stops at count");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(n_done == 0 && n_timeout == 0 && n_error == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sc_chan_mux: sc_chan_mux with its default 16 channels and with 40.
//
// For every select value, including out-of-range ones, drives random engine
// and channel streams and checks one cycle later that only the selected
// channel carries the engine stream, all others idle at 2'b11, and the
// engine receives the selected channel's stream (2'b11 when none).
`timescale 1ns/1ps
module tb_sc_chan_mux;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] sel = 0;
  logic [1:0] eng_tx = 0, eng_rx16, eng_rx40;
  logic [1:0] tx16 [16], rx16 [16], tx40 [40], rx40 [40];

  sc_chan_mux dut16 (.clk, .rst, .sel, .eng_tx, .eng_rx(eng_rx16), .ch_tx(tx16), .ch_rx(rx16));
  sc_chan_mux #(.N(40), .SW(6)) dut40 (.clk, .rst, .sel, .eng_tx, .eng_rx(eng_rx40),
                                       .ch_tx(tx40), .ch_rx(rx40));

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] e, r16 [16], r40 [40];
    int s;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      s = it % 64;
      sel = 6'(s);
      eng_tx = 2'($urandom);
      foreach (rx16[i]) rx16[i] = 2'($urandom);
      foreach (rx40[i]) rx40[i] = 2'($urandom);
      e = eng_tx; r16 = rx16; r40 = rx40;
      @(posedge clk); #1;
      foreach (tx16[i]) check(tx16[i] == ((i == s) ? e : 2'b11), "16: channel out");
      foreach (tx40[i]) check(tx40[i] == ((i == s) ? e : 2'b11), "40: channel out");
      check(eng_rx16 == ((s < 16) ? r16[s % 16] : 2'b11), "16: return");
      check(eng_rx40 == ((s < 40) ? r40[s % 40] : 2'b11), "40: return");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

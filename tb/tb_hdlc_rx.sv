// tb_hdlc_rx: hdlc_rx fed by an HDLC bit-stream generator written here.
//
// Builds random frames (bytes rich in 1s to force stuffing), stuffs them and
// puts them on the line two bits per clock, separated by flags, shared flags or
// all-ones idle. Checks every byte and the eof/eof_ok pulse of every frame.
// It also sends a frame cut short by an abort (seven 1s), which must produce
// no eof, and a frame with three extra bits before its closing flag, which
// must end with eof_ok low (the flag's leading bits then complete one
// spurious byte, which the engines discard with the frame).
`timescale 1ns/1ps
module tb_hdlc_rx;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic [1:0] rx = 2'b11;
  logic m_valid, eof, eof_ok;
  logic [7:0] m_data;
  int checks = 0, failures = 0;

  hdlc_rx dut (.clk, .rst, .rx_i(rx), .m_valid, .m_data, .eof, .eof_ok);

  bit line[$];
  byte unsigned exp_bytes[$];
  bit exp_eof[$];       // expected eof_ok per frame
  byte unsigned got_bytes[$];
  bit got_eof[$];

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put_flag();
    bit [7:0] f = 8'h7E;
    for (int i = 0; i < 8; i++) line.push_back(f[i]);
  endtask

  task automatic put_bytes(byte unsigned b[$], int extra_bits);
    int o = 0;
    foreach (b[k]) for (int i = 0; i < 8; i++) begin
      line.push_back(b[k][i]);
      o = b[k][i] ? o + 1 : 0;
      if (o == 5) begin line.push_back(1'b0); o = 0; end
    end
    for (int i = 0; i < extra_bits; i++) line.push_back(1'b0);
  endtask

  always @(posedge clk) if (!rst) begin
    if (m_valid) got_bytes.push_back(m_data);
    if (eof) got_eof.push_back(eof_ok);
  end

  initial begin
    byte unsigned fr[$];
    int n;
    repeat (10) line.push_back(1'b1);
    for (int f = 0; f < 50; f++) begin
      n = 1 + $urandom % 14;
      fr.delete();
      for (int i = 0; i < n; i++) fr.push_back(($urandom % 3 == 0) ? 8'hFF : 8'($urandom));
      put_flag();
      put_bytes(fr, 0);
      foreach (fr[i]) exp_bytes.push_back(fr[i]);
      exp_eof.push_back(1'b1);
      case (f % 3)
        0: put_flag();                                      // own closing flag
        1: begin put_flag(); repeat (9) line.push_back(1'b1); end // then idle
        default: ;                                          // shared flag
      endcase
    end
    put_flag();
    // aborted frame: no eof
    fr = '{8'h12, 8'h34};
    put_bytes(fr, 0);
    foreach (fr[i]) exp_bytes.push_back(fr[i]);
    repeat (8) line.push_back(1'b1);
    // misaligned frame: eof with eof_ok low
    put_flag();
    fr = '{8'h55};
    put_bytes(fr, 3);
    exp_bytes.push_back(8'h55);
    exp_bytes.push_back(8'hF0);  // 3 extra 0s + the flag's 0 and four 1s
    put_flag();
    exp_eof.push_back(1'b0);
    repeat (20) line.push_back(1'b1);
    if (line.size() % 2) line.push_back(1'b1);

    repeat (3) @(negedge clk);
    rst = 0;
    while (line.size() > 0) begin
      @(negedge clk);
      rx[0] = line.pop_front();
      rx[1] = line.pop_front();
    end
    rx = 2'b11;
    repeat (10) @(negedge clk);
    check(got_bytes.size() == exp_bytes.size(),
          $sformatf("byte count %0d vs %0d", got_bytes.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < got_bytes.size(); i++)
      check(got_bytes[i] == exp_bytes[i], $sformatf("byte %0d", i));
    check(got_eof.size() == exp_eof.size(),
          $sformatf("eof count %0d vs %0d", got_eof.size(), exp_eof.size()));
    for (int i = 0; i < exp_eof.size() && i < got_eof.size(); i++)
      check(got_eof[i] == exp_eof[i], $sformatf("eof_ok %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

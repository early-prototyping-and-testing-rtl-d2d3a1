// tb_hdlc_tx: hdlc_tx against a bit-level HDLC decoder written here.
//
// Sends random frames of 1..16 random bytes (many 0xFF and 0x7E bytes, to
// force bit stuffing) with random gaps between frames, records the line two
// bits per clock, and decodes it independently: every frame must come back
// byte for byte, every run of six 1s must be a flag, and an idle line must be
// back-to-back flags. Because the decoder reads the line two bits per clock
// with no gaps, it also confirms the 80 Mb/s rate (2 bits every cycle).
`timescale 1ns/1ps
module tb_hdlc_tx;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic s_valid = 0, s_ready, s_last = 0, underrun;
  logic [7:0] s_data = 0;
  logic [1:0] tx;
  int checks = 0, failures = 0;

  hdlc_tx dut (.clk, .rst, .s_valid, .s_ready, .s_data, .s_last, .tx_o(tx), .underrun);

  byte unsigned sent[$][$];
  byte unsigned got[$][$];
  bit line[$];
  bit capture = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (capture) begin
    line.push_back(tx[0]);
    line.push_back(tx[1]);
  end

  initial begin
    byte unsigned fr[$];
    int n, ones, nb, run, flags_seen;
    bit [7:0] sh, win;
    bit in_frame;
    byte unsigned cur[$];
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
    capture = 1;
    for (int f = 0; f < 60; f++) begin
      n = 1 + $urandom % 16;
      fr.delete();
      for (int i = 0; i < n; i++) begin
        case ($urandom % 4)
          0: fr.push_back(8'hFF);
          1: fr.push_back(8'h7E);
          default: fr.push_back(8'($urandom));
        endcase
      end
      sent.push_back(fr);
      for (int i = 0; i < n; i++) begin
        s_valid = 1; s_data = fr[i]; s_last = (i == n - 1);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        #1;
      end
      s_valid = 0; s_last = 0;
      repeat ($urandom % 30) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    capture = 0;
    // independent decoding
    ones = 0; in_frame = 0; nb = 0; win = 0; flags_seen = 0;
    foreach (line[k]) begin
      bit b;
      b = line[k];
      win = {b, win[7:1]};
      if (b) begin
        ones++;
        check(ones <= 6, "no run of seven 1s");
        if (ones <= 5 && in_frame) begin sh = {b, sh[7:1]}; nb++; end
      end else begin
        if (ones == 5) begin
          ones = 0;
        end else if (ones == 6) begin
          flags_seen++;
          if (in_frame && cur.size() > 0) begin
            check(nb == 6, "frame ends on byte boundary");
            got.push_back(cur);
          end
          cur.delete(); in_frame = 1; nb = 0; ones = 0;
        end else begin
          ones = 0;
          if (in_frame) begin sh = {b, sh[7:1]}; nb++; end
        end
      end
      if (in_frame && nb == 8) begin cur.push_back(sh); nb = 0; end
    end
    check(got.size() == sent.size(), $sformatf("frame count %0d vs %0d", got.size(), sent.size()));
    for (int f = 0; f < sent.size() && f < got.size(); f++) begin
      check(got[f] == sent[f], $sformatf("frame %0d contents", f));
    end
    check(flags_seen > 2 * sent.size(), "idle line carries flags");
    check(underrun == 0, "no underrun");
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

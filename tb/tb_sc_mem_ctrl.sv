// tb_sc_mem_ctrl: the memory and control module at full size (32 cores, two
// 1024 x 128-bit buffers each) through its two AXI ports.
//
// The AXI side runs on its own clock aclk (period 24.4 ns), which drifts
// against the 25 ns slow-control clock clk, so every register access and
// buffer transfer crosses between unrelated clocks.
//
// 1. Exhaustive buffer test: writes a pattern to every 32-bit word of every
//    send and receive buffer in 256-beat INCR bursts, then reads every word
//    back, the same write-then-read-all procedure used to validate the AXI
//    paths on the hardware. The pattern is a hash of the address.
// 2. Byte strobes and FIXED bursts on a few words.
// 3. Core side: the send buffer's core port returns what software wrote; a
//    word written on a receive buffer's core port is read back over AXI.
// 4. Registers: COUNT and TIMEOUT read back what was written for every core,
//    CTRL produces one-cycle start/clear pulses on the addressed core only,
//    STATUS and the counters reflect the core-side inputs, INFO reports the
//    core type and multiplexing factor.
`timescale 1ns/1ps
module tb_sc_mem_ctrl;
  localparam int NC = 32, D = 1024, EW = 10, CW = 5, FAW = EW + 5 + CW, LAW = 5 + CW;
  logic clk = 0, rst = 1;
  logic aclk = 0, arst = 1;   // AXI clock, unrelated to clk
  always #12.2 aclk = ~aclk;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] s_awid, s_bid, s_arid, s_rid;
  logic [FAW-1:0] s_awaddr, s_araddr;
  logic [7:0] s_awlen, s_arlen;
  logic [2:0] s_awsize, s_arsize;
  logic [1:0] s_awburst, s_arburst, s_bresp, s_rresp, l_bresp, l_rresp;
  logic s_awvalid, s_awready, s_wlast, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rlast, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata, l_wdata, l_rdata;
  logic [3:0] s_wstrb, l_wstrb;
  logic [LAW-1:0] l_awaddr, l_araddr;
  logic l_awvalid, l_awready, l_wvalid, l_wready, l_bvalid, l_bready;
  logic l_arvalid, l_arready, l_rvalid, l_rready;

  logic sb_en [NC], rb_we [NC], start [NC], clear [NC], busy [NC], done [NC];
  logic [EW-1:0] sb_addr [NC], rb_addr [NC];
  logic [127:0] sb_rdata [NC], rb_wdata [NC];
  logic [EW:0] count [NC];
  logic [31:0] timeout [NC], n_done [NC], n_timeout [NC], n_error [NC];

  sc_mem_ctrl dut (.*);
  sc_axi_bfm #(.FAW(FAW), .LAW(LAW)) bfm (.clk(aclk), .*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9E3779B1 ^ 32'h5A5A0F0F;
  endfunction

  int n_start [NC], n_clear [NC];
  always @(posedge clk) if (!rst)
    for (int c = 0; c < NC; c++) begin
      if (start[c]) n_start[c]++;
      if (clear[c]) n_clear[c]++;
    end

  initial begin
    logic [31:0] d[$], r[$], v;
    int bad;
    for (int c = 0; c < NC; c++) begin
      sb_en[c] = 0; sb_addr[c] = '0; rb_we[c] = 0; rb_addr[c] = '0; rb_wdata[c] = '0;
      busy[c] = c[0]; done[c] = c[1]; n_done[c] = 32'(c * 3); n_timeout[c] = 32'(c * 5);
      n_error[c] = 32'(c * 7); n_start[c] = 0; n_clear[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0; arst = 0;
    // 1. exhaustive write then read of every buffer word
    for (int a = 0; a < NC * 2 * D * 4; a += 256) begin
      d.delete();
      for (int i = 0; i < 256; i++) d.push_back(pat(a + i));
      bfm.write_burst(FAW'((a) * 4), d);
    end
    bad = 0;
    for (int a = 0; a < NC * 2 * D * 4; a += 256) begin
      bfm.read_burst(FAW'(a * 4), 256, r);
      for (int i = 0; i < 256; i++) if (r[i] != pat(a + i)) bad++;
      checks++;
    end
    if (bad != 0) begin failures++; $display("FAIL: %0d words differ", bad); end
    check(bfm.n_resp_err == 0 && bfm.n_id_err == 0 && bfm.n_last_err == 0, "AXI responses");
    // 2. byte strobes and a FIXED burst
    d = '{32'hAABBCCDD};
    bfm.write_burst(FAW'(16), d, 4'b0101);
    bfm.read_burst(FAW'(16), 1, r);
    v = pat(4);
    check(r[0] == {v[31:24], 8'hBB, v[15:8], 8'hDD}, "byte strobes");
    d = '{32'h1, 32'h2, 32'h3};
    bfm.write_burst(FAW'(32), d, 4'hF, 2'b00);
    bfm.read_burst(FAW'(32), 2, r, 2'b00);
    check(r[0] == 32'h3 && r[1] == 32'h3, "FIXED burst");
    bfm.read_burst(FAW'(36), 1, r);
    check(r[0] == pat(9), "FIXED burst leaves the next word alone");
    // 3. core side
    for (int c = 0; c < NC; c += 7) begin
      @(negedge clk); sb_en[c] = 1; sb_addr[c] = 10'd5;
      @(negedge clk); sb_en[c] = 0;
      v = 32'(c * 2 * D * 4 + 5 * 4);
      check(sb_rdata[c] == {pat(int'(v) + 3), pat(int'(v) + 2), pat(int'(v) + 1), pat(int'(v))},
            "core reads send buffer");
      @(negedge clk); rb_we[c] = 1; rb_addr[c] = 10'd9;
      rb_wdata[c] = {32'(c), 32'hCAFE0000, 32'h12345678, 32'h9ABCDEF0};
      @(negedge clk); rb_we[c] = 0;
      bfm.read_burst(FAW'(((c * 2 + 1) * D * 4 + 9 * 4) * 4), 4, r);
      check(r[0] == 32'h9ABCDEF0 && r[1] == 32'h12345678 && r[2] == 32'hCAFE0000 &&
            r[3] == 32'(c), "software reads receive buffer");
    end
    // 4. registers
    for (int c = 0; c < NC; c++) begin
      bfm.lite_write(LAW'(c * 32 + 4), 32'(c + 1));
      bfm.lite_write(LAW'(c * 32 + 8), 32'(1000 + c));
    end
    for (int c = 0; c < NC; c++) begin
      bfm.lite_read(LAW'(c * 32 + 4), v);  check(v == 32'(c + 1), "COUNT");
      check(count[c] == 11'(c + 1), "count output");
      bfm.lite_read(LAW'(c * 32 + 8), v);  check(v == 32'(1000 + c), "TIMEOUT");
      check(timeout[c] == 32'(1000 + c), "timeout output");
      bfm.lite_read(LAW'(c * 32 + 12), v); check(v == {30'd0, done[c], busy[c]}, "STATUS");
      bfm.lite_read(LAW'(c * 32 + 16), v); check(v == 32'(c * 3), "NDONE");
      bfm.lite_read(LAW'(c * 32 + 20), v); check(v == 32'(c * 5), "NTMO");
      bfm.lite_read(LAW'(c * 32 + 24), v); check(v == 32'(c * 7), "NERR");
      bfm.lite_read(LAW'(c * 32 + 28), v);
      check(v == ((c < 16) ? 32'd16 : 32'h128), "INFO");
    end
    bfm.lite_write(LAW'(3 * 32), 32'h1);
    bfm.lite_write(LAW'(20 * 32), 32'h2);
    repeat (2) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(n_start[c] == ((c == 3) ? 1 : 0), "start pulse");
      check(n_clear[c] == ((c == 20) ? 1 : 0), "clear pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

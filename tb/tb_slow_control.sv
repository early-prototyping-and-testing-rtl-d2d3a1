// tb_slow_control: end-to-end test of the slow-control block.
//
// The AXI side runs on its own clock aclk (period 24.4 ns), which drifts
// against the 25 ns slow-control clock clk, so every register access and
// buffer transfer crosses between unrelated clocks.
//
// The block runs at reduced size (2 lpGBT cores with 4 channels, 2 GBT-SCA
// cores with 5 channels, 64-entry buffers) with a behavioural lpGBT or GBT-SCA
// on every channel. Software actions go through the AXI master model:
//   - fill every core's send buffer to capacity over AXI4 Full bursts with
//     writes and read-backs (plus requests to channels that do not exist),
//   - set COUNT/TIMEOUT and start all four cores over AXI4-Lite,
//   - poll STATUS until every core is done, read all replies back over AXI4
//     Full, and check each one against register mirrors kept here,
//   - check the NDONE/NTMO/NERR counters, then clear them,
//   - run a second, short batch on one core.
// One front-end per core type corrupts its first reply, which must come back
// as a bad-check reply. The test counts how often each mechanism happened
// (lpGBT and GBT-SCA transactions, timeouts, bad checks, channel switches
// within a core, cores running at the same time, full-buffer runs) and fails
// if any never did.
`timescale 1ns/1ps
module tb_slow_control;
  import sc_pkg::*;
  localparam int NL = 2, NS = 2, CL = 4, CS = 5, D = 64, NC = NL + NS;
  localparam int EW = $clog2(D), CW = $clog2(NC), FAW = EW + 5 + CW, LAW = 5 + CW;
  localparam int N2 = 6;   // second batch
  localparam int TMO = 400;

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
  logic [1:0] lpgbt_tx [NL][CL], lpgbt_rx [NL][CL], sca_tx [NS][CS], sca_rx [NS][CS];
  logic corrupt_l = 0, corrupt_s = 0;
  int nq_l [NL][CL], nb_l [NL][CL], nq_s [NS][CS], nb_s [NS][CS];

  slow_control #(.N_LPGBT_CORES(NL), .N_SCA_CORES(NS), .LPGBT_CH(CL), .SCA_CH(CS),
                 .DEPTH(D)) dut (.*);
  sc_axi_bfm #(.FAW(FAW), .LAW(LAW)) bfm (.clk(aclk), .*);

  for (genvar k = 0; k < NL; k++) begin : g_fl
    for (genvar i = 0; i < CL; i++) begin : g_ch
      fe_model #(.IS_SCA(0), .DELAY(8 + i)) fe (.clk, .rx(lpgbt_tx[k][i]), .tx(lpgbt_rx[k][i]),
        .mute(1'b0), .corrupt((k == 1 && i == 2) ? corrupt_l : 1'b0),
        .n_req(nq_l[k][i]), .n_bad(nb_l[k][i]));
    end
  end
  for (genvar k = 0; k < NS; k++) begin : g_fs
    for (genvar i = 0; i < CS; i++) begin : g_ch
      fe_model #(.IS_SCA(1), .DELAY(8 + i)) fe (.clk, .rx(sca_tx[k][i]), .tx(sca_rx[k][i]),
        .mute(1'b0), .corrupt((k == 0 && i == 4) ? corrupt_s : 1'b0),
        .n_req(nq_s[k][i]), .n_bad(nb_s[k][i]));
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int m_lpgbt = 0, m_sca = 0, m_tmo = 0, m_bad = 0, m_switch = 0, m_parallel = 0, m_full = 0;

  logic [127:0] sb [NC][D];
  byte unsigned lmir [NL][CL][256];
  logic [31:0]  smir [NS][CS][256];
  bit first_l = 1, first_s = 1;

  function automatic logic [127:0] gen(int c, int i, logic [127:0] prev);
    if (c < NL) begin
      lpgbt_req_t q, pq;
      pq = lpgbt_req_t'(prev);
      q = '0; q.chip_addr = 7'h70;
      q.channel  = (i % 29 == 13) ? 6'(CL + 1) : 6'($urandom % CL);
      q.nbytes   = 3'(1 + $urandom % 4);
      q.reg_addr = 16'($urandom % 250);
      q.data     = $urandom;
      if (i % 2 == 1) begin
        q.channel = pq.channel; q.reg_addr = pq.reg_addr; q.nbytes = pq.nbytes;
        q.rd = 1; q.data = '0;
      end
      return q;
    end else begin
      sca_req_t q, pq;
      pq = sca_req_t'(prev);
      q = '0; q.trid = 8'(i); q.control = 8'($urandom); q.command = 8'h11; q.length = 8'd4;
      q.channel  = (i % 29 == 13) ? 6'(CS + 2) : 6'($urandom % CS);
      q.sca_chan = 8'($urandom);
      q.data     = $urandom;
      if (i % 2 == 1) begin
        q.channel = pq.channel; q.sca_chan = pq.sca_chan; q.command = 8'h10; q.length = 0;
        q.data = '0;
      end
      return q;
    end
  endfunction

  // check the replies of entries [0, n) of core c; returns timeouts and bad checks
  task automatic check_core(int c, int n, output int ntmo, output int nbad);
    logic [31:0] r[$];
    logic [127:0] w;
    ntmo = 0; nbad = 0;
    for (int i = 0; i < n; i++) begin
      if (i % 64 == 0)
        bfm.read_burst(FAW'(((c * 2 + 1) * D + i) * 16), ((n - i) >= 64 ? 64 : (n - i)) * 4, r);
      w = {r[(i % 64) * 4 + 3], r[(i % 64) * 4 + 2], r[(i % 64) * 4 + 1], r[(i % 64) * 4]};
      if (i > 0 && sb[c][i][127:122] != sb[c][i-1][127:122]) m_switch++;
      if (c < NL) begin
        lpgbt_req_t q; lpgbt_rsp_t p; int ch, a;
        q = lpgbt_req_t'(sb[c][i]); p = lpgbt_rsp_t'(w);
        ch = int'(q.channel); a = int'(q.reg_addr);
        if (ch >= CL) begin
          check(p.status == ST_TIMEOUT, "lpGBT timeout reply"); ntmo++; m_tmo++; continue;
        end
        if (!q.rd) for (int k = 0; k < int'(q.nbytes); k++) lmir[c][ch][a+k] = q.data[8*k +: 8];
        if (c == 1 && ch == 2 && first_l) begin
          first_l = 0;
          check(p.status == ST_BADFRM, "corrupted lpGBT reply flagged"); nbad++; m_bad++;
          continue;
        end
        check(p.status == ST_OK && p.channel == q.channel && p.reg_addr == q.reg_addr &&
              p.nbytes == q.nbytes && p.rd == q.rd, "lpGBT reply header");
        for (int k = 0; k < int'(q.nbytes); k++)
          check(p.data[8*k +: 8] == lmir[c][ch][a+k], "lpGBT reply data");
        m_lpgbt++;
      end else begin
        sca_req_t q; sca_rsp_t p; int ch, s;
        q = sca_req_t'(sb[c][i]); p = sca_rsp_t'(w);
        ch = int'(q.channel); s = int'(q.sca_chan);
        if (ch >= CS) begin
          check(p.status == ST_TIMEOUT, "SCA timeout reply"); ntmo++; m_tmo++; continue;
        end
        if (q.command[0]) smir[c-NL][ch][s] = q.data;
        if (c == NL && ch == 4 && first_s) begin
          first_s = 0;
          check(p.status == ST_BADFRM, "corrupted SCA reply flagged"); nbad++; m_bad++;
          continue;
        end
        check(p.status == ST_OK && p.trid == q.trid && p.control == q.control &&
              p.sca_chan == q.sca_chan, "SCA reply header");
        check(p.data == smir[c-NL][ch][s], "SCA reply data");
        m_sca++;
      end
    end
  endtask

  task automatic load(int c, int n);
    logic [31:0] d[$];
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < 4; k++) d.push_back(sb[c][i][32*k +: 32]);
      if (d.size() == 256 || i == n - 1) begin
        bfm.write_burst(FAW'(((c * 2) * D + i - (d.size() / 4 - 1)) * 16), d);
        d.delete();
      end
    end
  endtask

  initial begin
    logic [31:0] v;
    int t0, ntmo, nbad, all_done;
    for (int c = 0; c < NL; c++) for (int i = 0; i < CL; i++) for (int a = 0; a < 256; a++)
      lmir[c][i][a] = 8'(a * 7 + 3);
    for (int c = 0; c < NS; c++) for (int i = 0; i < CS; i++) for (int a = 0; a < 256; a++)
      smir[c][i][a] = 32'hA5000000 | 32'(a);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < D; i++) sb[c][i] = gen(c, i, (i > 0) ? sb[c][i-1] : '0);
    repeat (3) @(negedge clk);
    rst = 0; arst = 0;
    corrupt_l = 1; corrupt_s = 1;
    @(negedge clk); corrupt_l = 0; corrupt_s = 0;
    // batch 1: every buffer full
    for (int c = 0; c < NC; c++) load(c, D);
    for (int c = 0; c < NC; c++) begin
      bfm.lite_read(LAW'(c * 32 + 28), v);
      check(v == ((c < NL) ? 32'(CL) : (32'h100 | 32'(CS))), "INFO register");
      bfm.lite_write(LAW'(c * 32 + 4), 32'(D));
      bfm.lite_write(LAW'(c * 32 + 8), 32'(TMO));
    end
    for (int c = 0; c < NC; c++) bfm.lite_write(LAW'(c * 32), 32'h3);  // clear + start
    t0 = $time / 25;
    do begin
      int nbusy;
      nbusy = 0;
      all_done = 1;
      for (int c = 0; c < NC; c++) begin
        bfm.lite_read(LAW'(c * 32 + 12), v);
        if (v[1:0] != 2'b10) all_done = 0;
        if (v[0]) nbusy++;
      end
      if (nbusy >= 2) m_parallel++;   // one STATUS poll saw several cores busy
    end while (!all_done);
    $display("batch of %0d x %0d transactions done in %0d cycles", NC, D, $time / 25 - t0);
    m_full += NC;
    for (int c = 0; c < NC; c++) begin
      check_core(c, D, ntmo, nbad);
      bfm.lite_read(LAW'(c * 32 + 16), v); check(v == 32'(D), "NDONE");
      bfm.lite_read(LAW'(c * 32 + 20), v); check(v == 32'(ntmo), "NTMO");
      bfm.lite_read(LAW'(c * 32 + 24), v); check(v == 32'(nbad), "NERR");
    end
    // batch 2: a short run on GBT-SCA core 1 after clearing its counters
    for (int i = 0; i < N2; i++) sb[3][i] = gen(3, i + 1, (i > 0) ? sb[3][i-1] : '0);
    load(3, N2);
    bfm.lite_write(LAW'(3 * 32 + 4), 32'(N2));
    bfm.lite_write(LAW'(3 * 32), 32'h2);
    bfm.lite_read(LAW'(3 * 32 + 16), v); check(v == 0, "counters cleared");
    bfm.lite_write(LAW'(3 * 32), 32'h1);
    do bfm.lite_read(LAW'(3 * 32 + 12), v); while (v[1:0] != 2'b10);
    check_core(3, N2, ntmo, nbad);
    bfm.lite_read(LAW'(3 * 32 + 16), v); check(v == 32'(N2), "NDONE after short run");
    check(bfm.n_resp_err == 0 && bfm.n_id_err == 0 && bfm.n_last_err == 0, "AXI responses");
    for (int c = 0; c < NL; c++) for (int i = 0; i < CL; i++) check(nb_l[c][i] == 0, "lpGBT rx ok");
    for (int c = 0; c < NS; c++) for (int i = 0; i < CS; i++) check(nb_s[c][i] == 0, "SCA rx ok");
    $display("mechanisms: lpgbt=%0d sca=%0d timeout=%0d badcheck=%0d switch=%0d parallel=%0d full=%0d",
             m_lpgbt, m_sca, m_tmo, m_bad, m_switch, m_parallel, m_full);
    check(m_lpgbt > 0, "lpGBT transactions happened");
    check(m_sca > 0, "GBT-SCA transactions happened");
    check(m_tmo > 0, "timeouts happened");
    check(m_bad >= 2, "bad-check replies happened");
    check(m_switch > 0, "channel switches happened");
    check(m_parallel > 0, "cores ran in parallel");
    check(m_full > 0, "full-buffer runs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

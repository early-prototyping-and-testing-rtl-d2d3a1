// slow_control: the back-end slow-control block.
//
// Configures and monitors front-end transceivers (lpGBTs and GBT-SCAs) for
// one back-end FPGA. Software places 128-bit transaction words in per-core
// send buffers over AXI4 Full, starts the cores over AXI4-Lite, and later
// reads one 128-bit reply per transaction from the receive buffers. Full
// parallelism over all front-end links would cost too much logic, so the
// block is split into N_LPGBT lpGBT cores and N_SCA GBT-SCA cores, each
// running one transaction at a time and multiplexing it onto one of
// LPGBT_MUX (16) or SCA_MUX (40) front-end streams. With the defaults this
// gives 16 x 16 = 256 lpGBT streams and 16 x 40 = 640 GBT-SCA streams.
//
// Front-end streams are 80 Mb/s, carried as 2 bits per 40 MHz clock (bit 0
// first) towards an lpGBT link that builds the optical frames; lpgbt_tx[k][i]
// is channel i of lpGBT core k, sca_tx[k][i] channel i of GBT-SCA core k.
// The cores run on the 40 MHz slow-control clock clk; both AXI ports run on
// aclk, which may come from an unrelated source (see sc_mem_ctrl for the
// crossing). Resets are synchronous, active high, and applied together.
//
// Core indices on the AXI ports: 0..N_LPGBT-1 are the lpGBT cores,
// N_LPGBT..N_LPGBT+N_SCA-1 the GBT-SCA cores. Address maps: see sc_mem_ctrl.
//
// The partitioning, core counts, multiplexing factors, buffer sizes and the
// two AXI interfaces on their own clock are the document's; address maps,
// word formats and reset are this design's choices.
module slow_control
  import sc_pkg::*;
#(
  parameter int unsigned N_LPGBT_CORES = N_LPGBT,
  parameter int unsigned N_SCA_CORES   = N_SCA,
  parameter int unsigned LPGBT_CH      = LPGBT_MUX,
  parameter int unsigned SCA_CH        = SCA_MUX,
  parameter int unsigned DEPTH         = BUF_DEPTH,
  parameter int unsigned IDW           = 4,
  localparam int unsigned NC           = N_LPGBT_CORES + N_SCA_CORES,
  localparam int unsigned EW           = $clog2(DEPTH),
  localparam int unsigned CW           = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned FAW          = EW + 5 + CW,
  localparam int unsigned LAW          = 5 + CW
) (
  input  logic            aclk,    // AXI clock
  input  logic            arst,
  input  logic            clk,     // slow-control clock, 40 MHz
  input  logic            rst,
  // AXI4 Full slave: transaction buffers
  input  logic [IDW-1:0]  s_awid,
  input  logic [FAW-1:0]  s_awaddr,
  input  logic [7:0]      s_awlen,
  input  logic [2:0]      s_awsize,
  input  logic [1:0]      s_awburst,
  input  logic            s_awvalid,
  output logic            s_awready,
  input  logic [31:0]     s_wdata,
  input  logic [3:0]      s_wstrb,
  input  logic            s_wlast,
  input  logic            s_wvalid,
  output logic            s_wready,
  output logic [IDW-1:0]  s_bid,
  output logic [1:0]      s_bresp,
  output logic            s_bvalid,
  input  logic            s_bready,
  input  logic [IDW-1:0]  s_arid,
  input  logic [FAW-1:0]  s_araddr,
  input  logic [7:0]      s_arlen,
  input  logic [2:0]      s_arsize,
  input  logic [1:0]      s_arburst,
  input  logic            s_arvalid,
  output logic            s_arready,
  output logic [IDW-1:0]  s_rid,
  output logic [31:0]     s_rdata,
  output logic [1:0]      s_rresp,
  output logic            s_rlast,
  output logic            s_rvalid,
  input  logic            s_rready,
  // AXI4-Lite slave: control and status registers
  input  logic [LAW-1:0]  l_awaddr,
  input  logic            l_awvalid,
  output logic            l_awready,
  input  logic [31:0]     l_wdata,
  input  logic [3:0]      l_wstrb,
  input  logic            l_wvalid,
  output logic            l_wready,
  output logic [1:0]      l_bresp,
  output logic            l_bvalid,
  input  logic            l_bready,
  input  logic [LAW-1:0]  l_araddr,
  input  logic            l_arvalid,
  output logic            l_arready,
  output logic [31:0]     l_rdata,
  output logic [1:0]      l_rresp,
  output logic            l_rvalid,
  input  logic            l_rready,
  // front-end streams, 2 bits per clock
  output logic [1:0]      lpgbt_tx [N_LPGBT_CORES][LPGBT_CH],
  input  logic [1:0]      lpgbt_rx [N_LPGBT_CORES][LPGBT_CH],
  output logic [1:0]      sca_tx   [N_SCA_CORES][SCA_CH],
  input  logic [1:0]      sca_rx   [N_SCA_CORES][SCA_CH]
);

  logic          sb_en    [NC];
  logic [EW-1:0] sb_addr  [NC];
  logic [127:0]  sb_rdata [NC];
  logic          rb_we    [NC];
  logic [EW-1:0] rb_addr  [NC];
  logic [127:0]  rb_wdata [NC];
  logic          start    [NC];
  logic          clear    [NC];
  logic [EW:0]   count    [NC];
  logic [31:0]   timeout  [NC];
  logic          busy     [NC];
  logic          done     [NC];
  logic [31:0]   n_done   [NC];
  logic [31:0]   n_tmo    [NC];
  logic [31:0]   n_err    [NC];

  sc_mem_ctrl #(
    .N_CORES(NC), .N_LPGBT(N_LPGBT_CORES), .LPGBT_MUX(LPGBT_CH), .SCA_MUX(SCA_CH),
    .DEPTH(DEPTH), .IDW(IDW)
  ) u_mem (
    .aclk, .arst, .clk, .rst,
    .s_awid, .s_awaddr, .s_awlen, .s_awsize, .s_awburst, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bid, .s_bresp, .s_bvalid, .s_bready,
    .s_arid, .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid, .s_arready,
    .s_rid, .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .l_awaddr, .l_awvalid, .l_awready, .l_wdata, .l_wstrb, .l_wvalid, .l_wready,
    .l_bresp, .l_bvalid, .l_bready, .l_araddr, .l_arvalid, .l_arready,
    .l_rdata, .l_rresp, .l_rvalid, .l_rready,
    .sb_en, .sb_addr, .sb_rdata, .rb_we, .rb_addr, .rb_wdata,
    .start, .clear, .count, .timeout, .busy, .done,
    .n_done, .n_timeout(n_tmo), .n_error(n_err));

  for (genvar k = 0; k < N_LPGBT_CORES; k++) begin : g_lpgbt
    lpgbt_core #(.MUX(LPGBT_CH), .DEPTH(DEPTH)) u_core (
      .clk, .rst, .start(start[k]), .clear(clear[k]), .count(count[k]),
      .timeout(timeout[k]), .busy(busy[k]), .done(done[k]), .n_done(n_done[k]),
      .n_timeout(n_tmo[k]), .n_error(n_err[k]),
      .sb_en(sb_en[k]), .sb_addr(sb_addr[k]), .sb_rdata(sb_rdata[k]),
      .rb_we(rb_we[k]), .rb_addr(rb_addr[k]), .rb_wdata(rb_wdata[k]),
      .ch_tx(lpgbt_tx[k]), .ch_rx(lpgbt_rx[k]));
  end

  for (genvar k = 0; k < N_SCA_CORES; k++) begin : g_sca
    localparam int unsigned C = N_LPGBT_CORES + k;
    sca_core #(.MUX(SCA_CH), .DEPTH(DEPTH)) u_core (
      .clk, .rst, .start(start[C]), .clear(clear[C]), .count(count[C]),
      .timeout(timeout[C]), .busy(busy[C]), .done(done[C]), .n_done(n_done[C]),
      .n_timeout(n_tmo[C]), .n_error(n_err[C]),
      .sb_en(sb_en[C]), .sb_addr(sb_addr[C]), .sb_rdata(sb_rdata[C]),
      .rb_we(rb_we[C]), .rb_addr(rb_addr[C]), .rb_wdata(rb_wdata[C]),
      .ch_tx(sca_tx[k]), .ch_rx(sca_rx[k]));
  end

endmodule

// sc_axi_bfm: AXI4 Full and AXI4-Lite master for the testbenches (not
// synthesizable). Plays the role of the processor that drives the slow-control
// block: write and read bursts of 32-bit words on the Full port, single
// register writes and reads on the Lite port. Each task waits for the whole
// handshake; rresp/bresp other than OKAY are counted in n_resp_err.
module sc_axi_bfm #(
  parameter int FAW = 20,
  parameter int LAW = 10,
  parameter int IDW = 4
) (
  input  logic           clk,
  output logic [IDW-1:0] s_awid,
  output logic [FAW-1:0] s_awaddr,
  output logic [7:0]     s_awlen,
  output logic [2:0]     s_awsize,
  output logic [1:0]     s_awburst,
  output logic           s_awvalid,
  input  logic           s_awready,
  output logic [31:0]    s_wdata,
  output logic [3:0]     s_wstrb,
  output logic           s_wlast,
  output logic           s_wvalid,
  input  logic           s_wready,
  input  logic [IDW-1:0] s_bid,
  input  logic [1:0]     s_bresp,
  input  logic           s_bvalid,
  output logic           s_bready,
  output logic [IDW-1:0] s_arid,
  output logic [FAW-1:0] s_araddr,
  output logic [7:0]     s_arlen,
  output logic [2:0]     s_arsize,
  output logic [1:0]     s_arburst,
  output logic           s_arvalid,
  input  logic           s_arready,
  input  logic [IDW-1:0] s_rid,
  input  logic [31:0]    s_rdata,
  input  logic [1:0]     s_rresp,
  input  logic           s_rlast,
  input  logic           s_rvalid,
  output logic           s_rready,
  output logic [LAW-1:0] l_awaddr,
  output logic           l_awvalid,
  input  logic           l_awready,
  output logic [31:0]    l_wdata,
  output logic [3:0]     l_wstrb,
  output logic           l_wvalid,
  input  logic           l_wready,
  input  logic [1:0]     l_bresp,
  input  logic           l_bvalid,
  output logic           l_bready,
  output logic [LAW-1:0] l_araddr,
  output logic           l_arvalid,
  input  logic           l_arready,
  input  logic [31:0]    l_rdata,
  input  logic [1:0]     l_rresp,
  input  logic           l_rvalid,
  output logic           l_rready
);
  int n_resp_err = 0;
  int n_id_err   = 0;
  int n_last_err = 0;

  initial begin
    s_awid = '0; s_awaddr = '0; s_awlen = '0; s_awsize = 3'd2; s_awburst = 2'b01;
    s_awvalid = 0; s_wdata = '0; s_wstrb = '0; s_wlast = 0; s_wvalid = 0; s_bready = 0;
    s_arid = '0; s_araddr = '0; s_arlen = '0; s_arsize = 3'd2; s_arburst = 2'b01;
    s_arvalid = 0; s_rready = 0;
    l_awaddr = '0; l_awvalid = 0; l_wdata = '0; l_wstrb = '0; l_wvalid = 0; l_bready = 0;
    l_araddr = '0; l_arvalid = 0; l_rready = 0;
  end

  task automatic write_burst(input logic [FAW-1:0] addr, input logic [31:0] d[$],
                             input logic [3:0] strb = 4'hF, input logic [1:0] burst = 2'b01);
    logic [IDW-1:0] id = IDW'($urandom);
    @(negedge clk);
    s_awid = id; s_awaddr = addr; s_awlen = 8'(d.size() - 1); s_awburst = burst;
    s_awvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0;
    foreach (d[i]) begin
      s_wdata = d[i]; s_wstrb = strb; s_wlast = (i == d.size() - 1); s_wvalid = 1;
      do @(posedge clk); while (!s_wready);
      @(negedge clk);
    end
    s_wvalid = 0; s_wlast = 0; s_bready = 1;
    do @(posedge clk); while (!s_bvalid);
    if (s_bresp != 2'b00) n_resp_err++;
    if (s_bid != id) n_id_err++;
    @(negedge clk); s_bready = 0;
  endtask

  task automatic read_burst(input logic [FAW-1:0] addr, input int n, output logic [31:0] d[$],
                            input logic [1:0] burst = 2'b01);
    logic [IDW-1:0] id = IDW'($urandom);
    d.delete();
    @(negedge clk);
    s_arid = id; s_araddr = addr; s_arlen = 8'(n - 1); s_arburst = burst; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0; s_rready = 1;
    for (int i = 0; i < n; i++) begin
      do @(posedge clk); while (!s_rvalid);
      d.push_back(s_rdata);
      if (s_rresp != 2'b00) n_resp_err++;
      if (s_rid != id) n_id_err++;
      if (s_rlast != (i == n - 1)) n_last_err++;
    end
    @(negedge clk); s_rready = 0;
  endtask

  task automatic lite_write(input logic [LAW-1:0] addr, input logic [31:0] d);
    @(negedge clk);
    l_awaddr = addr; l_awvalid = 1; l_wdata = d; l_wstrb = 4'hF; l_wvalid = 1;
    do @(posedge clk); while (!(l_awready && l_wready));
    @(negedge clk); l_awvalid = 0; l_wvalid = 0; l_bready = 1;
    do @(posedge clk); while (!l_bvalid);
    if (l_bresp != 2'b00) n_resp_err++;
    @(negedge clk); l_bready = 0;
  endtask

  task automatic lite_read(input logic [LAW-1:0] addr, output logic [31:0] d);
    @(negedge clk);
    l_araddr = addr; l_arvalid = 1;
    do @(posedge clk); while (!l_arready);
    @(negedge clk); l_arvalid = 0; l_rready = 1;
    do @(posedge clk); while (!l_rvalid);
    d = l_rdata;
    if (l_rresp != 2'b00) n_resp_err++;
    @(negedge clk); l_rready = 0;
  endtask

endmodule

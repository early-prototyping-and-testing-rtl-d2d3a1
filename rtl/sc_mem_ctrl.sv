// sc_mem_ctrl: memory and control module of the slow-control block.
//
// Holds, for each of N_CORES cores, a send buffer and a receive buffer of
// DEPTH x 128-bit transaction words (sc_bram), and the core's control and
// status registers. Software reaches the buffers through an AXI4 Full slave
// and the registers through an AXI4-Lite slave; the cores reach their own
// buffers through the core-side RAM ports. Cores 0..N_LPGBT-1 are lpGBT cores,
// the rest GBT-SCA cores.
//
// AXI4 Full map (32-bit data, byte address):
//   [3:2] 32-bit word within the 128-bit entry (word 0 = bits 31:0)
//   [EW+3:4] entry, [EW+4] buffer (0 send, 1 receive), above: core index
// Bursts: INCR (WRAP is treated as INCR) and FIXED, any length, one burst at
// a time, writes take priority. A write beat takes one cycle; a read beat two
// (address, then data). Addresses beyond the last core read 0 and ignore
// writes. Both buffers can be written and read by software.
//
// AXI4-Lite map: [4:2] register (sc_pkg REG_*), above: core index.
//   CTRL    W  [0] start (pulse), [1] clear counters (pulse); reads 0
//   COUNT   RW transactions to run (1..DEPTH)
//   TIMEOUT RW reply timeout in cycles
//   STATUS  R  [0] busy, [1] done
//   NDONE/NTMO/NERR R counters, INFO R [7:0] mux factor, [8] GBT-SCA core
// Responses are OKAY. One register access is handled at a time.
//
// Clocks: both AXI slaves run on aclk (reset arst), the cores and their
// registers on clk (reset rst); the two clocks may be unrelated. The buffers
// are dual-clock RAMs. Each AXI4-Lite access crosses into the clk domain as
// one operation through a toggle handshake with two-flop synchronisers, and
// its response is given only after the clk side has performed it. A write to
// CTRL has therefore taken effect when BVALID rises, and a STATUS read after
// it never sees the state from before the start. An access takes about six
// cycles of the slower clock. Both resets must be applied together.
//
// The buffer sizes, the two AXI flavours, the per-core registers and the AXI
// clock being separate from the slow-control clock are the document's; the
// address maps, the register set and the crossing scheme are this design's.
module sc_mem_ctrl #(
  parameter int unsigned N_CORES   = 32,
  parameter int unsigned N_LPGBT   = 16,
  parameter int unsigned LPGBT_MUX = 16,
  parameter int unsigned SCA_MUX   = 40,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned IDW       = 4,
  localparam int unsigned EW       = $clog2(DEPTH),
  localparam int unsigned CW       = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned FAW      = EW + 5 + CW,   // AXI Full address width
  localparam int unsigned LAW      = 5 + CW         // AXI Lite address width
) (
  input  logic            aclk,     // AXI clock (both slaves)
  input  logic            arst,
  input  logic            clk,      // slow-control clock (core side)
  input  logic            rst,
  // AXI4 Full slave
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
  // AXI4-Lite slave
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
  // core side
  input  logic            sb_en    [N_CORES],
  input  logic [EW-1:0]   sb_addr  [N_CORES],
  output logic [127:0]    sb_rdata [N_CORES],
  input  logic            rb_we    [N_CORES],
  input  logic [EW-1:0]   rb_addr  [N_CORES],
  input  logic [127:0]    rb_wdata [N_CORES],
  output logic            start    [N_CORES],
  output logic            clear    [N_CORES],
  output logic [EW:0]     count    [N_CORES],
  output logic [31:0]     timeout  [N_CORES],
  input  logic            busy     [N_CORES],
  input  logic            done     [N_CORES],
  input  logic [31:0]     n_done   [N_CORES],
  input  logic [31:0]     n_timeout[N_CORES],
  input  logic [31:0]     n_error  [N_CORES]
);
  import sc_pkg::*;

  // ---------------------------------------------------------------- buffers
  typedef enum logic [2:0] {F_IDLE, F_W, F_B, F_RA, F_RD} fst_e;
  fst_e fst;

  logic [FAW-1:0] f_addr;
  logic [7:0]     f_left;
  logic [1:0]     f_burst;
  logic [IDW-1:0] f_id;

  logic           a_en_any;
  logic [15:0]    a_we;
  logic [127:0]   a_rdata [2*N_CORES];
  logic [CW-1:0]  a_core;
  logic           a_buf;
  logic [1:0]     a_word;
  logic [CW-1:0]  rd_core_q;
  logic           rd_buf_q;
  logic [1:0]     rd_word_q;
  logic [127:0]   rb_unused [N_CORES];

  assign a_core = f_addr[EW+5 +: CW];
  assign a_buf  = f_addr[EW+4];
  assign a_word = f_addr[3:2];

  assign a_en_any = (fst == F_W && s_wvalid) || (fst == F_RA);
  assign a_we     = (fst == F_W && s_wvalid) ? (16'(s_wstrb) << (4 * a_word)) : 16'h0;

  for (genvar c = 0; c < N_CORES; c++) begin : g_buf
    logic sel_s, sel_r;
    assign sel_s = a_en_any && (int'(a_core) == c) && !a_buf;
    assign sel_r = a_en_any && (int'(a_core) == c) &&  a_buf;

    sc_bram #(.DEPTH(DEPTH), .W(128)) u_send (
      .clk_a(aclk), .a_en(sel_s), .a_we, .a_addr(f_addr[4 +: EW]), .a_wdata({4{s_wdata}}),
      .a_rdata(a_rdata[2*c]), .clk_b(clk),
      .b_en(sb_en[c]), .b_we(1'b0), .b_addr(sb_addr[c]), .b_wdata('0),
      .b_rdata(sb_rdata[c]));

    sc_bram #(.DEPTH(DEPTH), .W(128)) u_recv (
      .clk_a(aclk), .a_en(sel_r), .a_we, .a_addr(f_addr[4 +: EW]), .a_wdata({4{s_wdata}}),
      .a_rdata(a_rdata[2*c+1]), .clk_b(clk),
      .b_en(rb_we[c]), .b_we(rb_we[c]), .b_addr(rb_addr[c]), .b_wdata(rb_wdata[c]),
      .b_rdata(rb_unused[c]));
  end

  logic [127:0] rd_entry;
  always_comb begin
    rd_entry = '0;
    for (int i = 0; i < 2 * N_CORES; i++)
      if (i == 2 * int'(rd_core_q) + int'(rd_buf_q)) rd_entry = a_rdata[i];
  end

  function automatic logic [FAW-1:0] next_addr(logic [FAW-1:0] a, logic [1:0] burst);
    return (burst == 2'b00) ? a : a + FAW'(4);
  endfunction

  assign s_awready = (fst == F_IDLE);
  assign s_arready = (fst == F_IDLE) && !s_awvalid;
  assign s_wready  = (fst == F_W);
  assign s_bvalid  = (fst == F_B);
  assign s_bresp   = 2'b00;
  assign s_bid     = f_id;
  assign s_rvalid  = (fst == F_RD);
  assign s_rresp   = 2'b00;
  assign s_rid     = f_id;
  assign s_rlast   = (f_left == 8'd0);
  assign s_rdata   = (int'(rd_core_q) < N_CORES) ? rd_entry[32*rd_word_q +: 32] : 32'h0;

  always_ff @(posedge aclk) begin
    if (arst) begin
      fst       <= F_IDLE;
      f_addr    <= '0;
      f_left    <= '0;
      f_burst   <= '0;
      f_id      <= '0;
      rd_core_q <= '0;
      rd_buf_q  <= 1'b0;
      rd_word_q <= '0;
    end else begin
      unique case (fst)
        F_IDLE: begin
          if (s_awvalid) begin
            f_addr  <= s_awaddr;
            f_left  <= s_awlen;
            f_burst <= s_awburst;
            f_id    <= s_awid;
            fst     <= F_W;
          end else if (s_arvalid) begin
            f_addr  <= s_araddr;
            f_left  <= s_arlen;
            f_burst <= s_arburst;
            f_id    <= s_arid;
            fst     <= F_RA;
          end
        end
        F_W: if (s_wvalid) begin
          f_addr <= next_addr(f_addr, f_burst);
          f_left <= f_left - 8'd1;
          if (s_wlast || f_left == 8'd0) fst <= F_B;
        end
        F_B: if (s_bready) fst <= F_IDLE;
        F_RA: begin
          rd_core_q <= a_core;
          rd_buf_q  <= a_buf;
          rd_word_q <= a_word;
          fst       <= F_RD;
        end
        F_RD: if (s_rready) begin
          f_addr <= next_addr(f_addr, f_burst);
          f_left <= f_left - 8'd1;
          fst    <= (f_left == 8'd0) ? F_IDLE : F_RA;
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------------- registers
  // Every AXI4-Lite access is handed to the slow-control clock domain as one
  // operation: the aclk side captures it, flips op_req and waits until op_ack
  // (flipped by the clk side once the access is done) comes back equal. The
  // operation fields and op_rdata are held stable across the crossing, so
  // only the two toggles need synchronisers.
  logic [EW:0]   count_q   [N_CORES];
  logic [31:0]   timeout_q [N_CORES];

  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_RESP} lst_e;
  lst_e          lst;
  logic          op_we;
  logic [CW-1:0] op_core;
  logic [2:0]    op_reg;
  logic [31:0]   op_wdata;
  logic [3:0]    op_wstrb;
  logic [31:0]   op_rdata;
  logic          op_req, op_ack;            // toggles, aclk and clk side
  logic [1:0]    ack_sync, req_sync;        // two-flop synchronisers
  logic          req_seen;

  // aclk side: the AXI4-Lite handshakes.
  assign l_awready = (lst == L_IDLE) && l_awvalid && l_wvalid;
  assign l_wready  = l_awready;
  assign l_arready = (lst == L_IDLE) && !(l_awvalid && l_wvalid) && l_arvalid;
  assign l_bvalid  = (lst == L_RESP) && op_we;
  assign l_rvalid  = (lst == L_RESP) && !op_we;
  assign l_bresp   = 2'b00;
  assign l_rresp   = 2'b00;
  assign l_rdata   = op_rdata;

  always_ff @(posedge aclk) begin
    if (arst) begin
      lst      <= L_IDLE;
      op_we    <= 1'b0;
      op_core  <= '0;
      op_reg   <= '0;
      op_wdata <= '0;
      op_wstrb <= '0;
      op_req   <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], op_ack};
      unique case (lst)
        L_IDLE: begin
          if (l_awready) begin
            op_we    <= 1'b1;
            op_core  <= l_awaddr[5 +: CW];
            op_reg   <= l_awaddr[4:2];
            op_wdata <= l_wdata;
            op_wstrb <= l_wstrb;
            op_req   <= !op_req;
            lst      <= L_WAIT;
          end else if (l_arready) begin
            op_we    <= 1'b0;
            op_core  <= l_araddr[5 +: CW];
            op_reg   <= l_araddr[4:2];
            op_req   <= !op_req;
            lst      <= L_WAIT;
          end
        end
        L_WAIT: if (ack_sync[1] == op_req) lst <= L_RESP;
        L_RESP: if (op_we ? l_bready : l_rready) lst <= L_IDLE;
        default: lst <= L_IDLE;
      endcase
    end
  end

  // clk side: the registers themselves.
  for (genvar c = 0; c < N_CORES; c++) begin : g_ctl
    assign count[c]   = count_q[c];
    assign timeout[c] = timeout_q[c];
  end

  function automatic logic [31:0] rd_reg(int c, logic [2:0] r);
    logic [31:0] v;
    v = '0;
    unique case (int'(r))
      REG_COUNT:   v = 32'(count_q[c]);
      REG_TIMEOUT: v = timeout_q[c];
      REG_STATUS:  v = {30'd0, done[c], busy[c]};
      REG_NDONE:   v = n_done[c];
      REG_NTMO:    v = n_timeout[c];
      REG_NERR:    v = n_error[c];
      REG_INFO:    v = (c < int'(N_LPGBT)) ? 32'(LPGBT_MUX) : (32'h100 | 32'(SCA_MUX));
      default:     v = '0;
    endcase
    return v;
  endfunction

  assign req_seen = (req_sync[1] != op_ack);

  always_ff @(posedge clk) begin
    if (rst) begin
      req_sync <= '0;
      op_ack   <= 1'b0;
      op_rdata <= '0;
      for (int c = 0; c < N_CORES; c++) begin
        count_q[c]   <= (EW+1)'(DEPTH);
        timeout_q[c] <= DEFAULT_TIMEOUT;
        start[c]     <= 1'b0;
        clear[c]     <= 1'b0;
      end
    end else begin
      req_sync <= {req_sync[0], op_req};
      for (int c = 0; c < N_CORES; c++) begin
        start[c] <= 1'b0;
        clear[c] <= 1'b0;
      end
      if (req_seen) begin
        op_ack <= !op_ack;
        if (op_we) begin
          for (int c = 0; c < N_CORES; c++) begin
            if (int'(op_core) == c) begin
              unique case (int'(op_reg))
                REG_CTRL: if (op_wstrb[0]) begin
                  start[c] <= op_wdata[0];
                  clear[c] <= op_wdata[1];
                end
                REG_COUNT: if (|op_wstrb) count_q[c] <= op_wdata[EW:0];
                REG_TIMEOUT:
                  for (int b = 0; b < 4; b++)
                    if (op_wstrb[b]) timeout_q[c][8*b +: 8] <= op_wdata[8*b +: 8];
                default: ;
              endcase
            end
          end
        end else begin
          op_rdata <= '0;
          for (int c = 0; c < N_CORES; c++)
            if (int'(op_core) == c) op_rdata <= rd_reg(c, op_reg);
        end
      end
    end
  end

endmodule

// sc_bram: dual-port, dual-clock transaction buffer, DEPTH words of W bits.
//
// One of these holds the send buffer and another the receive buffer of every
// lpGBT or GBT-SCA core. Port A is the software side (the AXI4 Full slave in
// sc_mem_ctrl, on the AXI clock clk_a) and writes with byte enables; port B is
// the core side (the transactor, on the slow-control clock clk_b) and writes
// whole words. Both ports read synchronously: data appears the cycle after
// en, on that port's clock, and holds until the next read on that port. A
// read of a word that the other port writes in the same moment, and two
// writes of the same word at once, give undefined results; the transactor and
// software never touch the same entry at the same time.
//
// The memory is written from two processes, one per clock, which is the
// usual description of a true dual-port block RAM with independent clocks;
// that is why a lint tool reports it as driven from two clock domains. The
// processes use plain always blocks because always_ff allows one writer only.
//
// 1024 words of 128 bits is the buffer size of the architecture (four block
// RAMs per buffer on the target FPGA), as is the separate AXI clock.
// Registered outputs without reset are this design's choice.
module sc_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic           clk_a,
  input  logic           a_en,
  input  logic [W/8-1:0] a_we,
  input  logic [AW-1:0]  a_addr,
  input  logic [W-1:0]   a_wdata,
  output logic [W-1:0]   a_rdata,
  input  logic           clk_b,
  input  logic           b_en,
  input  logic           b_we,
  input  logic [AW-1:0]  b_addr,
  input  logic [W-1:0]   b_wdata,
  output logic [W-1:0]   b_rdata
);
  logic [W-1:0] mem [DEPTH];
  always @(posedge clk_a) begin
    if (a_en) begin
      for (int i = 0; i < W/8; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[a_addr];
    end
  end
  always @(posedge clk_b) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule

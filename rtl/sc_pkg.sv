// sc_pkg: types and constants shared by the slow-control block.
//
// The slow-control block exchanges 128-bit transaction words with software:
// one word per transaction in the send buffer, one reply word per transaction
// in the receive buffer. The 128-bit width, the 1024-entry buffers, the 1:16
// and 1:40 multiplexing factors and the 16 + 16 cores are the figures of the
// architecture this RTL implements. The bit layout of the words, the frame
// formats and the register map are this design's own choices, documented in
// the structs below and in the README.
package sc_pkg;

  localparam int unsigned WORD_W      = 128;  // transaction word
  localparam int unsigned BUF_DEPTH   = 1024; // transactions per buffer
  localparam int unsigned LPGBT_MUX   = 16;   // channels per lpGBT core
  localparam int unsigned SCA_MUX     = 40;   // channels per GBT-SCA core
  localparam int unsigned N_LPGBT     = 16;   // lpGBT cores per FPGA
  localparam int unsigned N_SCA       = 16;   // GBT-SCA cores per FPGA
  localparam int unsigned MAX_FRAME   = 16;   // longest frame in bytes
  localparam int unsigned MAX_DATA    = 4;    // data bytes per transaction

  // HDLC flag and the 2-bit stream idle level.
  localparam logic [7:0] HDLC_FLAG = 8'h7E;

  // Reply status codes.
  typedef enum logic [1:0] {
    ST_OK      = 2'd0,
    ST_TIMEOUT = 2'd1,
    ST_BADFRM  = 2'd2   // check byte / FCS mismatch or misaligned frame
  } rsp_status_e;

  // lpGBT request: one IC read or write of up to four consecutive registers.
  typedef struct packed {
    logic [5:0]  channel;    // front-end lpGBT behind the 1:16 mux
    logic [9:0]  rsvd0;
    logic [6:0]  chip_addr;  // lpGBT chip address
    logic        rd;         // 1 = read, 0 = write
    logic [7:0]  command;    // command byte, forwarded as is
    logic [15:0] reg_addr;   // first register
    logic [2:0]  nbytes;     // 1..4 registers
    logic [4:0]  rsvd1;
    logic [31:0] data;       // write data, data[7:0] goes to reg_addr
    logic [39:0] rsvd2;
  } lpgbt_req_t;

  // lpGBT reply: the fields echoed by the lpGBT plus the data it returned.
  typedef struct packed {
    logic [5:0]  channel;
    rsp_status_e status;
    logic [7:0]  rsvd0;
    logic [6:0]  chip_addr;
    logic        rd;
    logic [7:0]  command;
    logic [15:0] reg_addr;
    logic [2:0]  nbytes;
    logic [4:0]  rsvd1;
    logic [31:0] data;
    logic [39:0] rsvd2;
  } lpgbt_rsp_t;

  // GBT-SCA request: the HDLC address/control bytes and one SCA command.
  typedef struct packed {
    logic [5:0]  channel;    // front-end GBT-SCA behind the 1:40 mux
    logic [9:0]  rsvd0;
    logic [7:0]  address;    // HDLC address
    logic [7:0]  control;    // HDLC control (sequence numbers, set by software)
    logic [7:0]  trid;       // transaction ID
    logic [7:0]  sca_chan;   // SCA internal channel
    logic [7:0]  length;     // payload length, 0..4
    logic [7:0]  command;
    logic [31:0] data;
    logic [31:0] rsvd1;
  } sca_req_t;

  typedef struct packed {
    logic [5:0]  channel;
    rsp_status_e status;
    logic [7:0]  rsvd0;
    logic [7:0]  address;
    logic [7:0]  control;
    logic [7:0]  trid;
    logic [7:0]  sca_chan;
    logic [7:0]  error;      // SCA error flags
    logic [7:0]  length;
    logic [31:0] data;
    logic [31:0] rsvd1;
  } sca_rsp_t;

  // One step of the CRC-16/X.25 used as HDLC frame check sequence
  // (polynomial x^16+x^12+x^5+1, reflected, init 0xFFFF, final complement
  // applied by the caller).
  function automatic logic [15:0] crc16_byte(logic [15:0] crc, logic [7:0] b);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ b[i]) c = (c >> 1) ^ 16'h8408;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Per-core register offsets (32-bit words) on the AXI4-Lite port.
  localparam int unsigned REG_CTRL    = 0; // [0] start (self clearing), [1] clear counters
  localparam int unsigned REG_COUNT   = 1; // transactions to run, 1..BUF_DEPTH
  localparam int unsigned REG_TIMEOUT = 2; // reply timeout in clock cycles
  localparam int unsigned REG_STATUS  = 3; // [0] busy, [1] done
  localparam int unsigned REG_NDONE   = 4; // transactions completed
  localparam int unsigned REG_NTMO    = 5; // transactions that timed out
  localparam int unsigned REG_NERR    = 6; // replies with a bad check
  localparam int unsigned REG_INFO    = 7; // [7:0] mux factor, [8] 1 = GBT-SCA core

  localparam logic [31:0] DEFAULT_TIMEOUT = 32'd4000; // 100 us at 40 MHz

endpackage

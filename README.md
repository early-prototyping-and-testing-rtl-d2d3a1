# HGCAL back-end slow-control block

The CMS High-Granularity Calorimeter front-end holds about 150 000
radiation-tolerant ASICs. Every back-end FPGA configures and monitors its share
of them through front-end transceivers: lpGBTs, and GBT-SCAs behind the
lpGBTs. Those transceivers carry I2C masters that reach the remaining ASICs.
This RTL is the FPGA block that does that work. Software on a processor writes
register read/write transactions into memory over AXI. The block turns each
transaction into a frame on an 80 Mb/s serial stream to the right transceiver,
waits for the transceiver's reply, and stores the decoded reply where software
can read it.

The central idea is a compromise between logic cost and configuration time.
One engine per front-end link would be too big, and a single engine for all
links would be too slow. So the block has **16 lpGBT cores and 16 GBT-SCA
cores**. Each core runs **one transaction at a time** and multiplexes it onto
one of **16 (lpGBT) or 40 (GBT-SCA)** front-end streams. That gives
16 × 16 + 16 × 40 = 896 streams, enough for the 756 transceivers one back-end
FPGA has to serve.

```
                 AXI4 Full (buffers)        AXI4-Lite (registers)
                         |                          |
              +----------v--------------------------v-----------+
              |      sc_mem_ctrl: per core a 1024 x 128 send    |
              |      buffer, a 1024 x 128 receive buffer and    |
              |      a set of control / status registers        |
              +---+-------------------------------------------+-+
                  | core-side RAM ports, start/count/status   |
   x16  +---------v------------------------+   x16  +----------v-----------------------+
        | lpgbt_core                       |        | sca_core                         |
        | sc_transactor -> lpgbt_engine -> |        | sc_transactor -> sca_engine ->   |
        |   sc_chan_mux 1:16               |        |   sc_chan_mux 1:40               |
        +---------+------------------------+        +----------+-----------------------+
                  | 16 x 2-bit streams                         | 40 x 2-bit streams
                  v  (to the lpGBT link)                       v
```

The cores run on the 40 MHz slow-control clock `clk`. Both AXI ports run on a
second clock, `aclk`, which may come from an unrelated source. Each clock has
a synchronous, active-high reset (`rst`, `arst`), and the two resets are
applied together. A front-end stream runs at 80 Mb/s and is carried inside
the FPGA as a 2-bit word per `clk` cycle. Bit 0 of the word goes first on the
line.

## Sizes

| Parameter (`slow_control`) | Default | Meaning |
|---|---|---|
| `N_LPGBT_CORES` | 16 | lpGBT cores |
| `N_SCA_CORES` | 16 | GBT-SCA cores |
| `LPGBT_CH` | 16 | channels per lpGBT core |
| `SCA_CH` | 40 | channels per GBT-SCA core |
| `DEPTH` | 1024 | transactions per buffer |
| `IDW` | 4 | AXI ID width |

These defaults are the full configuration. A buffer of 1024 × 128 bits fits in
four 36 Kb block RAMs. A small lab build with one core of each type
(`N_LPGBT_CORES = N_SCA_CORES = 1`) uses 16 block RAMs for its four buffers.

## The life of a transaction

1. **Software fills a send buffer.** Each transaction is one 128-bit word,
   written as four 32-bit AXI words (word 0 holds bits 31:0). Software then
   writes `COUNT` and pulses `start` in that core's `CTRL` register.
2. **The transactor** (`sc_transactor`) reads entry *i*. It captures the word
   and puts the word's channel field on the multiplexer select. It then offers
   the word to the engine and waits. Nothing else happens in that core until
   the engine returns a reply or `TIMEOUT` cycles pass. On a timeout the
   transactor cancels the engine and stores the request word itself, with
   status `TIMEOUT`. The reply goes to entry *i* of the receive buffer, and
   then the transactor moves on to entry *i + 1*. After `COUNT` entries it
   raises `done` (`STATUS[1]`).
3. **The engine** (`lpgbt_engine` or `sca_engine`) turns the word into the
   bytes of one frame, adds the check bytes, and streams the bytes into an
   HDLC framer. It then collects the reply bytes from an HDLC deframer and
   decodes them into a 128-bit reply word. A reply with a bad check or the
   wrong length comes back with status `BADFRM`.
4. **The channel multiplexer** (`sc_chan_mux`) drives the engine's stream onto
   the selected channel and holds every other channel at all ones. It also
   returns the selected channel's incoming stream to the engine. Each
   direction has one register stage.
5. **Software** polls `STATUS` and reads the replies from the receive buffer.

The transactor adds five cycles per transaction to the time spent on the line.
In simulation, with a front-end that answers 8 cycles after the request, a
1-byte lpGBT write takes about 98 cycles, about 115 cycles when sustained over
a batch (about 350 000 transactions/s). A 4-byte GBT-SCA write takes about
125 cycles (about 320 000/s). Both are above the 230 000 transactions/s that
the real block reaches per core. The real front-end reply latency is not
modelled.

## The 80 Mb/s streams: HDLC at two bits per clock

Both engines frame their bytes the same way (`hdlc_tx`, `hdlc_rx`):

* Between frames the transmitter sends back-to-back flags, `0x7E`.
* Bytes go out LSB first. After five consecutive 1s inside a frame, a 0 is
  inserted, so six 1s in a row can only mean a flag.
* One flag closes a frame.

The line carries two bits per clock, so both ends run their bit-level state
machine twice per cycle. This is written as a `step` function applied twice
inside one `always_comb`.

Some details are less obvious:

* **Opening flag rule.** The multiplexer switches channel just before a
  request. A frame therefore starts only after a flag that was sent *in full*
  while the frame's first byte was already waiting. Without this rule, a
  front-end just switched onto the stream could see only the tail of a flag
  after its idle 1s and miss the start of the frame. The cost is 4 to 8 cycles
  of latency.
* **Alignment check without look-ahead.** The receiver emits each byte as soon
  as it is complete. A flag is recognised only at its sixth 1. By then the
  flag's leading 0 and five 1s have already entered the byte assembler, so a
  frame that ends on a byte boundary always leaves exactly six pending bits.
  `eof_ok` is exactly that test. A misaligned frame can produce one spurious
  byte before `eof` with `eof_ok` low. The engines discard such a frame as a
  whole.
* **Abort and idle.** Seven or more 1s drop any frame in progress. An idle
  all-ones line is therefore harmless.
* **Check bytes** (lpGBT parity, GBT-SCA FCS) are plain payload bytes for the
  framer. The engines compute them when they send and verify them when they
  receive.

## Frame formats

Bytes are listed in line order, between the flags.

**lpGBT internal-control (IC) frame** (`lpgbt_engine`):

| Request | Reply |
|---|---|
| `0x00` | `0x00` |
| `{chip_addr[6:0], rd}` | `{chip_addr, rd}` |
| `command` | `command` |
| `nbytes` (1–4), `0x00` | `nbytes`, `0x00` |
| `reg_addr[7:0]`, `reg_addr[15:8]` | `reg_addr[7:0]`, `reg_addr[15:8]` |
| data × `nbytes` (writes only) | data × `nbytes` (register contents after the access) |
| parity | parity |

The parity byte is the XOR of all bytes from `command` up to the last data
byte. At most four registers are accessed per transaction, so request and
reply both fit in 128 bits.

**GBT-SCA frame** (`sca_engine`):

| Request | Reply |
|---|---|
| address, control, transaction ID, SCA channel | same four, echoed |
| length (0–4), command | error, length |
| data × length, `data[7:0]` first | data × length |
| FCS low, FCS high | FCS low, FCS high |

The FCS is CRC-16/X.25: polynomial 0x1021 reflected, initial value 0xFFFF,
complemented at the end. A receiver that runs the CRC over the data and the
FCS must reach 0xF0B8. The HDLC control byte (sequence numbers, link set-up)
comes from software and is passed through unchanged. Software therefore
manages the GBT-SCA link layer.

## Transaction words

All fields are defined in `rtl/sc_pkg.sv` as packed structs. Every word keeps
the channel (the multiplexer input) in bits `[127:122]` and the reply status in
`[121:120]`: 0 OK, 1 TIMEOUT, 2 BADFRM.

| lpGBT request `lpgbt_req_t` | bits | GBT-SCA request `sca_req_t` | bits |
|---|---|---|---|
| channel | 127:122 | channel | 127:122 |
| reserved | 121:112 | reserved | 121:112 |
| chip_addr | 111:105 | address | 111:104 |
| rd | 104 | control | 103:96 |
| command | 103:96 | trid | 95:88 |
| reg_addr | 95:80 | sca_chan | 87:80 |
| nbytes | 79:77 | length | 79:72 |
| reserved | 76:72 | command | 71:64 |
| data | 71:40 | data | 63:32 |
| reserved | 39:0 | reserved | 31:0 |

A reply has the same layout, with the status in the reserved bits 121:120.
The GBT-SCA reply puts `error` where the request has `length`, and `length`
where the request has `command`.

## Software interface

**AXI4 Full** (32-bit data), byte address fields from the bottom up:

| bits | field |
|---|---|
| 3:2 | 32-bit word within the 128-bit entry |
| 13:4 | entry (0–1023) |
| 14 | 0 = send buffer, 1 = receive buffer |
| 19:15 | core: 0–15 lpGBT, 16–31 GBT-SCA |

The slave handles INCR and FIXED bursts of any length; WRAP is treated as
INCR. It serves one burst at a time, and writes go before reads. A write beat
takes one cycle and a read beat two. Both buffers can be read and written from
software. All responses are OKAY.

**AXI4-Lite** (32-bit): address bits 4:2 select the register, bits 9:5 the
core.

| offset | register | access | content |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0 start, bit 1 clear counters (one-cycle pulses) |
| 0x04 | COUNT | RW | transactions to run, 1–1024 (reset: 1024) |
| 0x08 | TIMEOUT | RW | reply timeout in cycles (reset: 4000, i.e. 100 µs) |
| 0x0C | STATUS | R | bit 0 busy, bit 1 done |
| 0x10 | NDONE | R | transactions completed |
| 0x14 | NTMO | R | transactions that timed out |
| 0x18 | NERR | R | replies with a bad check |
| 0x1C | INFO | R | bits 7:0 channels per core, bit 8 set for a GBT-SCA core |

## Crossing between the AXI clock and the core clock

The buffers are true dual-port RAMs with one clock per port. Software uses
port A on `aclk`, and the core uses port B on `clk`. The transactor and
software never touch the same entry at the same time, so no collision logic
is needed.

The registers live in the `clk` domain. Each AXI4-Lite access is captured on
`aclk` and handed over as one operation: address, data and strobes are held
stable while a request toggle crosses through a two-flop synchroniser. The
`clk` side performs the access exactly as a single-clock register file would.
It then flips an acknowledge toggle that crosses back the same way. Only
after that does the slave raise BVALID or RVALID.

A register access therefore takes about six cycles of the slower clock, and
accesses are strictly ordered. Once a write of `CTRL` with start has been
acknowledged, the core has already started, so a following `STATUS` read can
never return the `done` of the previous run.

## Programming sequence

A typical sequence: burst-write *n* words to the send buffer. Write `COUNT = n`.
Write `CTRL = 3` (clear counters and start). Poll `STATUS` until it reads
`0b10`. Burst-read *n* words from the receive buffer.

## Where this RTL departs from the original block, and what it leaves out

* **Clock crossing.** The separate AXI clock follows the original system.
  The crossing scheme described above is this design's own.
* **Frame formats, word layouts, address map and registers** are this design's
  own. They were chosen to be close to the public lpGBT IC and GBT-SCA
  formats. They are not copies of the original firmware's formats, so software
  written for the original block will not run unchanged.
* **HDLC for both protocols.** The GBT-SCA link is HDLC-based. The lpGBT IC
  protocol is its own protocol. Framing it with the same HDLC flags and bit
  stuffing is this design's reading of it.
* **lpGBT and GBT-SCA channels are handled alike.** Whether a channel reaches
  an lpGBT through the IC field, through the EC field, or reaches a GBT-SCA
  through an eLink is decided outside this block.
* **Not included:** the lpGBT link, which packs the IC/EC streams into the
  64-bit lpGBT frame with FEC. Also left out are the transceivers, the AXI
  interconnect, the processor, the clock generation, and the front-end ASICs
  themselves. The testbenches use a behavioural front-end (`tb/fe_model.sv`)
  and an AXI master model (`tb/sc_axi_bfm.sv`).
* **Late replies.** A reply that arrives after its transaction has timed out
  is dropped if the next transaction uses another channel, because the
  multiplexer no longer listens to that stream. If the next transaction goes
  to the same channel, a late reply that ends while that transaction waits
  would be taken as its reply. The echoed header fields let software detect
  this. The block does not match replies to requests itself. The timeout
  should be set well above the slowest front-end reply.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `sc_pkg.sv` | sizes, word structs, status codes, CRC step, register offsets |
| `slow_control.sv` | top level |
| `sc_mem_ctrl.sv` | buffers, AXI4 Full and AXI4-Lite slaves, registers, clock crossing |
| `sc_bram.sv` | dual-port, dual-clock 1024 × 128 buffer |
| `lpgbt_core.sv`, `sca_core.sv` | one core each: transactor, engine, multiplexer |
| `sc_transactor.sv` | per-core sequencing, timeout, counters |
| `lpgbt_engine.sv`, `sca_engine.sv` | request framing and reply decoding |
| `hdlc_tx.sv`, `hdlc_rx.sv` | 2-bit-per-clock HDLC framer and deframer |
| `sc_chan_mux.sv` | 1:N stream multiplexer |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`), plus two
system-level tests:

* `tb_slow_control.sv`: end to end at reduced size, with 2 + 2 cores, 4 and 5
  channels and 64-entry buffers. Every buffer is filled, all cores run at
  once, and the test checks replies, timeouts, bad-check replies, channel
  switches and counter clears.
* `tb_slow_control_full.sv`: the default full-size block. It runs a full
  1024-transaction batch on one lpGBT core and one GBT-SCA core. It takes
  about 2 minutes to compile and a few seconds to run.

`tb_sc_mem_ctrl.sv` writes and reads back every word of the 1 MiB buffer
space. Each testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/sc_pkg.sv \
          tb/tb_slow_control.sv --top-module tb_slow_control -o sim
./obj_dir/sim
```

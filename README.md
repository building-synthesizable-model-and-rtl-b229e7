# AXI4-Stream FIFO core

This core connects a processor to two AXI4-Stream channels without a DMA
engine. Software sends a packet by writing a few registers: the destination,
then the data one word at a time, then the length. The core buffers the packet
and plays it out on the transmit stream (`m_axis_*`). Packets that arrive on
the receive stream (`s_axis_*`) are buffered in the same way. Software finds
them through an interrupt status bit, reads the length and destination, and
then reads the data word by word.

Registers are reached over AXI4-Lite. As a build option, an AXI4 burst port
can carry the two data registers instead, so that a packet's words move in one
burst. Each direction has a store-and-forward mode and a cut-through mode. The
core checks the software's register sequence. It reports mistakes, overruns
and underruns as interrupt bits, and locks a path that has been misused until
that path is reset.

Everything runs on one clock, `s_axi_aclk`, with the active-low synchronous
reset `s_axi_aresetn`. The RTL is plain SystemVerilog-2017 and can be
synthesised. All FIFO memories are arrays that infer RAM.

## Block structure

```
             AXI4-Lite ─► axi4_lite_if ─┐
 (optional)  AXI4 ──────► axi4_if ──────┤
                                        ▼
                                 register_space ◄─── calc_unit (TDFV, RDFO)
                                   │        ▲   ◄─── interrupt_controller ─► interrupt
              TDR/TDFD/TLR writes  │        │  RLR/RDR/RDFD loads
                                   ▼        │
          transmit_control (+length_calc)  receive_control
                                   │        ▲
                                   ▼        │
                               tx_fifo    rx_fifo
                                   │        ▲
                                   ▼        │
                          stream_mapper   rx_stream_if
                                   │        ▲
                             m_axis_*     s_axis_*
```

| File | Role |
|---|---|
| `rtl/axis_fifo_pkg.sv` | Register offsets, ISR bit numbers, the reset key, widths and the register access-event struct. |
| `rtl/axis_fifo_top.sv` | The core. It wires the blocks together and derives the transmit FIFO levels. |
| `rtl/axi4_lite_if.sv` | AXI4-Lite slave. Each transaction becomes one register access. |
| `rtl/axi4_if.sv` | AXI4 burst slave. Each beat becomes a TDFD write or an RDFD read. |
| `rtl/register_space.sv` | The thirteen registers, plus the SRR, TDFR and RDFR reset generation. |
| `rtl/length_calc.sv` | Counts the valid bytes of each TDFD write from the write strobe. |
| `rtl/transmit_control.sv` | Watches the transmit register sequence, fills the transmit FIFOs and raises TSE. |
| `rtl/tx_fifo.sv` | Transmit FIFOs: a byte-packed data FIFO, plus length and destination FIFOs. |
| `rtl/stream_mapper.sv` | Transmit stream master, in both modes. Also carries out the deferred transmit reset. |
| `rtl/rx_stream_if.sv` | Receive stream slave and packet length counter. Also carries out the deferred receive reset. |
| `rtl/rx_fifo.sv` | Receive FIFOs for data, length and destination, with partial-packet lengths. |
| `rtl/receive_control.sv` | Follows the receive read sequence and loads RLR, RDR and RDFD ahead of each read. |
| `rtl/calc_unit.sv` | Keeps the TDFV (vacancy) and RDFO (occupancy) registers current. |
| `rtl/interrupt_controller.sv` | Produces the ISR set pulses and the interrupt output. |

The opening comment of each file describes the block in more detail: its
state machine, its timing, and which parts are design choices.

## Registers

Offsets are bytes from `C_BASEADDR`. Only the low 8 bits of the offset are
decoded.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | ISR | read, write 1 to clear | Interrupt status, bits 31..19 (see below). Resets to `0x01D00000`. |
| 0x04 | IER | read/write | Interrupt enable. A bit set here lets the matching ISR bit drive `interrupt`. |
| 0x08 | TDFR | write | `0xA5` resets the transmit path. |
| 0x0C | TDFV | read | Free locations in the transmit data FIFO. |
| 0x10 | TDFD | write | Transmit data word. |
| 0x14 | TLR | write | Transmit packet length in bytes [22:0]. This write completes the packet. |
| 0x14 | RLR | read | Receive packet length in bytes [22:0]. Bit 31 means "partial packet" (cut-through only). |
| 0x18 | RDFR | write | `0xA5` resets the receive path. |
| 0x1C | RDFO | read | Locations used by the last complete received packet. |
| 0x20 | RDFD | read | Receive data word. |
| 0x28 | SRR | write | `0xA5` resets the whole core. |
| 0x2C | TDR | write | Transmit destination (TDEST) [3:0]. |
| 0x30 | RDR | read | Receive destination [3:0]. |

TLR and RLR share offset 0x14: writes go to TLR and reads return RLR. Some
other cores of this kind put RLR at 0x24; this one does not.

Reading a write-only register returns 0. Writes to read-only registers are
ignored. If an ISR bit is set by the core and cleared by software in the same
cycle, the set wins.

### Interrupt bits

| Bit | Name | Raised when |
|---|---|---|
| 19 | RFPE | The receive data FIFO reaches its programmable empty level (rising edge). |
| 20 | RFPF | The receive data FIFO reaches its programmable full level (rising edge). |
| 21 | TFPE | The transmit data FIFO reaches its programmable empty level (rising edge). |
| 22 | TFPF | The transmit data FIFO reaches its programmable full level (rising edge). |
| 23 | RRC | A receive-path reset has completed. |
| 24 | TRC | A transmit-path reset has completed. |
| 25 | TSE | TLR disagrees with the number of words written, counted in whole words. |
| 26 | RC | A complete received packet is ready to be read. |
| 27 | TC | A packet has left on the transmit stream. |
| 28 | TPOE | A TDFD word was written when the transmit FIFO had no room for it. The word is dropped and transmit control locks. |
| 29 | RPUE | RDFD was read while the receive data FIFO was empty and no read sequence was running. |
| 30 | RPORE | RDFD was read when the receive sequence did not expect it. Receive control locks. |
| 31 | RPURE | RLR was read while no length was available. |

A level that is already true at reset raises its bit only after it has gone
away and come back.

## Transmit path

### Software sequence

1. Write TDR with the destination.
2. Write TDFD once per word.
3. Write TLR with the length in bytes.

The write strobe of each TDFD write says how many bytes of that word are valid
(`length_calc`). `transmit_control` adds these counts up.

The word count of TLR is compared with the counted word count. A difference
raises TSE. The packet is still sent, and its length is the counted byte
count, not the TLR value.

A write that breaks the TDR → TDFD… → TLR order sends `transmit_control` to
STUCK. So does TPOE. Only a transmit-path or core reset leaves STUCK.

### Byte-packed data FIFO

The transmit data FIFO is a circular buffer of `C_TX_FIFO_DEPTH × 4` bytes.
Each TDFD write stores only its valid bytes and advances the write pointer by
that many bytes. A short word therefore leaves no hole, and the stream side
sees a dense byte stream.

The read side takes up to one bus width of bytes from the read pointer in the
same cycle (first-word fall-through). A write goes in only if the whole word
fits. The free and used space is reported in bytes; `calc_unit` and the
programmable levels convert it to words.

### Stream mapper modes

- **Store-and-forward** (`enable_cut_through = 0`): a packet starts once its
  length is in the length FIFO. The length is written only after the TLR write,
  when every word is already stored.
- **Cut-through** (`enable_cut_through = 1`): a packet starts as soon as its
  destination is known. While the length is still unknown, a beat is sent only
  if more than one word is buffered. This makes the last beat wait for TLR,
  because only TLR tells where the packet ends.

Each beat carries up to four bytes. TKEEP marks the valid byte lanes from lane
0 up, and TLAST marks the beat that completes the length. TVALID stays high,
and the beat stays unchanged, until TREADY.

## Receive path

### Stream interface

`rx_stream_if` is a three-state Moore machine: IDLE, DATA_WAIT and
DATA_WAIT_TV. TREADY is high only in DATA_WAIT, so the core accepts at most
one beat every two cycles. TREADY also stays low while the receive data FIFO
is full.

The length of a packet counts every beat as a full word. TKEEP is ignored, so
RLR is always a multiple of four.

### Receive FIFOs and the read sequence

Data words, packet lengths and destinations go into three FIFOs. The length
and destination are written on the TLAST beat.

`receive_control` stays one step ahead of the software. It loads RLR from the
length FIFO before software reads RLR. It loads RDR before software reads RDR,
and the next RDFD word before software reads RDFD. The sequence for a complete
packet is:

1. Wait for RC in ISR.
2. Read RLR.
3. Optionally read RDR.
4. Read RDFD once per word.

An RDFD read that the sequence does not expect raises RPORE. Receive control
then stays in STUCK until a receive-path or core reset.

### Cut-through reads

In cut-through mode, a packet still arriving can be read while no complete
packet is ahead of it. Read ISR to start the step. RLR then shows the length
so far with bit 31 set. Software reads the words that have arrived, then reads
ISR and RLR again. It repeats this until RLR shows bit 31 clear. The word
count carries on across these steps.

## Vacancy and occupancy registers

TDFV follows the transmit FIFO's free locations with hysteresis. It follows a
rise at once, but follows a fall only when the fall is at least two locations.

TDFV resets to `depth − 4`. In the next cycle it jumps to the real vacancy,
which is `depth` for an empty FIFO.

RDFO is loaded with the number of locations the last complete packet occupies.
It returns to 0 when the receive data FIFO drains or the receive path is
reset.

## Resets

| Source | Effect |
|---|---|
| `s_axi_aresetn` | Resets the whole core at once. |
| SRR = `0xA5` | Resets the whole core, including both bus interfaces, for one cycle. The three `*_reset_out_n` outputs pulse low with it. |
| TDFR = `0xA5` | Waits until no packet is in flight on the transmit stream. Then resets the transmit FIFO, transmit control and stream mapper for one cycle and raises TRC. |
| RDFR = `0xA5` | Waits until no packet is being received. Then resets the receive FIFO, receive control and stream interface for one cycle and raises RRC. |

## Bus interfaces

### AXI4-Lite

`axi4_lite_if` has independent write and read machines. The write machine
takes the address, then the data. It pulses the register write for one cycle
and returns BVALID. A read returns RVALID two cycles after the address is
accepted. Responses are always OKAY, and AWPROT/ARPROT are ignored.

### AXI4

`axi4_if` is used only when `C_DATA_INTERFACE_TYPE = 1`. In that
configuration the AXI4-Lite port cannot reach TDFD and RDFD. Every beat of a
write burst is a TDFD write, whatever the burst type. Write beats are accepted
one per cycle. While a write response waits for BREADY, AWREADY stays high, so
the next burst's address can be taken early. That burst's beats are accepted
after the response. Every beat of a read burst is an RDFD read, and a read beat
takes two cycles.

Two cases end in SLVERR:
- A burst whose AxSIZE is wider than the bus. It transfers no data.
- A write burst whose master leaves the data channel idle for more than
  `TIMEOUT` (16) cycles.

A write response that the master leaves untaken for `RESP_TIMEOUT` (16)
cycles is dropped: BVALID falls and the slave waits for the next burst.
This breaks the AXI rule that VALID stays high until READY. Set
`RESP_TIMEOUT` to 0 on the `axi4_if` instance to keep the response until
BREADY. The top does not bring this parameter out, so the default applies.

## Parameters (`axis_fifo_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `C_S_AXI_DATA_WIDTH` | 32 | AXI4-Lite data width. |
| `C_RX_FIFO_DEPTH` | 512 | Receive FIFO depth in words. Must be a power of two. |
| `C_TX_FIFO_DEPTH` | 512 | Transmit FIFO depth in words. Must be a power of two. |
| `C_S_AXI4_DATA_WIDTH` | 32 | AXI4 data width. |
| `C_AXIS_DATA_WIDTH` | 32 | Stream data width. It is also the datapath width, and the other widths must match it. |
| `C_BASEADDR` | 0 | AXI4-Lite base address. |
| `C_AXI4_BASEADDR` | 0 | AXI4 base address. |
| `full_threshold_data` | 0 | Free locations at or below which a FIFO counts as programmably full. |
| `empty_threshold_data` | 0 | Used locations at or below which a FIFO counts as programmably empty. |
| `enable_cut_through` | 0 | 1 selects cut-through, 0 selects store-and-forward. |
| `C_DATA_INTERFACE_TYPE` | 0 | 1 moves TDFD/RDFD to the AXI4 port. |

Elaboration-time assertions check that the widths are consistent.

## Where this design departs from, or fills in, the original description

- **Own choices where the description is silent:**
  - The write address is taken before the write data.
  - Both AXI4 timeouts (data and response) are 16 cycles.
  - A set beats a clear in ISR.
  - The programmable levels are compared with `<=` and flagged on their rising
    edge.
  - RPUE and RPURE are not raised during an active receive sequence.
- **Stream mapper:** a two-state machine replaces the nine-state machine of
  the description. It keeps the behaviour of both modes.
  The original state tables hold TVALID low until TREADY is seen. Here
  TVALID rises as soon as a beat is ready, without waiting for TREADY, as the
  AXI4-Stream rules require.
  The cut-through tables also list an "error" exit back to idle. Its cause is
  not defined, so this design has no such exit.
- **AXI4-Lite read machine:** it has a fourth state that holds RVALID until
  RREADY. The original read machine has three states.
- **Out-of-order register writes:** a TDR, TDFD or TLR write out of order
  locks transmit control. TDFD writes on consecutive cycles are accepted,
  which AXI4 bursts need.
- **Transmit size error:** the packet is still sent, with the counted length.
- **Receive rate:** the receive stream takes at most one beat every two
  cycles. This follows from the three-state machine of the description.
- **RPORE:** raised for every unexpected RDFD read.
- **RC:** raised without waiting for a prior ISR read.
- **Response timeout:** an untaken AXI4 write response is dropped after 16
  cycles, as the description asks. The slave then waits for the next
  address. The description does not say which state comes next.
- **Configuration options:** `C_DATA_INTERFACE_TYPE` and the single datapath
  width are additions of this implementation.
- **Clocking:** there is one clock domain. The AXI4-Lite, AXI4 and stream
  clocks are not separate.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against an independent model and ends with a line
`TB_RESULT checks=N failures=M`.

- **`tb_axis_fifo_top`** runs three cores side by side through
  `axis_fifo_harness`: store-and-forward, cut-through, and AXI4 data port.
  Each sends random packets (1–20 words, random TDEST, random last-word bytes)
  in both directions with random TREADY stalls. Each then runs directed
  scenarios:
  - TSE and TPOE, followed by SRR
  - RPORE and RPURE
  - deferred transmit and receive resets
  - partial cut-through reads
  - TDFV/RDFO values
  - the interrupt output
  - AXI4 bursts

  It counts how often each of these sixteen mechanisms happened, and fails if
  any count is zero.
- **`tb_axis_fifo_full`** runs the core with every parameter at its default.
  It loops the transmit stream back into the receive stream and sends twenty
  packets of 1–20 words. It holds all of them in the receive FIFO (at most 400
  of 512 words), then reads them back and compares every word, length and
  destination.
- **`tb_axis_fifo_workloads`** also runs at the defaults. It covers the two
  store-and-forward workloads of the original random verification plan, 1–20
  packets of 1–20 words each, in four rounds. The first round uses the
  largest case, 20 × 20 = 400 words.
  - Transmit: all packets are written with TREADY low. TDFV must show the
    space left. Then TREADY is raised and every beat is compared.
  - Receive: all packets arrive before software reads anything. RDFO is
    checked, and then every packet is read back and compared.
  - Full receive FIFO: 512 words arrive with no reads. RFPF must rise. The
    next beat must wait with TREADY low until software has read a packet.
  - Transmit resets: 30 packets are written with TREADY random, and a
    transmit reset is requested after some of them. Each reset must end
    with TRC. Every packet that leaves must be whole and match a written
    packet, in order; packets still queued at a reset may be dropped.
- **`tb_axis_fifo_ct_workloads`** runs the cut-through workload: 1–20
  packets of 20 words, with only `enable_cut_through = 1` changed.
  - Transmit: every packet must start on the stream before its TLR write.
  - Receive: software reads the first half of each packet while the second
    half is still arriving. It then finishes the packet after RC.
  - Long packet: a single 512-word packet, as long as the receive FIFO, is
    read in partial steps while it streams in.
- **`tb_<block>`** tests each block on its own. Most use random stimulus
  checked cycle by cycle against a model.

To run one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/axis_fifo_pkg.sv tb/tb_axis_fifo_top.sv --top-module tb_axis_fifo_top
./obj_dir/Vtb_axis_fifo_top
```

Replace `tb_axis_fifo_top` with any other testbench name. The end-to-end test
takes well under a minute. The testbenches use only `$urandom`, so
`+verilator+seed+N` gives a different random run.

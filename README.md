# Dxlfpga: an FPGA bus controller for Dynamixel servos

A legged or humanoid robot may carry twenty or more Dynamixel smart servos.
They all talk the Dynamixel 2.0 (DXL2) packet protocol over half-duplex
serial buses. With one bus, every control cycle has to push all the position
commands and all the sensor read-backs through a single wire, so the
reachable update rate falls as servos are added. Splitting the servos over
several buses helps only if something fans the host's traffic out to the
buses and merges the answers back, without adding latency of its own.

This design is that component. It is an FPGA controller with a USB FIFO link
(FTDI FT2232H, asynchronous FIFO mode) to the host on one side and
`NUM_BUSES` (default 4) Dynamixel buses on the other. The host sees one
ordinary DXL2 link. It can send a single `SYNC_WRITE` or `SYNC_READ` that
addresses all servos. The controller cuts that packet into one smaller packet
per bus, so all buses work at the same time. It then merges the servos'
status packets back into one stream for the host. The controller learns which
servo sits on which bus by watching the answers, so the host never needs to
know the wiring.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) at 100 MHz. There is
no vendor IP. The FT2232H, the servos, the bus transceivers and the clock
source are outside the FPGA.

## Data path at a glance

```
 FT2232H  <->  ftdi_async_if  <->  host FIFOs (sync_fifo x2)
                                        |
                              packet_processor
        packet_detector -> packet FIFO (byte + bus tag) -> distributor
               |   \-> packet-info FIFO ----------------------^   |
               |                                                  v
        dev_bus_state  <--- collector  <---  per-bus RX FIFOs   per-bus TX FIFOs
                                                  ^                |
                                    dxl_bus_if (UART + direction) x NUM_BUSES
                                                  |
                                         Dynamixel bus k
```

`dxlfpga_top` instantiates the host interface, two host FIFOs, the packet
processor, and per bus a transmit FIFO, a receive FIFO and a bus interface.
Everything runs in one clock domain. The FTDI strobes are brought in through
two-flop synchronizers, and so is each serial receive line.

## The packet processor (the hard part)

The packet processor decides where each byte goes. It is split into three
stages, connected by two FIFOs and a small shared state block.

### packet_detector: parse, check, route

The detector walks the byte stream from the host one byte per cycle. It
searches for the header `FF FF FD 00`, then reads ID, LENGTH, the instruction,
the parameters and the CRC16. The CRC16 uses polynomial 0x8005, initial value
0 and no reflection, as DXL2 requires (see `dxl_pkg`). Only the instruction and
parameter bytes are stored. Each is written into the packet FIFO together with
a `NUM_BUSES`-bit tag that names the buses the byte is for. Header, ID, LENGTH
and CRC are not stored, because the distributor rebuilds them per bus.

Once the CRC has arrived, the detector writes one record to the packet-info
FIFO. The record holds: CRC good or bad, instruction, ID, the set of target
buses, and for each bus the LENGTH of its copy and the number of answers to
expect from it.

Routing rules:

| packet | goes to | answers expected per bus |
|---|---|---|
| `SYNC_READ` / `SYNC_WRITE` | start address and data length: every bus. Each ID, and for `SYNC_WRITE` its data block: only the bus that ID was last heard on, or every bus if unknown | `SYNC_READ`: one per ID sent to that bus. `SYNC_WRITE`: none |
| other instruction, known ID | that ID's bus | 1 |
| other instruction, unknown ID | every bus | 1 (the silent buses end by timeout) |
| broadcast ID 0xFE | every bus | `PING`: unknown (ended by timeout). Others: none |

Packets with LENGTH < 3, or longer than the packet FIFO, are dropped as soon
as their LENGTH is read. Packets with a bad CRC are passed to the distributor
flagged, and it discards them (counted in `crc_errors` and `packets_dropped`).

### distributor: rebuild one packet per bus

The distributor takes the oldest info record and streams that packet's bytes
out of the packet FIFO. Into every target bus's transmit FIFO it writes:
`FF FF FD 00`, ID, that bus's own LENGTH, then only the bytes whose tag names
the bus, then a CRC16. The distributor computes one CRC per bus, over exactly
what that bus received. An unsplit packet therefore comes out byte-identical
to the host's. A split `SYNC` packet becomes one valid, shorter `SYNC` packet
per bus.

A packet is started only when none of its target buses is still waiting for
answers. This keeps a request from colliding on the half-duplex wire with the
answers to the previous one. Packets to different, idle buses follow each
other without waiting, so the buses overlap. Without stalls a packet of LENGTH
L takes L + 7 cycles, which is far shorter than its time on the wire.

### dev_bus_state: where each ID lives, who is still talking

This block holds two things:

- **The ID map.** 256 entries, one-hot over the buses, all zero for "not yet
  seen". The collector writes the map from every status packet it forwards.
  The detector reads it combinationally while it routes. A servo moved to
  another bus is picked up at its next answer.
- **The pending counters.** One per bus. They are loaded when a packet starts
  out, decremented for each complete answer, and cleared by a timeout. A
  count of 255 means "unknown number" and is used for broadcast PING. `busy`
  (count ≠ 0) is what holds back the distributor.

After power-up the map is empty. Any packet to an unknown ID goes to every
bus, and the first answers fill the map in. A broadcast `PING` at start-up
learns the whole map in one go.

### collector: merge the answers

The collector picks, round robin, a bus whose receive FIFO has data and locks
onto it. It discards bytes until it finds `FF FF FD 00`. It then copies the
header, ID, LENGTH and LENGTH further bytes to the host FIFO and unlocks. So
answers from different buses never interleave inside a packet. Each forwarded
answer teaches the ID map its bus and counts one answer off that bus.

A per-bus timer runs while a bus is waiting but quiet: nothing queued, nothing
on the wire, nothing in its receive FIFO. After `TIMEOUT` cycles (default
50 000, i.e. 500 µs) the bus is released and `timeouts` counts up. A locked
bus that stops mid-packet is abandoned after the same time. The collector
does not check the CRC of answers; it passes them on as they came.

## Host interface (ftdi_async_if)

The interface drives the FT2232H in asynchronous FIFO mode: an 8-bit
bidirectional data bus (`dbus_i/dbus_o/dbus_oe`), and active-low `txe_n`,
`wr_n`, `rxif_n` and `rd_n`. It does one transfer at a time, and bytes to the
host go first. Timing at the defaults:

- **Write:** one setup cycle, `wr_n` low for 5 cycles, one hold cycle.
- **Read:** `rd_n` low for 5 cycles, with the byte sampled in the last one.
- **Recovery:** 8 cycles after each transfer, so the synchronized flags have
  settled.

A write takes about 15 cycles and a read about 13, so one byte costs roughly
140 ns. That is more than enough for 4 MBaud buses.

## Device bus interface (dxl_bus_if, uart_tx, uart_rx)

Each bus uses 8N1 asynchronous serial, LSB first, at `100 MHz / CLKS_PER_BIT`
(default 25, i.e. 4 MBaud). The transmitter sends bytes back to back, 10 bit
times each. `dxl_dir` drives the external TTL or RS-485 transceiver. It is high
from the first queued byte until the stop bit of the last one. While it is
high the receiver is disabled, because the half-duplex wire echoes the
controller's own bytes. The receiver samples mid-bit behind a two-flop
synchronizer. It drops bytes when its FIFO is full and counts them in
`rx_overflows`.

## Parameters of dxlfpga_top

| parameter | default | meaning |
|---|---|---|
| `NUM_BUSES` | 4 | Dynamixel buses |
| `CLKS_PER_BIT` | 25 | bus bit time in clocks (25 → 4 MBaud, 50 → 2, 100 → 1 at 100 MHz) |
| `BUS_FIFO_DEPTH` | 1024 | bytes per bus transmit and receive FIFO |
| `HOST_FIFO_DEPTH` | 1024 | bytes per host FIFO |
| `PKT_DEPTH` | 1024 | packet FIFO entries; also the longest accepted packet body |
| `INFO_DEPTH` | 16 | packets that can be queued between detector and distributor |
| `TIMEOUT` | 50000 | clocks of silence that end a wait for answers |

Status outputs (16-bit counters): `crc_errors`, `packets_sent`,
`packets_dropped`, `packets_forwarded`, `timeouts`, and `rx_overflows` per bus.
At the defaults, yosys maps the top to about 1500 cells and 1180 flip-flops,
plus 95 kbit of FIFO memory.

## Update rate

`tb_update_rate` runs the workload used to judge such controllers: 20 servos,
and one control cycle of `SYNC_WRITE` (4 bytes each) followed by `SYNC_READ`
(10 bytes each), waiting for all 20 answers. The controller is built at its
defaults. The servo models answer after 2 µs. The servos are spread over 1 to
4 buses at 4 MBaud:

| buses | simulated | bound set by the busiest bus |
|---|---|---|
| 1 | 679 Hz | 685 Hz |
| 2 | 1277 Hz | 1307 Hz |
| 3 | 1739 Hz | 1797 Hz |
| 4 | 2258 Hz | 2395 Hz |

The controller itself stays within 6 % of what the wire allows.

The original hardware measured 425, 678, 837 and 889 Hz on the same
configurations. Its bus-time limits were 704, 1342, 1843 and 2545 Hz. The
lower measured rates include the USB round trip and the host software, which
a simulation does not have. The 4 written and 10 read bytes per servo are an
assumption: only their sum (27 bytes of traffic per servo per cycle) can be
inferred from those limits.

Other bit rates need `CLKS_PER_BIT` changed. The bit rate is fixed when the
design is built. With `CLKS_PER_BIT` = 50 (2 MBaud), the same workload gave
346, 655, 896 and 1177 Hz, each within 3 % of its bound. The original
hardware measured 276, 474, 618 and 678 Hz on these configurations.

## Departures and open points

- **Instructions.** Routing knows `PING`, `READ`, `WRITE`, `SYNC_READ` and
  `SYNC_WRITE`. Any other instruction is routed like `WRITE`/`READ`, by its
  ID. `BULK_READ`, `BULK_WRITE`, `REG_WRITE` and `ACTION` are not split or
  counted specially.
- **Byte stuffing.** DXL2 inserts an extra `FD` after `FF FF` inside
  parameters. This is not decoded. Stuffed bytes pass through as
  ordinary data, which is harmless for unsplit packets. A `SYNC` packet that
  contains stuffing would be split at the wrong offsets.
- **How the answers are tracked.** The original design names a "device buses
  state" between collector and distributor. What it holds, the answer counts,
  the 255 marker and the timeout value are this design's own choices. So are
  the split-and-recompute-CRC scheme, the round-robin collector, and the FTDI
  cycle counts.
- **Not covered.** The IMU support and the synchronous-FIFO / USB 3 host
  interfaces that the original work lists as future work are not built.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_dxlfpga_top \
  rtl/dxl_pkg.sv rtl/sync_fifo.sv rtl/uart_tx.sv rtl/uart_rx.sv rtl/dxl_bus_if.sv \
  rtl/ftdi_async_if.sv rtl/dev_bus_state.sv rtl/packet_detector.sv \
  rtl/packet_info_fifo.sv rtl/distributor.sv rtl/collector.sv \
  rtl/packet_processor.sv rtl/dxlfpga_top.sv \
  tb/dxl_tb_pkg.sv tb/dxl_servo_model.sv tb/ftdi_model.sv tb/tb_dxlfpga_top.sv
./obj_dir/Vtb_dxlfpga_top
```

`tb_update_rate` builds the same way. The unit testbenches `tb_<module>` need
only their module, its submodules and `dxl_pkg`/`dxl_tb_pkg`.

The test environment has two behavioural models:

- **`dxl_servo_model`** is a DXL2 servo with a 256-byte control table. It
  answers `PING`, `READ`, `WRITE`, `SYNC_READ` and `SYNC_WRITE`. Under
  `SYNC_READ` it waits for its turn. Under broadcast `PING` it answers after
  an ID-dependent delay.
- **`ftdi_model`** models the FT2232H FIFO side and checks the strobe timing.

`tb_dxlfpga_top` runs 20 servos on 4 buses. Each mechanism must happen at
least once, or the test fails:

- learning from a broadcast `PING`;
- flooding to an unknown ID;
- splitting `SYNC` packets;
- dropping a bad-CRC packet;
- timeouts;
- waiting on a busy bus;
- parallel bus activity;
- arbitration between answers.

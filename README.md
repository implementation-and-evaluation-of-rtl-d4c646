# EtherCAT slave node in RTL, with a shared memory for a CGRA

EtherCAT moves process data through a line of field devices inside one
Ethernet frame. The frame is never stored and re-sent by a device. Each slave
reads and writes its part of the frame while the frame is still passing
through, then sends it on to the next device. The last device in the line
turns the frame around, and the frame travels back to the master. The
master learns from the *working counter* (WKC) at the end of each datagram
how many slaves served that datagram.

This repository holds synthesizable SystemVerilog for one such slave node.
The node talks directly to Gigabit Ethernet PHYs over RGMII and MDIO, so no
vendor Ethernet MAC is needed. The frame processor works at the byte level
at line rate. Each node has two ports:

- **Port 0** faces the master.
- **Port 1** faces the next node.

Beside the Ethernet path sits a second, independent block. It is a memory
interface through which an EtherCAT master and the processing elements (PEs)
of a coarse-grained reconfigurable array (CGRA) share data.

```
             port 0 (towards master)                 port 1 (towards next node)
   PHY ==RGMII== rgmii ----rx0----> streaming  ----tx1----> rgmii ==RGMII== PHY
                       <---tx0----  generator  <---rx1-----
   PHY ==MDIO=== mdio_master <- phy_controller   phy_controller -> mdio_master ==MDIO== PHY
                                                      |
                                      link of port 1 --+--> is_last (loop back)

   cgra_interface:  master port (32-bit address)  +  one data_memory per PE
```

## How a frame crosses a node

### Receive: from nibbles to bytes (`rgmii`)

RGMII carries one nibble on each edge of a 125 MHz clock. The `rgmii` block
runs at 250 MHz and handles one nibble per cycle, low nibble first.

- **Start of frame.** The block keeps the previous nibble. A 5 followed by a
  D, while `rx_ctl` is high, is the start-of-frame delimiter.
- **Trimming the FCS.** Every later nibble enters a nine-entry shift buffer
  together with a valid bit. When `rx_ctl` falls, the eight newest entries
  are marked invalid. Those are the 32-bit frame check sequence (FCS), so it
  never reaches the frame processor. The FCS is dropped without being
  checked.
- **Output.** Nibbles are paired into bytes. The frame processor sees one
  byte every two cycles, with first-byte and last-byte markers.

### Processing on the fly (`streaming_generator`)

The processor tracks two positions: the byte position in the frame and the
byte position in the current datagram. Bytes 12 and 13 must hold the
EtherCAT EtherType 88A4. Any other frame is passed on unchanged. After the
2-byte EtherCAT header come the datagrams, one after another:

| bytes | field |
|---|---|
| 0 | command |
| 1 | index |
| 2-3 | slave address (ADP), little-endian |
| 4-5 | offset (ADO), little-endian |
| 6-7 | bits 10..0: data length; upper bits are flags |
| 8-9 | interrupt |
| 10 .. 10+len-1 | data |
| next 2 | working counter, little-endian |

Because a datagram can start at any byte, its header fields are captured as
they go by. There is no word alignment to worry about.

The node serves five commands:

| code | name | action | WKC increment |
|---|---|---|---|
| 5 | FPWR | write, if ADP = `STATION_ADDR` | +1 |
| 6 | FPRW | read and write, if ADP = `STATION_ADDR` | +3 |
| 7 | BRD | broadcast read | +1 |
| 8 | BWR | broadcast write | +1 |
| 9 | BRW | broadcast read and write | +3 |

Other command codes pass through untouched.

Data byte *k* of a served datagram addresses register `(ADO + k) mod 32` of
a 32 × 8-bit register file.

- A read puts the register value into the frame.
- A write stores the frame byte.
- A read-write does both: the old value travels on and the new one is kept.

The WKC is increased as a 16-bit little-endian number. The increment goes to
the low byte and any carry goes to the high byte.

### Turning the frame around

The processed bytes pass through a six-byte delay line, one MAC address
long. The last node must send the frame back with the destination and
source MAC addresses exchanged. When the source address arrives, the
destination address is still in the delay line and in a side copy, so the
two can be exchanged without buffering the frame.

- **Last node** (`is_last` high): the frame goes out of port 0 with the
  addresses exchanged.
- **Any other node:** the frame goes out of port 1 with its addresses
  untouched. Frames coming back on port 1 are copied straight to port 0.

Only the last node exchanges addresses, so the master gets the frame back
with its own address as the destination. The decision is taken per frame,
at its first byte.

### Transmit (`rgmii`)

Outgoing bytes enter a 32-byte FIFO. The transmitter sends:

1. the preamble,
2. the delimiter D5,
3. the bytes, each also fed through `crc32_step`,
4. the four FCS bytes,
5. a 12-byte inter-frame gap.

The preamble takes 8 byte times and the processor delivers bytes at line
rate, so the FIFO never runs dry during a frame. `tx_underrun` would flag it
if it did. `rgmii_txc` is the 250 MHz clock divided by two.

`crc32_step` absorbs one byte per call. It uses a shift register whose
output bit, XORed with the data bit, is ANDed with every bit of the
generator polynomial and XORed back into the register. The register is kept
in reflected form:

- start value: all ones
- polynomial: 04C11DB7
- FCS sent: the inverted result, least significant byte first

## Finding the end of the line: PHY bring-up and link supervision

A node is last when nothing is plugged into its port 1. Only the PHY knows
that. Each port therefore has its own `phy_controller`, which drives an
`mdio_master`.

`mdio_master` sends IEEE 802.3 clause-22 management frames:

- 32 ones, start `01`
- opcode: `10` for read, `01` for write
- 5-bit PHY address, 5-bit register address
- 2-bit turnaround, 16 data bits

MDC toggles every `MDC_DIV` cycles of the 2.5 MHz management clock, so the
default MDC is 1.25 MHz. The line is split into `mdio_o`, `mdio_oe` and
`mdio_i` for a tri-state buffer at the pin. A transfer takes
128 × `MDC_DIV` cycles.

`phy_controller` runs this sequence (register numbers follow the Marvell
88E1510):

1. Read register 0 until the answer is not FFFF. A PHY still held in reset
   leaves the pulled-up line at all ones. Wait `RETRY_WAIT` cycles between
   tries.
2. Write register 0 with 0140 hex: 1000 Mb/s, full duplex.
3. Write 2 to the page register (22).
4. Read page-2 register 21, clear bit 4 (the PHY's internal transmit-clock
   delay), and write it back.
5. Return to page 0.
6. Write register 0 with 8140 hex: the same mode plus a software reset
   (bit 15), which makes the new settings take effect. `config_done` rises.
7. From then on, forever: read register 17 and copy bit 10 (real-time link)
   to `link_up`, then wait `POLL_WAIT` cycles.

`is_last` is the inverted link of port 1. It crosses into the 250 MHz domain
through a two-flop synchroniser that resets to "last". A node whose
neighbour is unplugged at run time starts looping frames within one poll
interval. A node whose neighbour appears starts forwarding within one poll
interval.

## The CGRA memory interface (`cgra_interface`, `data_memory`)

The master sees a 32-bit address:

| bits | meaning |
|---|---|
| 31..24 | slave ID (`SLAVE_ID`) |
| 23..16 | PE number |
| 15..0 | offset |

The offset selects the memory:

- **Offsets 0 .. `CONFIG_MAX` (255):** a configuration memory of 256 × 32
  bits. Only the master can reach it.
- **Offsets above 255:** word `offset − 255` of the selected PE's data
  memory. For example, 257 is word 2, and address 0x00010104 is word 5 of
  PE 1. Word 0 of each data memory can therefore be reached only by its PE.

Accesses to other slave IDs, to PEs that do not exist, or beyond a memory
are ignored.

There is one `data_memory` per PE, made with a generate loop. By default
there are three, each 256 × 32 bits. A PE uses its own local address, with
no offset. Reads return data one cycle after the request. A memory that was
not accessed returns zero, so the master's read data is simply the OR of all
memories.

The difficult part is two writes in the same cycle. When the PE and the
master both write to one memory in the same cycle:

- `conflict_o` rises and the PE's write wins.
- The master's address and data go into a three-entry FIFO.
- The oldest queued write is performed in the next cycle in which neither
  side writes.
- While the FIFO is full, `buffer_full_o` is high. A further colliding
  master write is dropped and flagged on `lost_o`.

Until a queued write drains, reads of that word return the PE's value.
Reads never collide with anything. Writes by different PEs never collide
either, because every PE has its own memory.

## Top level (`ethercat_slave_top`)

The top holds one node:

- two management paths (controller + MDIO master),
- two `rgmii` blocks,
- the streaming generator,
- the CGRA interface with all of its ports brought out.

The top does not connect the CGRA interface to the datagram processor. The
Ethernet path serves its 32-byte register file. The CGRA memory is reached
through its own master-side port.

There are three clocks:

| clock | frequency | drives |
|---|---|---|
| `clk_250` | 250 MHz | RGMII and frame processing |
| `clk_mgmt` | 2.5 MHz | controllers and MDIO |
| `clk_cgra` | any | CGRA memories |

An outside clock manager must provide them. `rst_n` is asynchronous, active
low, and must be released synchronously in each domain. A line of *N*
slaves is *N* instances: port 1 of one node is wired to port 0 of the next.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `STATION_ADDR` | 0 | configured address for FPWR/FPRW |
| `REG_COUNT` | 32 | register file entries |
| `MDC_DIV` | 1 | management clock cycles per MDC half period |
| `RETRY_WAIT`, `POLL_WAIT` | 1000 | management cycles between PHY probes / link polls |
| `NUM_PE` | 3 | processing elements |
| `DATA_W`, `DATA_AW` | 32, 8 | data memory word width and address width |
| `CONFIG_MAX` | 255 | last configuration-memory offset |

Latency through a node is about 40 cycles of 4 ns:

- 9 nibbles in the FCS buffer,
- 12 cycles of delay line,
- 16 nibbles of preamble.

## Where this design departs from the design it follows

- **WKC byte order.** The working counter is little-endian, as the EtherCAT
  standard defines it. The original hardware put the increment into the
  upper byte, so a master decoding the field saw 512 where this design
  gives 2 (two slaves, one write each).
- **Byte-wide datapath.** The frame processor works on a byte stream, not
  on 32-bit bus words.
- **Datagram walk.** Datagrams are walked until the frame ends. The
  EtherCAT header's length and the "more datagrams" flag are not used.
- **Register file details.** Addresses wrap modulo 32. Registers reset to
  zero.
- **No receive FCS check.** Frames with a bad FCS are processed like good
  ones.
- **No receive clock input.** The `rgmii` block has no `rgmii_rxc` input.
  The DDR input registers and clock skew handling belong at the pins. The
  block expects the receive nibbles already in the 250 MHz domain.
- **Register numbers from the PHY datasheet.** Register 21 and bit 4 for
  the transmit delay come from the 88E1510 register map. The retry and poll
  intervals are free choices.
- **Two ports per node with the custom MAC.** The node combines the two-port
  line topology with the custom RGMII/MDIO blocks. The vendor Ethernet
  subsystem is not used at all.
- **CGRA-side choices.** Dropping writes when the FIFO is full, ignoring
  out-of-range addresses, and returning the written word on a write are
  this design's own choices.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_crc32_step` | check value CBF43926 of "123456789", the residue after a frame and its own FCS, and random byte strings against an MSB-first reference |
| `tb_mdio_master` | read and write frames bit by bit, turnaround release, frame length in cycles |
| `tb_phy_controller` | full bring-up against a PHY model that ignores its first reads; link up and down |
| `tb_rgmii` | frames of 60 to 1514 bytes sent into the receiver (FCS must be trimmed) and fed back into the transmitter (preamble, data, FCS and gap checked) |
| `tb_streaming_generator` | a 60-byte, three-datagram test frame with hand-worked answers; 60 random frames against a reference model; both chain positions; return path; 2-cycle pipeline latency |
| `tb_data_memory` | the collision rule, FIFO order, full FIFO and lost write; 4000 random cycles against a model |
| `tb_cgra_interface` | the reference access sequence (257, 258 collision, concurrent read, 0x00010104); 6000 random cycles against a model of all memories |
| `tb_ethercat_slave_top` | two nodes in a line at default parameters (see below) |

In `tb_ethercat_slave_top`, the testbench drives frames into node 1 as
RGMII nibbles. Behavioural PHYs (`tb/phy_mdio_model.sv`) answer all four
MDIO buses. `tb/rgmii_frame_monitor.sv` checks preamble and FCS on every
link. The test covers:

- PHY bring-up, including retries;
- the test frame, a register read-back, a non-EtherCAT frame, random frames
  and a 1514-byte frame, each compared with a two-node model;
- a link drop behind node 1, after which node 1 loops frames itself;
- the CGRA access sequence.

It counts each mechanism and fails if any never occurred: MDIO retry, link
found and missing, link change, forwarding, loop-back, return path, address
exchange, working counters, pass-through, FCS, CGRA collision, deferred
write, and parallel access.

Known limits of the tests:

- The PHY is a model of its management registers only.
- No testbench drives the RGMII pins with real DDR timing.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_ethercat_slave_top \
  rtl/ecat_pkg.sv rtl/crc32_step.sv rtl/mdio_master.sv rtl/phy_controller.sv rtl/rgmii.sv \
  rtl/streaming_generator.sv rtl/data_memory.sv rtl/cgra_interface.sv rtl/ethercat_slave_top.sv \
  tb/phy_mdio_model.sv tb/rgmii_frame_monitor.sv tb/tb_ethercat_slave_top.sv
./obj_dir/Vtb_ethercat_slave_top
```

A block testbench needs only that block's file, the files of its
sub-blocks, and `rtl/ecat_pkg.sv`. `tb_mdio_master` and `tb_phy_controller`
also need `tb/phy_mdio_model.sv`, and `tb_phy_controller` needs
`rtl/mdio_master.sv`. Every test finishes in seconds. The top test runs
about 3 ms of simulated time.

## Files

| file | content |
|---|---|
| `rtl/ecat_pkg.sv` | EtherType, Ethernet constants, command codes and their decode |
| `rtl/crc32_step.sv` | one byte of CRC-32 |
| `rtl/mdio_master.sv` | clause-22 MDIO master |
| `rtl/phy_controller.sv` | PHY bring-up and link polling |
| `rtl/rgmii.sv` | RGMII receive/transmit at 250 MHz |
| `rtl/streaming_generator.sv` | EtherCAT frame processor |
| `rtl/data_memory.sv` | dual-port PE memory with collision FIFO |
| `rtl/cgra_interface.sv` | address decoding, configuration memory, PE memories |
| `rtl/ethercat_slave_top.sv` | one node |
